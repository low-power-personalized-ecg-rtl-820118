// haar_stage: one level of the unscaled Haar filter bank.
//
// Input samples arrive one per in_valid. Each pair (first, second) produces,
// one clock after the second sample, approx = first + second (low-pass) and
// detail = first - second (high-pass), both IN_W+1 bits so nothing overflows.
// The 1/sqrt(2) normalisation is left out, as it only scales the result.
// clear restarts the pairing at the next sample.
module haar_stage #(
  parameter int unsigned IN_W = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic signed [IN_W:0]   approx,
  output logic signed [IN_W:0]   detail
);
  logic                   have_first;
  logic signed [IN_W-1:0] first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      first      <= '0;
      out_valid  <= 1'b0;
      approx     <= '0;
      detail     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        have_first <= 1'b0;
      end else if (in_valid) begin
        if (!have_first) begin
          first      <= in_data;
          have_first <= 1'b1;
        end else begin
          approx     <= (IN_W+1)'(first) + (IN_W+1)'(in_data);
          detail     <= (IN_W+1)'(first) - (IN_W+1)'(in_data);
          out_valid  <= 1'b1;
          have_first <= 1'b0;
        end
      end
    end
  end
endmodule
