// dwt_haar_core: five-level Haar discrete wavelet transform of one ECG frame.
//
// The same low-complexity DWT core serves boundary detection (level-3 detail,
// cD_L3) and feature extraction (level-5 detail, cD_L5). It is a cascade of
// five haar_stage blocks: each takes the approximation of the level above,
// pairs consecutive values and emits their sum and difference, so a level-L
// coefficient n covers samples n*2^L .. n*2^L + 2^L - 1. The cascade works on
// the sample stream as it arrives, so the coefficients are ready a few clocks
// after the last sample of the frame.
//
// Interface: pulse frame_start before the first sample; then in_valid with
// in_sample (signed ECG_W). cd3_valid/cd3_idx/cd3 and cd5_valid/cd5_idx/cd5
// stream the details with their index in the frame, ready to be written to
// memory. frame_done pulses with the last (N/32-th) cD_L5 coefficient.
// Samples may come every clock or slower. Widths grow one bit per level.
module dwt_haar_core
  import ecg_pkg::*;
#(
  parameter int unsigned N = N_FRAME
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     frame_start,
  input  logic                     in_valid,
  input  logic signed [ECG_W-1:0]  in_sample,
  output logic                     cd3_valid,
  output logic [CD3_AW-1:0]        cd3_idx,
  output logic signed [CD3_W-1:0]  cd3,
  output logic                     cd5_valid,
  output logic [CD5_AW-1:0]        cd5_idx,
  output logic signed [CD5_W-1:0]  cd5,
  output logic                     frame_done
);
  // level k output: valid, approximation and detail, ECG_W+k bits
  logic                    v1, v2, v3, v4, v5;
  logic signed [ECG_W:0]   a1, d1;
  logic signed [ECG_W+1:0] a2, d2;
  logic signed [ECG_W+2:0] a3, d3;
  logic signed [ECG_W+3:0] a4, d4;
  logic signed [ECG_W+4:0] a5, d5;

  haar_stage #(.IN_W(ECG_W))   u_l1 (.clk, .rst_n, .clear(frame_start),
    .in_valid(in_valid), .in_data(in_sample), .out_valid(v1), .approx(a1), .detail(d1));
  haar_stage #(.IN_W(ECG_W+1)) u_l2 (.clk, .rst_n, .clear(frame_start),
    .in_valid(v1), .in_data(a1), .out_valid(v2), .approx(a2), .detail(d2));
  haar_stage #(.IN_W(ECG_W+2)) u_l3 (.clk, .rst_n, .clear(frame_start),
    .in_valid(v2), .in_data(a2), .out_valid(v3), .approx(a3), .detail(d3));
  haar_stage #(.IN_W(ECG_W+3)) u_l4 (.clk, .rst_n, .clear(frame_start),
    .in_valid(v3), .in_data(a3), .out_valid(v4), .approx(a4), .detail(d4));
  haar_stage #(.IN_W(ECG_W+4)) u_l5 (.clk, .rst_n, .clear(frame_start),
    .in_valid(v4), .in_data(a4), .out_valid(v5), .approx(a5), .detail(d5));

  // Coefficient counters: index of the next coefficient of each stream.
  logic [CD3_AW-1:0] n3;
  logic [CD5_AW-1:0] n5;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n3         <= '0;
      n5         <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (frame_start) begin
        n3 <= '0;
        n5 <= '0;
      end else begin
        if (v3) n3 <= n3 + 1'b1;
        if (v5) begin
          n5 <= n5 + 1'b1;
          if (n5 == CD5_AW'(N/32 - 1)) frame_done <= 1'b1;
        end
      end
    end
  end

  assign cd3_valid = v3 && !frame_start;
  assign cd3_idx   = n3;
  assign cd3       = d3;
  assign cd5_valid = v5 && !frame_start;
  assign cd5_idx   = n5;
  assign cd5       = d5;

  // a4/a5 approximations and the level 1, 2, 4 details are not used by the
  // boundary and feature searches.
  logic unused;
  assign unused = ^{a5, d1, d2, d4};
endmodule
