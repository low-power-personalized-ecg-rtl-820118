// cic_decimator: reconfigurable CIC decimation filter after the sigma-delta
// modulator.
//
// Turns the 1-bit modulator stream into ECG samples at 1/R of the modulator
// rate. With R = 16 and the 15.625 kHz modulator rate the output rate is
// 976.6 Hz, close to the 1 kHz the beat detection assumes. The filter order
// follows the modulator order plus one:
//   mode_hp = 1 (2nd-order modulator): 3 integrators + 3 combs, DC gain
//                16^3 = 4096 -> 12-bit sample;
//   mode_hp = 0 (1st-order modulator): 2 integrators + 2 combs, DC gain
//                16^2 = 256  -> 8-bit sample.
// The sum is offset by half of full scale so that a bit density of one half
// gives 0, then saturated to the signed range. 8-bit samples are placed in
// bits 11:4 of the 12-bit output so both modes share one scale and the low
// bits stay quiet in 8-bit mode. Integrators wrap modulo 2^13, which is
// exact because every true output fits in 13 bits.
// Reconstructing the ECG with a CIC filter and the 8/12-bit modes follow the
// acquisition scheme this design implements; R, the order per mode and the
// output alignment are this design's choices.
//
// Interface: in_valid/in_bit at the modulator rate (clock enable), en gates
// the filter, clear empties it (used on a mode change). out_valid pulses for
// one clock, two clocks after every R-th input.
module cic_decimator
  import ecg_pkg::*;
#(
  parameter int unsigned R = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clear,
  input  logic                    mode_hp,
  input  logic                    in_valid,
  input  logic                    in_bit,
  output logic                    out_valid,
  output logic signed [ECG_W-1:0] out_sample
);
  localparam int unsigned W  = 3 * $clog2(R) + 1;   // 13 bits for R = 16
  localparam int unsigned RW = $clog2(R);

  logic [W-1:0]  i1, i2, i3;          // integrators
  logic [W-1:0]  c_in, d1, d2, d3;    // comb delay registers
  logic [RW-1:0] phase;
  logic          dec;                 // decimated sample is in c_in

  logic [W-1:0] c1, c2, c3, y;
  assign c1 = c_in - d1;
  assign c2 = c1 - d2;
  assign c3 = c2 - d3;
  assign y  = mode_hp ? c3 : c2;

  // offset to signed and saturate
  logic signed [W:0] s;
  always_comb begin
    if (mode_hp) s = $signed({1'b0, y}) - (W+1)'(2 ** (ECG_W - 1));
    else         s = $signed({1'b0, y}) - (W+1)'(2 ** (ECG_LR_W - 1));
  end

  logic signed [ECG_W-1:0] s_sat;
  always_comb begin
    if (mode_hp) begin
      if (s > (W+1)'(2 ** (ECG_W - 1) - 1)) s_sat = ECG_W'(2 ** (ECG_W - 1) - 1);
      else                                  s_sat = ECG_W'(s);
    end else begin
      if (s > (W+1)'(2 ** (ECG_LR_W - 1) - 1)) s_sat = ECG_W'((2 ** (ECG_LR_W - 1) - 1) << (ECG_W - ECG_LR_W));
      else                                     s_sat = ECG_W'(s) <<< (ECG_W - ECG_LR_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {i1, i2, i3, c_in, d1, d2, d3} <= '0;
      phase      <= '0;
      dec        <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      dec       <= 1'b0;
      if (clear || !en) begin
        {i1, i2, i3, c_in, d1, d2, d3} <= '0;
        phase <= '0;
      end else begin
        if (in_valid) begin
          i1    <= i1 + W'(in_bit);
          i2    <= i2 + i1;
          i3    <= i3 + i2;
          phase <= phase + 1'b1;
          if (phase == RW'(R - 1)) begin
            c_in <= mode_hp ? i3 : i2;
            dec  <= 1'b1;
          end
        end
        if (dec) begin
          d1         <= c_in;
          d2         <= c1;
          d3         <= c2;
          out_sample <= s_sat;
          out_valid  <= 1'b1;
        end
      end
    end
  end
endmodule
