// sd_modulator_model: behavioural model of the reconfigurable discrete-time
// sigma-delta modulator (switched-capacitor analog circuit, not
// synthesizable logic).
//
// In silicon one opamp-shared integrator gives either 1st-order noise
// shaping (8-bit mode, MODE_LP) or 2nd-order shaping of a cascaded
// integrator feedback (CIFB) loop (12-bit mode, MODE_HP); a comparator and a
// latch give the 1-bit output Q. The model uses the difference equations:
//   mode_hp = 0:  i1 += vin - y;                       q = (i1 >= 0)
//   mode_hp = 1:  i1 += 0.5(vin - y); i2 += 0.5(i1 - y); q = (i2 >= 0)
// with y = +1 when q = 1 and -1 when q = 0, one update per step (the
// 15.625 kHz sampling clock, given as a clock enable). vin is normalised to
// the reference (+-1); stable for |vin| below about 0.8. pwr_up low (S1 open)
// holds the loop at rest. The two modes and the 1st/2nd-order behaviour are
// the design's; the 0.5 loop coefficients are this model's choice.
module sd_modulator_model (
  input  logic clk,
  input  logic rst_n,
  input  logic pwr_up,
  input  logic step,
  input  logic mode_hp,
  input  real  vin,
  output logic q
);
  real i1, i2;
  real y;

  assign y = q ? 1.0 : -1.0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= 0.0;
      i2 <= 0.0;
      q  <= 1'b0;
    end else if (!pwr_up) begin
      i1 <= 0.0;
      i2 <= 0.0;
      q  <= 1'b0;
    end else if (step) begin
      if (mode_hp) begin
        i1 <= i1 + 0.5 * (vin - y);
        i2 <= i2 + 0.5 * (i1 - y);
        q  <= (i2 + 0.5 * (i1 - y)) >= 0.0;
      end else begin
        i1 <= i1 + (vin - y);
        q  <= (i1 + (vin - y)) >= 0.0;
      end
    end
  end
endmodule
