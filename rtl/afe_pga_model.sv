// afe_pga_model: behavioural model of the analog front end with programmable
// gain and band-pass response (not synthesizable logic; an analog circuit in
// silicon).
//
// The real circuit is a two-stage, fully differential, capacitively coupled
// amplifier with band-pass shaping; between the stages a capacitor bank sets
// the gain (Cg always in, plus 3Cg via S3, 4.5Cg via S5 and 6Cg via S4). This
// model has the gain vout = vin * BASE_GAIN * Ctotal/Cg in the pass band, so
// it runs from 40 dB (Cg alone) to 63 dB (all switches closed), and a
// first-order high-pass (F_HP = 0.25 Hz) followed by a first-order low-pass
// (F_LP = 250 Hz), the bandwidth of the real front end. vout is normalised
// to the ADC reference (full scale +-1).
// The capacitor values and the 0.25-250 Hz band are the design's; BASE_GAIN,
// the first-order shape of both edges and the capacitance-to-gain relation
// are this model's assumptions. Noise and the tuning of the high-pass corner
// (pseudo-resistor gate voltage) are not modelled.
//
// Timing: the filters are evaluated in discrete time, one step per tick at
// the rate FS (the modulator's sampling rate, the only rate at which vout
// is used), with exact pole positions exp(-2*pi*f/FS). A gain change acts
// at once on the output; the high-pass state stays as it was.
module afe_pga_model
  import ecg_pkg::*;
#(
  parameter real BASE_GAIN = 100.0,
  parameter real F_HP      = 0.25,
  parameter real F_LP      = 250.0,
  parameter real FS        = 15625.0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tick,
  input  real     vin,
  input  cap_sw_t sw,
  output real     vout
);
  localparam real PI   = 3.14159265358979;
  localparam real A_HP = $exp(-2.0 * PI * F_HP / FS);
  localparam real A_LP = $exp(-2.0 * PI * F_LP / FS);

  real ratio;
  always_comb begin
    ratio = 1.0;
    if (sw.s3) ratio = ratio + 3.0;
    if (sw.s5) ratio = ratio + 4.5;
    if (sw.s4) ratio = ratio + 6.0;
  end

  // hp: y[n] = A_HP * (y[n-1] + x[n] - x[n-1]); lp: z[n] = z[n-1] + (1-A_LP)(y[n] - z[n-1])
  real x_prev, hp, lp, hp_next;
  assign hp_next = A_HP * (hp + vin - x_prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev <= 0.0;
      hp     <= 0.0;
      lp     <= 0.0;
    end else if (tick) begin
      x_prev <= vin;
      hp     <= hp_next;
      lp     <= lp + (1.0 - A_LP) * (hp_next - lp);
    end
  end

  assign vout = lp * BASE_GAIN * ratio;
endmodule
