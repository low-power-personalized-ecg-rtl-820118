// peak_level_detector_model: behavioural model of the AGC peak detector and
// voltage level detector (analog circuits, not synthesizable logic).
//
// The peak detector (OTA driving a transistor that charges a hold
// capacitor) keeps the largest magnitude of its input; the level detector
// (two inverters with different switching points) turns that voltage into
// two logic levels: vo1 = peak above V_LOW, vo2 = peak above V_HIGH. The
// model samples |vin| on every tick and holds the largest value until reset.
// The two outputs and their meaning follow the acquisition scheme; the two
// thresholds (30 % and 60 % of the ADC full scale) are this model's choice.
module peak_level_detector_model #(
  parameter real V_LOW  = 0.3,
  parameter real V_HIGH = 0.6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  input  real  vin,
  output logic vo1,
  output logic vo2
);
  real peak;
  real mag;

  assign mag = (vin < 0.0) ? -vin : vin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   peak <= 0.0;
    else if (tick && mag > peak)  peak <= mag;
  end

  assign vo1 = (peak > V_LOW);
  assign vo2 = (peak > V_HIGH);
endmodule
