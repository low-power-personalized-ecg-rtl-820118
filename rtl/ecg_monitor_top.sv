// ecg_monitor_top: personalized ECG monitor, analog acquisition plus digital
// beat analysis.
//
// Signal path: electrode voltage -> programmable-gain band-pass front end
// (afe_pga_model) -> sigma-delta modulator (sd_modulator_model, 15.625 kHz)
// -> CIC decimator (976.6 Hz, 8- or 12-bit samples) -> digital block (frame
// memory, Haar DWT, boundary detection, feature extraction, control).
// Gain control: a peak / level detector (peak_level_detector_model) and the
// Moore-machine decoder (agc_decoder) pick the PGA capacitor set before the
// ADC is switched on; S1 from the decoder powers the modulator and decimator
// up. Resolution control: the digital block's mode_hp selects 1st-order
// modulation with an 8-bit decimator or 2nd-order with a 12-bit one; it goes
// high when the heart rate leaves the patient's limits.
// The analog parts are behavioural models (real-valued ports) for
// simulation; everything else is synthesizable. The rule engine and radio
// that would consume the per-beat features are outside this design: the
// feature stream, beat boundaries and abnormal flag are brought out.
//
// Clocking: one 1 MHz clock; the modulator runs on a clock enable every
// SD_CLK_DIV clocks (1 MHz / 64 = 15.625 kHz). A frame of 4096 samples takes
// 4096 * 1024 clocks (~4.2 s) to acquire and a few thousand clocks to
// analyse. Reset (rst_n low) restarts the gain search.
module ecg_monitor_top
  import ecg_pkg::*;
#(
  parameter int unsigned SD_CLK_DIV = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  real               ecg_in,
  input  logic [ADDR_W-1:0] rr_min,
  input  logic [ADDR_W-1:0] rr_max,
  // acquisition status
  output logic [2:0]        gain_code,
  output cap_sw_t           cap_sw,
  output logic              agc_done,
  output logic              mode_hp,
  // per-frame results
  output logic              frame_done,
  output logic              hr_abnormal,
  output logic              bd_done,
  output bd_result_t        bd_res,
  // per-beat features towards the rule engine / radio
  output logic              feat_valid,
  output feat_t             feat
);
  localparam int unsigned DW = $clog2(SD_CLK_DIV);

  // modulator clock enable
  logic [DW-1:0] div;
  logic          sd_tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  end
  assign sd_tick = (div == DW'(SD_CLK_DIV - 1));

  // analog front end and gain control
  real  afe_out;
  logic vo1, vo2;

  afe_pga_model u_afe (.clk, .rst_n, .tick(sd_tick), .vin(ecg_in), .sw(cap_sw), .vout(afe_out));

  peak_level_detector_model u_peak (
    .clk, .rst_n, .tick(sd_tick), .vin(afe_out), .vo1, .vo2);

  agc_decoder u_agc (
    .clk, .rst_n, .start(1'b0), .vo1, .vo2, .gain_code, .sw(cap_sw), .s1(agc_done));

  // sigma-delta ADC
  logic sd_bit;
  logic mode_switch;
  logic smp_valid;
  logic signed [ECG_W-1:0] smp;

  sd_modulator_model u_sdm (
    .clk, .rst_n, .pwr_up(agc_done), .step(sd_tick), .mode_hp, .vin(afe_out), .q(sd_bit));

  cic_decimator u_cic (
    .clk, .rst_n, .en(agc_done), .clear(mode_switch), .mode_hp,
    .in_valid(sd_tick), .in_bit(sd_bit), .out_valid(smp_valid), .out_sample(smp));

  // digital block
  ecg_digital_block u_dig (
    .clk, .rst_n, .enable, .agc_done, .sample_valid(smp_valid), .sample(smp),
    .rr_min, .rr_max, .mode_hp, .mode_switch, .hr_abnormal, .frame_done,
    .bd_done, .bd_res, .feat_valid, .feat);
endmodule
