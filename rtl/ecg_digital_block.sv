// ecg_digital_block: the digital half of the monitor.
//
// Decimated ADC samples enter the control logic unit (clu), which writes a
// 4096-sample frame to the ECG memory while the Haar DWT core turns the same
// samples into level-3 and level-5 detail coefficients, written to their own
// memories. Boundary detection (bd_unit) then finds the R-peaks and beat
// boundaries from cD_L3 and the ECG, and feature extraction (fe_unit) the
// QRS, Q, S, P and T points of each beat from the ECG and cD_L5. The clu
// finally checks the R-R intervals against the patient's limits and drives
// the 8/12-bit resolution switch back to the ADC.
// One DWT core serves both detection and extraction, as in the architecture
// this design implements. bd_unit and fe_unit run one after the other and
// share the ECG read port, selected by the clu.
//
// Interface: sample_valid/sample (12-bit signed, ~1 kHz); bd_res is valid
// from bd_done until the next frame's detection; feat_valid/feat stream one
// record per beat; frame_done pulses after the heart-rate check, with
// hr_abnormal and mode_hp updated.
module ecg_digital_block
  import ecg_pkg::*;
#(
  parameter int unsigned N = N_FRAME
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    agc_done,
  input  logic                    sample_valid,
  input  logic signed [ECG_W-1:0] sample,
  input  logic [ADDR_W-1:0]       rr_min,
  input  logic [ADDR_W-1:0]       rr_max,
  output logic                    mode_hp,
  output logic                    mode_switch,
  output logic                    hr_abnormal,
  output logic                    frame_done,
  output logic                    bd_done,
  output bd_result_t              bd_res,
  output logic                    feat_valid,
  output feat_t                   feat
);
  // control
  logic                    ecg_we, dwt_start, dwt_frame_done;
  logic [ADDR_W-1:0]       ecg_waddr;
  logic signed [ECG_W-1:0] ecg_wdata;
  logic                    bd_start, fe_start, fe_done, fe_active;

  // DWT streams
  logic                    cd3_valid, cd5_valid;
  logic [CD3_AW-1:0]       cd3_idx;
  logic [CD5_AW-1:0]       cd5_idx;
  logic signed [CD3_W-1:0] cd3;
  logic signed [CD5_W-1:0] cd5;

  // memory read ports
  logic [ADDR_W-1:0]       ecg_raddr, bd_ecg_raddr, fe_ecg_raddr;
  logic signed [ECG_W-1:0] ecg_rdata;
  logic [CD3_AW-1:0]       cd3_raddr;
  logic signed [CD3_W-1:0] cd3_rdata;
  logic [CD5_AW-1:0]       cd5_raddr;
  logic signed [CD5_W-1:0] cd5_rdata;

  logic                    bd_busy, fe_busy;
  logic signed [CD3_W-1:0] bd_min4, bd_th;

  clu #(.N(N)) u_clu (
    .clk, .rst_n, .enable, .agc_done, .sample_valid, .sample, .rr_min, .rr_max,
    .ecg_we, .ecg_waddr, .ecg_wdata, .dwt_start, .dwt_frame_done,
    .bd_start, .bd_done, .bd(bd_res), .fe_start, .fe_done, .fe_active,
    .mode_hp, .mode_switch, .hr_abnormal, .frame_done);

  dwt_haar_core #(.N(N)) u_dwt (
    .clk, .rst_n, .frame_start(dwt_start), .in_valid(ecg_we), .in_sample(ecg_wdata),
    .cd3_valid, .cd3_idx, .cd3, .cd5_valid, .cd5_idx, .cd5,
    .frame_done(dwt_frame_done));

  assign ecg_raddr = fe_active ? fe_ecg_raddr : bd_ecg_raddr;

  ecg_memory #(.N(N)) u_mem (
    .clk,
    .ecg_we, .ecg_waddr, .ecg_wdata, .ecg_raddr, .ecg_rdata,
    .cd3_we(cd3_valid), .cd3_waddr(cd3_idx), .cd3_wdata(cd3), .cd3_raddr, .cd3_rdata,
    .cd5_we(cd5_valid), .cd5_waddr(cd5_idx), .cd5_wdata(cd5), .cd5_raddr, .cd5_rdata);

  bd_unit #(.N(N)) u_bd (
    .clk, .rst_n, .start(bd_start), .busy(bd_busy), .done(bd_done),
    .cd3_raddr, .cd3_rdata, .ecg_raddr(bd_ecg_raddr), .ecg_rdata,
    .res(bd_res), .min4(bd_min4), .threshold(bd_th));

  fe_unit #(.N(N)) u_fe (
    .clk, .rst_n, .start(fe_start), .bd(bd_res), .busy(fe_busy), .done(fe_done),
    .ecg_raddr(fe_ecg_raddr), .ecg_rdata, .cd5_raddr, .cd5_rdata,
    .feat_valid, .feat);

  // The threshold and min_4 are observation points of bd_unit; busy flags
  // are implied by the clu's sequencing.
  logic unused;
  assign unused = ^{bd_busy, fe_busy, bd_min4, bd_th};
endmodule
