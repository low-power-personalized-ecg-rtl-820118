// clu: control logic unit of the digital block.
//
// Sequences continuous monitoring one frame at a time:
//   IDLE   wait for enable and for the AGC to finish (the ADC only runs after
//          the gain has been set);
//   ACQ    write N decimated samples to the ECG memory and feed them to the
//          DWT core at the same time;
//   WAIT   let the DWT pipeline deliver its last cD_L5 coefficient;
//   BD, FE start boundary detection, then feature extraction, and wait;
//   HR     heart-rate check: the frame is abnormal when fewer than two
//          R-peaks were found or any R-R interval lies outside the patient's
//          own limits [rr_min, rr_max] (in samples). An abnormal frame selects
//          the 12-bit ADC mode (mode_hp = 1) for the following frames, a
//          normal one the 8-bit mode.
// Switching to high resolution on an abnormal heart rate follows the method
// this design implements; the R-R limit test, switching back after a normal
// frame and dropping DISCARD samples after each switch (while the
// decimation filter refills) are this design's choices.
//
// Interface: sample_valid/sample from the decimator; memory and DWT write
// strobes are combinational from sample_valid during ACQ. bd_start, fe_start,
// dwt_start, frame_done and mode_switch are one-clock pulses; fe_active
// selects feature extraction as user of the ECG read port.
module clu
  import ecg_pkg::*;
#(
  parameter int unsigned N       = N_FRAME,
  parameter int unsigned DISCARD = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    agc_done,
  input  logic                    sample_valid,
  input  logic signed [ECG_W-1:0] sample,
  input  logic [ADDR_W-1:0]       rr_min,
  input  logic [ADDR_W-1:0]       rr_max,
  // ECG memory write port and DWT input
  output logic                    ecg_we,
  output logic [ADDR_W-1:0]       ecg_waddr,
  output logic signed [ECG_W-1:0] ecg_wdata,
  output logic                    dwt_start,
  input  logic                    dwt_frame_done,
  // processing units
  output logic                    bd_start,
  input  logic                    bd_done,
  input  bd_result_t              bd,
  output logic                    fe_start,
  input  logic                    fe_done,
  output logic                    fe_active,
  // status
  output logic                    mode_hp,
  output logic                    mode_switch,
  output logic                    hr_abnormal,
  output logic                    frame_done
);
  typedef enum logic [2:0] {
    S_IDLE, S_START, S_ACQ, S_WAIT, S_BD, S_FE, S_HR
  } state_e;
  state_e state;

  logic [ADDR_W-1:0]          cnt;
  logic [$clog2(DISCARD+1):0] discard;

  // R-R interval check over the peaks of the current result
  logic abnormal;
  always_comb begin
    abnormal = bd.too_few || (bd.n_peaks < 2);
    for (int j = 1; j < MAX_PEAKS; j++) begin
      if (NPK_W'(j) < bd.n_peaks) begin
        if ((bd.r_idx[j] - bd.r_idx[j-1]) < rr_min ||
            (bd.r_idx[j] - bd.r_idx[j-1]) > rr_max)
          abnormal = 1'b1;
      end
    end
  end

  logic take;
  assign take      = (state == S_ACQ) && sample_valid && (discard == '0);
  assign ecg_we    = take;
  assign ecg_waddr = cnt;
  assign ecg_wdata = sample;
  assign dwt_start = (state == S_START);
  assign fe_active = (state == S_FE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      discard     <= '0;
      bd_start    <= 1'b0;
      fe_start    <= 1'b0;
      mode_hp     <= 1'b0;
      mode_switch <= 1'b0;
      hr_abnormal <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      bd_start    <= 1'b0;
      fe_start    <= 1'b0;
      mode_switch <= 1'b0;
      frame_done  <= 1'b0;
      unique case (state)
        S_IDLE:  if (enable && agc_done) state <= S_START;
        S_START: begin
          cnt   <= '0;
          state <= S_ACQ;
        end
        S_ACQ: if (sample_valid) begin
          if (discard != '0) discard <= discard - 1'b1;
          else begin
            cnt <= cnt + 1'b1;
            if (cnt == ADDR_W'(N - 1)) state <= S_WAIT;
          end
        end
        S_WAIT: if (dwt_frame_done) begin
          bd_start <= 1'b1;
          state    <= S_BD;
        end
        S_BD: if (bd_done) begin
          fe_start <= 1'b1;
          state    <= S_FE;
        end
        S_FE: if (fe_done) state <= S_HR;
        S_HR: begin
          hr_abnormal <= abnormal;
          frame_done  <= 1'b1;
          if (abnormal != mode_hp) begin
            mode_hp     <= abnormal;
            mode_switch <= 1'b1;
            discard     <= ($bits(discard))'(DISCARD);
          end
          state <= enable ? S_START : S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
