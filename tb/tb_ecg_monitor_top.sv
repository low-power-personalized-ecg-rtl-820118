// tb_ecg_monitor_top: end-to-end run of the ECG monitor at its real rates.
//
// The top is used with its default parameters (1 MHz clock, modulator every
// 64 clocks, 976.6 Hz samples, 4096-sample frames, 1.5 M-cycle AGC
// settling), so this is also the full-size run: about 16 M clocks.
//
// Stimulus: an analog ECG of 1 mV R-wave with P, Q, S and T waves
// (Gaussian shapes) and a beat period of exactly 800 output samples
// (0.8192 s), updated every modulator step. With a 100x base gain the
// AGC should see a peak of 0.1 at code 0 (below range), step up once and
// stop at code 1 (peak 0.4, in range), then power the ADC up.
// Three frames follow. The R-R limits are changed between frames so that
// frame 0 is normal (8-bit mode kept), frame 1 is abnormal (switch to
// 12-bit) and frame 2, acquired in 12-bit mode, is normal again (switch
// back). Checks per frame and per beat:
//  - no sample is stored before the AGC has finished; 4096 per frame;
//  - R-peak spacing within 3 samples of 800, R-peak value near the
//    expected digital level (0.4 of full scale) with the sign of the R
//    wave, and 8-bit frames having the 4 low bits zero;
//  - each detected R-peak was sampled within 4 sample periods after an
//    analog R-peak (time stamps of the memory writes are kept for this);
//  - feature ordering: boundary < P on <= P peak <= P off, QRS on <= Q <=
//    R <= S <= QRS off, T on <= T peak <= T off < boundary, and the P and
//    T windows placed before / after R where the stimulus has those waves;
//  - boundary validity flags agree with the R positions.
// Each mechanism is counted and printed, and the counts must be non-zero.
module tb_ecg_monitor_top;
  import ecg_pkg::*;

  localparam int    SPC    = 1024;         // clocks per output sample
  localparam int    PERIOD = 800;          // samples per beat
  localparam real   FIRST  = 250.0;        // first R-peak, in samples
  localparam real   AMP    = 1.0e-3;       // volts

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic              enable, agc_done, mode_hp, frame_done, hr_abnormal, bd_done, feat_valid;
  real               ecg_in;
  logic [ADDR_W-1:0] rr_min, rr_max;
  logic [2:0]        gain_code;
  cap_sw_t           cap_sw;
  bd_result_t        bd_res;
  feat_t             feat;

  ecg_monitor_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc;
  int  frame_no;
  bit  frame_hp;     // mode in which the current frame was acquired
  int  n_steps_up, n_steps_down, n_agc_done, n_to_hp, n_to_lp, n_lp_frames, n_hp_frames;
  int  n_fine, n_beats, n_fv0, n_fv1, n_lv0, n_lv1, n_abn, n_early;
  int  max_lag, min_lag;
  longint t_agc;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
      if (failures >= 100) begin
        $display("too many failures, stopping");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  function automatic real gauss(real x, real mu, real sigma);
    return $exp(-0.5 * ((x - mu) / sigma) * ((x - mu) / sigma));
  endfunction

  // analog ECG at time n (in output-sample units)
  function automatic real ecg_at(real n);
    real v = 0.0;
    int  k0 = int'($floor((n - FIRST) / PERIOD));
    for (int k = k0 - 1; k <= k0 + 2; k++) begin
      real r = FIRST + k * PERIOD;
      v += 0.12 * gauss(n, r - 170.0, 18.0);
      v -= 0.12 * gauss(n, r - 22.0, 5.0);
      v += 1.00 * gauss(n, r, 6.0);
      v -= 0.25 * gauss(n, r + 20.0, 6.0);
      v += 0.30 * gauss(n, r + 260.0, 40.0);
    end
    return v * AMP;
  endfunction

  // input waveform, updated between active clock edges every 64 clocks
  always @(negedge clk) begin
    cyc++;
    if (cyc % 64 == 0) ecg_in = ecg_at(real'(cyc) / SPC);
  end

  // watchdog: 17 M clocks
  initial begin
    repeat (17_000_000) @(posedge clk);
    failures++;
    $display("watchdog: frame %0d", frame_no);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the gain search must end within 4 M clocks (two settling periods here)
  initial begin
    repeat (4_000_000) @(posedge clk);
    if (!agc_done) begin
      failures++;
      $display("watchdog: the AGC did not finish");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // AGC steps and completion
  logic [2:0] prev_code;
  logic       prev_done, prev_mode;
  always @(posedge clk) if (rst_n) begin
    if (gain_code > prev_code) n_steps_up++;
    if (gain_code < prev_code) n_steps_down++;
    if (agc_done && !prev_done) n_agc_done++;
    if (mode_hp && !prev_mode) n_to_hp++;
    if (!mode_hp && prev_mode) n_to_lp++;
    prev_code <= gain_code;
    prev_done <= agc_done;
    prev_mode <= mode_hp;
  end

  // Start of each frame's acquisition, seen from outside: the control unit
  // begins a frame right after agc_done rises or the previous frame_done,
  // drops 4 samples after a resolution switch, and then stores one sample
  // every SPC clocks. Sample i of the frame is therefore stored about
  // (i + skip + 1) sample periods after that point, to within one period.
  longint t_frame, t_bd0;
  int     skip;
  always @(posedge clk) if (rst_n) begin
    if ((agc_done && !prev_done) || frame_done) begin
      t_frame  = cyc;
      skip     = (frame_done && (mode_hp != prev_mode)) ? 4 : 0;
      frame_hp = mode_hp;
      if (!agc_done) n_early++;
    end
    if (bd_done && t_bd0 == 0) t_bd0 = cyc;
  end

  function automatic longint stored_at(int i);
    return t_frame + (longint'(i) + longint'(skip) + 64'sd1) * longint'(SPC);
  endfunction

  // time from the nearest analog R-peak to the moment a sample was stored,
  // in sample periods (positive: stored after the peak)
  function automatic int lag_samples(longint t);
    real n, k, d;
    n = real'(t) / SPC;
    k = $floor((n - FIRST) / PERIOD + 0.5);
    d = n - (FIRST + k * PERIOD);
    return int'($rtoi(d + (d >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // frame result
  always @(posedge clk) if (rst_n && bd_done) begin
    int np, lag, rv;
    np = int'(bd_res.n_peaks);
    check(!bd_res.too_few && !bd_res.overflow && np >= 4 && np <= 6,
          $sformatf("frame %0d: %0d R-peaks", frame_no, np));
    for (int j = 0; j < np; j++) begin
      rv = int'($signed(bd_res.r_val[j]));
      check(rv > 650 && rv < 1000, $sformatf("frame %0d: R value %0d", frame_no, rv));
      if (!frame_hp) check(bd_res.r_val[j][3:0] == 4'd0, "8-bit frame sample has low bits set");
      else if (bd_res.r_val[j][3:0] != 4'd0) n_fine++;
      lag = lag_samples(stored_at(int'(bd_res.r_idx[j])));
      if (lag > max_lag) max_lag = lag;
      if (lag < min_lag) min_lag = lag;
      check(lag >= -4 && lag <= 5, $sformatf("frame %0d: R %0d taken %0d samples after the analog peak",
                                           frame_no, bd_res.r_idx[j], lag));
      if (j > 0) begin
        int rr;
        rr = int'(bd_res.r_idx[j]) - int'(bd_res.r_idx[j-1]);
        check(rr >= PERIOD - 3 && rr <= PERIOD + 3, $sformatf("frame %0d: RR %0d", frame_no, rr));
      end
    end
    // first boundary inside the frame exactly when R0 - (R1-R0)/2 >= 0
    check(bd_res.first_valid ==
          (int'(bd_res.r_idx[0]) - (int'(bd_res.r_idx[1]) - int'(bd_res.r_idx[0])) / 2 >= 0),
          $sformatf("frame %0d: first boundary flag", frame_no));
    check(bd_res.last_valid ==
          (int'(bd_res.r_idx[np-1]) + (int'(bd_res.r_idx[np-1]) - int'(bd_res.r_idx[np-2])) / 2 <= N_FRAME - 1),
          $sformatf("frame %0d: last boundary flag", frame_no));
    if (bd_res.first_valid) n_fv1++; else n_fv0++;
    if (bd_res.last_valid)  n_lv1++; else n_lv0++;
    if (frame_hp) n_hp_frames++; else n_lp_frames++;
  end

  // per-beat features
  always @(posedge clk) if (rst_n && feat_valid) begin
    int r;
    r = int'(feat.r_idx);
    n_beats++;
    check(feat.b_start < feat.r_idx && feat.r_idx < feat.b_end,
          $sformatf("beat %0d: boundaries around R", feat.beat));
    check(feat.qrs_on <= feat.q_idx && feat.q_idx <= feat.r_idx && feat.r_idx <= feat.s_idx &&
          feat.s_idx <= feat.qrs_off,
          $sformatf("beat %0d: QRS %0d Q %0d R %0d S %0d QRS %0d", feat.beat, feat.qrs_on, feat.q_idx,
                    r, feat.s_idx, feat.qrs_off));
    check(feat.qrs_off - feat.qrs_on < 120, $sformatf("beat %0d: QRS width", feat.beat));
    check(feat.p_on <= feat.p_peak && feat.p_peak <= feat.p_off && feat.p_off <= feat.qrs_on + 32,
          $sformatf("beat %0d: P %0d %0d %0d", feat.beat, feat.p_on, feat.p_peak, feat.p_off));
    check(feat.t_on <= feat.t_peak && feat.t_peak <= feat.t_off && feat.t_on + 32 >= feat.qrs_off,
          $sformatf("beat %0d: T %0d %0d %0d", feat.beat, feat.t_on, feat.t_peak, feat.t_off));
    // The stimulus' P wave is centred 170 samples before R and its T wave 260
    // after. The front end's 0.25 Hz high-pass removes the signal's mean,
    // so the baseline sits a few percent of R below zero and the
    // largest-magnitude sample inside a P/T window need not be the wave's
    // top; the windows themselves must still bracket the waves' side of R.
    if (feat.p_on > feat.b_start)
      check(r - int'(feat.p_on) >= 100 && r - int'(feat.p_on) <= 300,
            $sformatf("beat %0d: P window starts at %0d for R %0d", feat.beat, feat.p_on, r));
    if (feat.t_off < feat.b_end)
      check(int'(feat.t_off) - r >= 150 && int'(feat.t_off) - r <= 400,
            $sformatf("beat %0d: T window ends at %0d for R %0d", feat.beat, feat.t_off, r));
  end

  initial begin
    rst_n = 1'b0;
    enable = 1'b1;
    ecg_in = 0.0;
    rr_min = 12'd500;
    rr_max = 12'd1200;
    cyc = 0;
    frame_no = 0; t_frame = 0; t_bd0 = 0; skip = 0; frame_hp = 1'b0;
    n_steps_up = 0; n_steps_down = 0; n_agc_done = 0; n_to_hp = 0; n_to_lp = 0;
    n_lp_frames = 0; n_hp_frames = 0; n_beats = 0; n_fine = 0; n_fv0 = 0; n_fv1 = 0; n_lv0 = 0; n_lv1 = 0;
    n_abn = 0; n_early = 0; max_lag = -100; min_lag = 100;
    prev_code = '0; prev_done = 1'b0; prev_mode = 1'b0;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;

    wait (agc_done);
    check(gain_code == 3'd1, $sformatf("AGC stopped at code %0d, expected 1", gain_code));
    check(cap_sw == gain_switches(3'd1), "capacitor switches follow the gain code");
    check(mode_hp == 1'b0, "acquisition starts in 8-bit mode");
    t_agc = cyc;
    $display("AGC done at cycle %0d, gain code %0d", cyc, gain_code);

    for (int f = 0; f < 3; f++) begin
      @(posedge clk iff frame_done);
      #1;
      case (f)
        0: begin
          check(!hr_abnormal && !mode_hp, "frame 0: normal, stays in 8-bit mode");
          rr_max = 12'd700;      // 800-sample beats now count as too slow
        end
        1: begin
          check(hr_abnormal && mode_hp, "frame 1: abnormal, switches to 12-bit mode");
          rr_max = 12'd1200;
        end
        default: check(!hr_abnormal && !mode_hp, "frame 2: normal, back to 8-bit mode");
      endcase
      if (hr_abnormal) n_abn++;
      $display("frame %0d done at cycle %0d: abnormal %0b, mode_hp %0b", f, cyc, hr_abnormal, mode_hp);
      frame_no++;
    end

    check(n_early == 0, "frame started before the AGC finished");
    check(t_bd0 - t_agc >= longint'(N_FRAME) * SPC,
          $sformatf("first frame result %0d clocks after the AGC, less than one frame", t_bd0 - t_agc));
    check(n_steps_up == 1 && n_steps_down == 0 && n_agc_done == 1, "one AGC step up, then done");
    check(n_to_hp == 1 && n_to_lp == 1, "one switch to 12-bit and one back");
    check(n_lp_frames == 2 && n_hp_frames == 1, "two 8-bit frames and one 12-bit frame");
    check(n_fine > 0, "12-bit frame R values use the low 4 bits");
    check(n_beats >= 12, $sformatf("%0d beats described", n_beats));
    check(n_abn == 1, "one abnormal frame");
    $display("mechanisms: agc_step_up=%0d agc_done=%0d to_12bit=%0d to_8bit=%0d frames_8bit=%0d frames_12bit=%0d",
             n_steps_up, n_agc_done, n_to_hp, n_to_lp, n_lp_frames, n_hp_frames);
    $display("mechanisms: beats=%0d abnormal_frames=%0d first_valid=%0d/%0d last_valid=%0d/%0d R_lag=%0d..%0d",
             n_beats, n_abn, n_fv1, n_fv0, n_lv1, n_lv0, min_lag, max_lag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
