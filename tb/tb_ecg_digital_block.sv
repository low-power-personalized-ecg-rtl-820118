// tb_ecg_digital_block: the complete digital back end over several frames.
//
// Stimulus: synthetic 12-bit ECG frames (ecg_ref_pkg::synth_ecg), one
// sample every 3 clocks. After each frame_done the next frame is sent; when
// the block has just switched resolution, 4 junk samples (large constant)
// are sent first and must be dropped, otherwise the results would differ.
// For each frame the reference chain (haar_ref, bd_ref, fe_ref) is run on
// the same samples and compared with bd_res at bd_done and with every
// feature record. The heart-rate decision and the resulting mode are
// checked against the limits rr_min/rr_max: frames are chosen so the block
// goes normal -> abnormal (switch to 12-bit) -> normal (switch back) ->
// too few beats (switch) -> inverted polarity, and each of those events is
// counted and required at the end.
module tb_ecg_digital_block;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    enable, agc_done, sample_valid;
  logic signed [ECG_W-1:0] sample;
  logic [ADDR_W-1:0]       rr_min, rr_max;
  logic                    mode_hp, mode_switch, hr_abnormal, frame_done, bd_done, feat_valid;
  bd_result_t              bd_res;
  feat_t                   feat;

  ecg_digital_block dut (.*);

  int checks = 0, failures = 0;
  ecg_arr_t x;
  cd3_arr_t r3;
  cd5_arr_t r5;
  bd_ref_t  e;
  int n_feat, n_bd, n_frames, n_switch, n_to_hp, n_to_lp, n_abn, n_few, n_neg_beats;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
      if (failures >= 100) begin
        $display("too many failures, stopping");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  // boundary result against the reference
  always @(posedge clk) if (rst_n && bd_done) begin
    n_bd++;
    check(int'(bd_res.n_peaks) == e.n && bd_res.too_few == e.too_few && bd_res.overflow == e.ovf,
          $sformatf("frame %0d: n_peaks %0d exp %0d", n_frames, bd_res.n_peaks, e.n));
    for (int j = 0; j < e.n; j++) begin
      check(int'(bd_res.r_idx[j]) == e.r[j] && int'($signed(bd_res.r_val[j])) == e.rv[j],
            $sformatf("frame %0d: R[%0d] %0d exp %0d", n_frames, j, bd_res.r_idx[j], e.r[j]));
      check(int'(bd_res.t1[j]) == e.t1[j] && int'(bd_res.t2[j]) == e.t2[j],
            $sformatf("frame %0d: t1/t2[%0d]", n_frames, j));
    end
    if (!e.too_few) begin
      for (int j = 0; j <= e.n; j++)
        check(int'(bd_res.bound[j]) == e.b[j],
              $sformatf("frame %0d: B[%0d] %0d exp %0d", n_frames, j, bd_res.bound[j], e.b[j]));
      check(bd_res.first_valid == e.fv && bd_res.last_valid == e.lv,
            $sformatf("frame %0d: boundary validity", n_frames));
    end
  end

  // feature records against the reference
  always @(posedge clk) if (rst_n && feat_valid) begin
    fe_ref_t f;
    int k;
    k = int'(feat.beat);
    fe_ref(x, r5, e, k, 3, f);
    check(k == n_feat, $sformatf("frame %0d: beat number %0d exp %0d", n_frames, k, n_feat));
    check(int'(feat.r_idx) == e.r[k] && int'(feat.b_start) == e.b[k] && int'(feat.b_end) == e.b[k+1],
          $sformatf("frame %0d beat %0d: R/B", n_frames, k));
    check(int'(feat.qrs_on) == f.qrs_on && int'(feat.qrs_off) == f.qrs_off &&
          int'(feat.q_idx) == f.q && int'(feat.s_idx) == f.s,
          $sformatf("frame %0d beat %0d: QRS/Q/S", n_frames, k));
    check(int'(feat.p_on) == f.p_on && int'(feat.p_peak) == f.p_peak && int'(feat.p_off) == f.p_off,
          $sformatf("frame %0d beat %0d: P wave", n_frames, k));
    check(int'(feat.t_on) == f.t_on && int'(feat.t_peak) == f.t_peak && int'(feat.t_off) == f.t_off,
          $sformatf("frame %0d beat %0d: T wave", n_frames, k));
    if (x[e.r[k]] < 0) n_neg_beats++;
    n_feat++;
  end

  always @(posedge clk) if (rst_n && mode_switch) n_switch++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int v);
    sample       <= ECG_W'(v);
    sample_valid <= 1'b1;
    @(posedge clk);
    sample_valid <= 1'b0;
    repeat (2) @(posedge clk);
  endtask

  task automatic run_frame(input int period, input int first_r, input bit neg, input bit junk);
    bit exp_abn, old_mode;
    int sw0;
    for (int i = 0; i < NF; i++) x[i] = synth_ecg(i, period, first_r, 1500.0, neg);
    haar_ref(x, r3, r5);
    bd_ref(x, r3, e);
    exp_abn = e.too_few || e.n < 2;
    for (int j = 1; j < e.n; j++)
      if (e.r[j] - e.r[j-1] < int'(rr_min) || e.r[j] - e.r[j-1] > int'(rr_max)) exp_abn = 1'b1;
    n_feat   = 0;
    old_mode = mode_hp;
    sw0      = n_switch;
    repeat (4) @(posedge clk);
    if (junk) repeat (4) send(2000);
    for (int i = 0; i < NF; i++) send(x[i]);
    while (!frame_done) @(posedge clk);
    check(hr_abnormal == exp_abn, $sformatf("frame %0d: hr_abnormal %0b exp %0b", n_frames, hr_abnormal, exp_abn));
    @(posedge clk);
    check(n_feat == (e.too_few ? 0 : e.n), $sformatf("frame %0d: %0d records exp %0d", n_frames, n_feat, e.n));
    check(mode_hp == exp_abn, $sformatf("frame %0d: mode_hp %0b exp %0b", n_frames, mode_hp, exp_abn));
    check((n_switch - sw0) == ((exp_abn != old_mode) ? 1 : 0), $sformatf("frame %0d: mode switch", n_frames));
    if (exp_abn) n_abn++;
    if (e.too_few) n_few++;
    if (exp_abn && !old_mode) n_to_hp++;
    if (!exp_abn && old_mode) n_to_lp++;
    n_frames++;
  endtask

  initial begin
    rst_n = 1'b0;
    enable = 1'b0; agc_done = 1'b0; sample_valid = 1'b0; sample = '0;
    rr_min = 12'd500; rr_max = 12'd1200;
    n_feat = 0; n_bd = 0; n_frames = 0; n_switch = 0; n_to_hp = 0; n_to_lp = 0;
    n_abn = 0; n_few = 0; n_neg_beats = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // no frame is taken before the gain has settled
    enable <= 1'b1;
    repeat (5) send(100);
    check(n_bd == 0, "idle until agc_done");
    agc_done <= 1'b1;
    check(mode_hp == 1'b0, "starts in 8-bit mode");
    run_frame(800, 300, 1'b0, 1'b0);   // normal, stays 8-bit
    run_frame(1300, 600, 1'b0, 1'b0);  // RR above rr_max -> 12-bit
    run_frame(800, 150, 1'b0, 1'b1);   // normal again -> back to 8-bit
    run_frame(5000, 2000, 1'b0, 1'b1); // one beat -> too few
    run_frame(700, 400, 1'b1, 1'b1);   // inverted, normal -> 8-bit
    run_frame(650, 200, 1'b1, 1'b1);   // inverted, normal, no switch
    check(n_bd == n_frames, $sformatf("%0d boundary results for %0d frames", n_bd, n_frames));
    check(n_to_hp == 2 && n_to_lp == 2 && n_switch == 4,
          $sformatf("switches: to 12-bit %0d, to 8-bit %0d, total %0d", n_to_hp, n_to_lp, n_switch));
    check(n_few == 1 && n_abn == 2 && n_neg_beats > 0,
          $sformatf("too-few %0d abnormal %0d inverted beats %0d", n_few, n_abn, n_neg_beats));
    $display("frames %0d, to-12-bit %0d, to-8-bit %0d, too-few %0d, inverted beats %0d",
             n_frames, n_to_hp, n_to_lp, n_few, n_neg_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
