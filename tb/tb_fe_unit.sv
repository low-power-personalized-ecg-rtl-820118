// tb_fe_unit: feature extraction on synthetic ECG frames.
//
// For each case the testbench builds the frame, its Haar details and the
// reference boundary result, hands that result to the unit, serves the ECG
// and cD_L5 from testbench memories (one clock read latency) and compares
// every field of every emitted beat record with an independent model of the
// procedure. Upright and inverted ECGs exercise both Q/S rules (minimum for
// a positive R-peak, maximum for a negative one). A frame with too few
// peaks must produce no records.
module tb_fe_unit;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    start, busy, done, feat_valid;
  bd_result_t              bd;
  logic [ADDR_W-1:0]       ecg_raddr;
  logic signed [ECG_W-1:0] ecg_rdata;
  logic [CD5_AW-1:0]       cd5_raddr;
  logic signed [CD5_W-1:0] cd5_rdata;
  feat_t                   feat;

  fe_unit dut (.*);

  ecg_arr_t x;
  cd3_arr_t r3;
  cd5_arr_t r5;
  always_ff @(posedge clk) begin
    ecg_rdata <= ECG_W'(x[ecg_raddr]);
    cd5_rdata <= CD5_W'(r5[cd5_raddr]);
  end

  int checks = 0, failures = 0;
  int n_feat, n_pos, n_neg;
  bd_ref_t e;

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

  always @(posedge clk) if (rst_n && feat_valid) begin
    fe_ref_t f;
    int k;
    k = int'(feat.beat);
    fe_ref(x, r5, e, k, 3, f);
    check(k == n_feat, $sformatf("beat number %0d exp %0d", k, n_feat));
    check(int'(feat.r_idx) == e.r[k] && int'(feat.b_start) == e.b[k] && int'(feat.b_end) == e.b[k+1],
          $sformatf("beat %0d: R/B", k));
    check(int'(feat.qrs_on) == f.qrs_on && int'(feat.qrs_off) == f.qrs_off,
          $sformatf("beat %0d: QRS %0d-%0d exp %0d-%0d", k, feat.qrs_on, feat.qrs_off, f.qrs_on, f.qrs_off));
    check(int'(feat.q_idx) == f.q && int'(feat.s_idx) == f.s,
          $sformatf("beat %0d: Q %0d S %0d exp %0d %0d", k, feat.q_idx, feat.s_idx, f.q, f.s));
    check(int'(feat.p_on) == f.p_on && int'(feat.p_peak) == f.p_peak && int'(feat.p_off) == f.p_off,
          $sformatf("beat %0d: P %0d/%0d/%0d exp %0d/%0d/%0d", k, feat.p_on, feat.p_peak, feat.p_off,
                    f.p_on, f.p_peak, f.p_off));
    check(int'(feat.t_on) == f.t_on && int'(feat.t_peak) == f.t_peak && int'(feat.t_off) == f.t_off,
          $sformatf("beat %0d: T %0d/%0d/%0d exp %0d/%0d/%0d", k, feat.t_on, feat.t_peak, feat.t_off,
                    f.t_on, f.t_peak, f.t_off));
    if (x[e.r[k]] >= 0) n_pos++; else n_neg++;
    n_feat++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int period, input int first_r, input bit neg, input int noise);
    for (int i = 0; i < NF; i++) begin
      x[i] = synth_ecg(i, period, first_r, 1500.0, neg);
      if (noise > 0) x[i] += int'($urandom_range(2 * noise)) - noise;
    end
    haar_ref(x, r3, r5);
    bd_ref(x, r3, e);
    n_feat = 0;
    bd <= to_bd_result(e);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do @(posedge clk); while (!done);
    @(posedge clk);
    check(n_feat == (e.too_few ? 0 : e.n), $sformatf("P=%0d: %0d records exp %0d", period, n_feat, e.n));
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    bd = '0;
    for (int i = 0; i < NF; i++) x[i] = 0;
    for (int i = 0; i < NF5; i++) r5[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_case(800, 300, 1'b0, 3);
    run_case(700, 500, 1'b1, 3);
    run_case(600, 100, 1'b0, 0);
    run_case(950, 800, 1'b1, 2);
    run_case(5000, 2000, 1'b0, 0);
    run_case(5000, 2000, 1'b0, 0);
    check(n_pos > 0 && n_neg > 0, $sformatf("positive (%0d) and negative (%0d) R-peaks", n_pos, n_neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
