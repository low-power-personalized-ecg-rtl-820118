// tb_bd_unit: boundary detection on synthetic ECG frames.
//
// Each case builds a 4096-sample ECG (Gaussian P-QRS-T beats plus a little
// random noise) with a chosen heart period, first R-peak and polarity,
// computes its Haar details, serves both from testbench memories with one
// clock of read latency, runs the unit and compares every field of the
// result with an independent model of the procedure. It also checks that
// the R-peaks found are within a few samples of the planted ones. The cases
// cover: missing and present first/last boundary, inverted ECG, the 7-peak
// store limit (overflow), a single beat (too few peaks) and runs of
// coefficients collapsed by the 50-coefficient gap rule.
module tb_bd_unit;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    start, busy, done;
  logic [CD3_AW-1:0]       cd3_raddr;
  logic signed [CD3_W-1:0] cd3_rdata;
  logic [ADDR_W-1:0]       ecg_raddr;
  logic signed [ECG_W-1:0] ecg_rdata;
  bd_result_t              res;
  logic signed [CD3_W-1:0] min4, threshold;

  bd_unit dut (.*);

  ecg_arr_t x;
  cd3_arr_t r3;
  cd5_arr_t r5;
  always_ff @(posedge clk) begin
    ecg_rdata <= ECG_W'(x[ecg_raddr]);
    cd3_rdata <= CD3_W'(r3[cd3_raddr]);
  end

  int checks = 0, failures = 0;
  int seen_fv0, seen_fv1, seen_lv0, seen_lv1, seen_ovf, seen_few, seen_collapse, seen_neg;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(input int period, input int first_r, input bit neg, input int noise);
    bd_ref_t e;
    int cyc;
    for (int i = 0; i < NF; i++) begin
      x[i] = synth_ecg(i, period, first_r, 1500.0, neg);
      if (noise > 0) x[i] += int'($urandom_range(2 * noise)) - noise;
    end
    haar_ref(x, r3, r5);
    bd_ref(x, r3, e);
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!done);
    check(min4 == CD3_W'(e.min4) && threshold == CD3_W'(e.th),
          $sformatf("P=%0d: min4 %0d/%0d th %0d/%0d", period, min4, e.min4, threshold, e.th));
    check(int'(res.n_peaks) == e.n, $sformatf("P=%0d: n_peaks %0d exp %0d", period, res.n_peaks, e.n));
    check(res.overflow == e.ovf && res.too_few == e.too_few,
          $sformatf("P=%0d: flags ovf %0d too_few %0d", period, res.overflow, res.too_few));
    for (int j = 0; j < e.n && j < 7; j++) begin
      check(int'(res.r_idx[j]) == e.r[j] && int'($signed(res.r_val[j])) == e.rv[j],
            $sformatf("P=%0d: R[%0d] %0d exp %0d", period, j, res.r_idx[j], e.r[j]));
      check(int'(res.t1[j]) == e.t1[j] && int'(res.t2[j]) == e.t2[j],
            $sformatf("P=%0d: pair[%0d] %0d,%0d exp %0d,%0d", period, j, res.t1[j], res.t2[j], e.t1[j], e.t2[j]));
      // planted R-peak positions (cases with a beat in every 1024 samples)
      begin
        int planted = first_r + j * period;
        if (!e.too_few && e.r[0] > first_r + period / 2) planted += period;
        if (period < 1024) check(absi(int'(res.r_idx[j]) - planted) <= 3,
              $sformatf("P=%0d: R[%0d]=%0d planted %0d", period, j, res.r_idx[j], planted));
      end
    end
    if (!e.too_few) begin
      for (int j = 0; j <= e.n; j++)
        check(int'(res.bound[j]) == e.b[j], $sformatf("P=%0d: B[%0d] %0d exp %0d", period, j, res.bound[j], e.b[j]));
      check(res.first_valid == e.fv && res.last_valid == e.lv,
            $sformatf("P=%0d: fv %0d lv %0d", period, res.first_valid, res.last_valid));
    end
    // one pass over cD_L3 for the maxima, one for the comparator, one for
    // the candidate scan, then the per-peak searches
    check(cyc > 3 * NF3 && cyc < 3 * NF3 + 200 + 60 * e.n, $sformatf("P=%0d: %0d cycles", period, cyc));
    if (e.fv) seen_fv1++; else if (!e.too_few) seen_fv0++;
    if (e.lv) seen_lv1++; else if (!e.too_few) seen_lv0++;
    if (e.ovf) seen_ovf++;
    if (e.too_few) seen_few++;
    if (e.n_cand_runs > e.n) seen_collapse++;
    if (neg) seen_neg++;
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    for (int i = 0; i < NF; i++) begin x[i] = 0; end
    for (int i = 0; i < NF3; i++) r3[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_case(800, 300, 1'b0, 3);    // 5 beats, no B0
    run_case(700, 500, 1'b1, 3);    // inverted, B0 present, no last boundary
    run_case(600, 100, 1'b0, 0);    // 7 beats
    run_case(520,  60, 1'b0, 2);    // 8 beats: store overflow
    run_case(5000, 2000, 1'b0, 0);  // one beat
    run_case(900, 650, 1'b1, 4);
    run_case(1000, 420, 1'b0, 4);
    check(seen_fv0 > 0 && seen_fv1 > 0 && seen_lv0 > 0 && seen_lv1 > 0,
          "first/last boundary present and absent cases");
    check(seen_ovf > 0 && seen_few > 0 && seen_neg > 0, "overflow, too-few and inverted cases");
    $display("cases: fv0=%0d fv1=%0d lv0=%0d lv1=%0d ovf=%0d few=%0d collapse=%0d neg=%0d",
             seen_fv0, seen_fv1, seen_lv0, seen_lv1, seen_ovf, seen_few, seen_collapse, seen_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
