// tb_agc_decoder: automatic gain search against a model of the signal level.
//
// The level seen by the detectors is amplitude * (total bank capacitance /
// Cg), computed here from the switch outputs with the capacitor values 3, 6
// and 4.5 Cg, so the switch decoding is checked too. For several input
// amplitudes the final gain code must be the first code whose level reaches
// the lower threshold, one code lower after an overshoot, or the end of the
// ladder. S1 must stay low during the search, rise once, and the search must
// take one settling period (+ decide clock) per visited code.
module tb_agc_decoder;
  import ecg_pkg::*;

  localparam int SETTLE = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic       start, vo1, vo2, s1;
  logic [2:0] gain_code;
  cap_sw_t    sw;

  agc_decoder #(.SETTLE_CYCLES(SETTLE)) dut (.*);

  real amp;
  real level;
  real ratio_tab [8] = '{1.0, 4.0, 5.5, 7.0, 8.5, 10.0, 11.5, 14.5};

  always_comb begin
    level = amp * (1.0 + (sw.s3 ? 3.0 : 0.0) + (sw.s4 ? 6.0 : 0.0) + (sw.s5 ? 4.5 : 0.0));
    vo1   = level > 0.3;
    vo2   = level > 0.6;
  end

  int checks = 0, failures = 0;
  int n_up, n_back, n_top;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real a);
    int exp_code, visited, cyc;
    exp_code = 7; visited = 8; cyc = 0;
    for (int c = 0; c < 8; c++) begin
      if (a * ratio_tab[c] > 0.6) begin
        exp_code = (c > 0) ? c - 1 : 0; visited = c + 1;
        if (c > 0) n_back++;
        break;
      end
      if (a * ratio_tab[c] > 0.3) begin exp_code = c; visited = c + 1; break; end
    end
    if (visited == 8 && exp_code == 7) n_top++;
    if (visited > 1) n_up++;
    amp = a;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    do begin
      @(posedge clk);
      cyc++;
      check(cyc < 2 || gain_code != 3'd7 || visited == 8 || s1, "runaway gain");
    end while (!s1);
    check(int'(gain_code) == exp_code, $sformatf("amp %f: code %0d exp %0d", a, gain_code, exp_code));
    check(sw == gain_switches(gain_code), "switch decode");
    // one settling period plus one decide clock per code, S1 one clock later
    check(cyc == visited * (SETTLE + 1) + 1,
          $sformatf("amp %f: %0d cycles exp %0d", a, cyc, visited * (SETTLE + 1) + 1));
    repeat (5) @(posedge clk);
    check(s1 && int'(gain_code) == exp_code, "S1 and gain hold after the search");
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    amp = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2 * SETTLE + 10) @(posedge clk);
    run(0.08);    // in range at code 1
    run(0.2);     // overshoot at code 1: back to 0
    run(0.05);    // code 3
    run(0.7);     // already above range at code 0
    run(0.01);    // too small for the whole ladder
    run(0.025);   // reaches range only at the last code
    // capacitance ladder is strictly increasing
    for (int c = 1; c < 8; c++) begin
      cap_sw_t a0, a1;
      real ca, cb;
      a0 = gain_switches(3'(c - 1));
      a1 = gain_switches(3'(c));
      ca = 1.0 + (a0.s3 ? 3.0 : 0.0) + (a0.s4 ? 6.0 : 0.0) + (a0.s5 ? 4.5 : 0.0);
      cb = 1.0 + (a1.s3 ? 3.0 : 0.0) + (a1.s4 ? 6.0 : 0.0) + (a1.s5 ? 4.5 : 0.0);
      check(cb > ca && cb == ratio_tab[c], $sformatf("ladder step %0d", c));
    end
    check(n_up > 0 && n_back > 0 && n_top > 0, "step-up, step-back and end-of-ladder cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
