// tb_afe_pga_model: gain and band-pass response of the front-end model.
//
// The model is stepped on every clock (tick = 1), so frequencies are given
// per step at the model's nominal FS = 15.625 kHz. Checks:
//  - pass band: a 10 Hz sine of 1 mV; for each of the 8 gain codes
//    (switch sets from gain_switches) the output amplitude must equal
//    100 x the capacitor-bank ratio (1, 4, 5.5, 7, 8.5, 10, 11.5, 14.5 Cg)
//    within 1 %, and rise strictly with the code;
//  - corners: at 0.25 Hz and at 250 Hz the gain must be 1/sqrt(2) of the
//    pass-band gain within 3 %;
//  - DC: a step of constant input first passes (after the low-pass has
//    risen) and then decays to under 1 % after six high-pass time
//    constants (the band starts at 0.25 Hz).
module tb_afe_pga_model;
  import ecg_pkg::*;

  localparam real FS = 15625.0;
  localparam real PI = 3.14159265358979;

  logic    clk = 1'b0;
  always #5 clk = ~clk;
  logic    rst_n, tick;
  real     vin, vout;
  cap_sw_t sw;

  afe_pga_model dut (.*);

  int checks = 0, failures = 0;
  real ratio_tab [8] = '{1.0, 4.0, 5.5, 7.0, 8.5, 10.0, 11.5, 14.5};
  int  n;          // step counter
  real freq, amp;  // current sine input
  bit  dc_mode;    // constant input dc_level instead of the sine
  real dc_level;

  always @(negedge clk) begin
    n++;
    vin = dc_mode ? dc_level : amp * $sin(2.0 * PI * freq * real'(n) / FS);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real absr(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // output amplitude over the given number of steps
  task automatic measure(input int steps, output real a);
    real mx, mn;
    mx = -1.0e9; mn = 1.0e9;
    repeat (steps) begin
      @(posedge clk);
      #1;
      if (vout > mx) mx = vout;
      if (vout < mn) mn = vout;
    end
    a = (mx - mn) / 2.0;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, prev_gain, g, ref_g;
    rst_n = 1'b0; tick = 1'b1; n = 0; dc_mode = 1'b0; dc_level = 0.0; freq = 10.0; amp = 1.0e-3; vin = 0.0;
    sw = gain_switches(3'd0);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // pass band: let the high-pass settle (6 time constants), then each code
    repeat (60000) @(posedge clk);
    prev_gain = 0.0;
    for (int code = 0; code < 8; code++) begin
      sw = gain_switches(3'(code));
      measure(int'(2.0 * FS / freq), a);
      g = a / amp;
      check(absr(g / (100.0 * ratio_tab[code]) - 1.0) < 0.01,
            $sformatf("code %0d: gain %g exp %g", code, g, 100.0 * ratio_tab[code]));
      check(g > prev_gain, $sformatf("code %0d gain %g not above %g", code, g, prev_gain));
      prev_gain = g;
    end
    ref_g = 100.0 * ratio_tab[7];
    // upper corner
    freq = 250.0;
    repeat (2000) @(posedge clk);
    measure(2000, a);
    check(absr(a / amp / ref_g - 0.7071) < 0.03 * 0.7071,
          $sformatf("250 Hz: relative gain %g", a / amp / ref_g));
    // lower corner
    freq = 0.25;
    n = 0;
    repeat (200000) @(posedge clk);
    measure(int'(FS / freq), a);
    check(absr(a / amp / ref_g - 0.7071) < 0.03 * 0.7071,
          $sformatf("0.25 Hz: relative gain %g", a / amp / ref_g));
    // DC is blocked
    freq = 0.0;
    amp  = 0.0;
    repeat (2000) @(posedge clk);
    begin
      real dc, v0;
      // a constant 1 mV from here on, measured from the output before it
      #1;
      v0 = vout;
      dc = 1.0e-3;
      dc_level = dc;
      dc_mode  = 1'b1;
      repeat (60) @(posedge clk);
      #1;
      check(vout - v0 > 0.9 * dc * ref_g, $sformatf("DC step passes at first: %g", vout - v0));
      repeat (60000) @(posedge clk);
      #1;
      check(absr(vout) < 0.01 * dc * ref_g, $sformatf("DC after 6 time constants: %g", vout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
