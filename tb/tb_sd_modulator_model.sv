// tb_sd_modulator_model: sigma-delta model output density and power-down.
//
// For a set of DC inputs in both modes the modulator runs 4096 steps (with
// idle clocks between steps); the density of ones must be (1 + vin)/2
// within 1 %, which is what the decimator relies on. The loop is also
// checked against a direct evaluation of its difference equations, and
// with pwr_up low the output must stay 0 and steps must have no effect.
module tb_sd_modulator_model;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, pwr_up, step, mode_hp, q;
  real  vin;

  sd_modulator_model dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit hp, input real x);
    int  ones, mism;
    real r1, r2, y, dens, err;
    bit  rq;
    // restart the loop from rest
    pwr_up <= 1'b0;
    @(posedge clk);
    pwr_up  <= 1'b1;
    mode_hp <= hp;
    vin     <= x;
    @(posedge clk);
    ones = 0; mism = 0;
    r1 = 0.0; r2 = 0.0; rq = 1'b0;
    for (int n = 0; n < 4096; n++) begin
      step <= 1'b1;
      @(posedge clk);
      step <= 1'b0;
      y = rq ? 1.0 : -1.0;
      if (hp) begin
        r2 = r2 + 0.5 * (r1 - y);
        r1 = r1 + 0.5 * (x - y);
        // r2 uses the old r1: evaluate in the same order as the model
        rq = r2 >= 0.0;
      end else begin
        r1 = r1 + (x - y);
        rq = r1 >= 0.0;
      end
      #1;
      if (q !== rq) mism++;
      ones += q;
      @(posedge clk);
    end
    dens = real'(ones) / 4096.0;
    err  = dens - (1.0 + x) / 2.0;
    if (err < 0.0) err = -err;
    check(err < 0.01, $sformatf("hp=%0d vin=%g: density %g exp %g", hp, x, dens, (1.0 + x) / 2.0));
    check(mism == 0, $sformatf("hp=%0d vin=%g: %0d steps differ from the equations", hp, x, mism));
  endtask

  initial begin
    real xs [9] = '{0.0, 0.1, -0.1, 0.35, -0.35, 0.6, -0.6, 0.05, -0.72};
    rst_n = 1'b0; pwr_up = 1'b0; step = 1'b0; mode_hp = 1'b0; vin = 0.0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (xs[i]) begin
      run(1'b0, xs[i]);
      run(1'b1, xs[i]);
    end
    // power-down: no activity
    pwr_up <= 1'b0;
    vin    <= 0.5;
    for (int n = 0; n < 200; n++) begin
      step <= 1'b1;
      @(posedge clk);
      #1;
      check(q == 1'b0, "q held at 0 while powered down");
    end
    step <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
