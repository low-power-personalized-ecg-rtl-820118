// tb_peak_level_detector_model: peak hold and the two level outputs.
//
// A sequence of input values (both polarities) is applied with and without
// the sampling tick. A reference peak (largest |vin| seen on a tick since
// reset) is kept; after every step vo1 must equal peak > 0.3 and vo2 must
// equal peak > 0.6. Reset must clear the held peak.
module tb_peak_level_detector_model;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, tick, vo1, vo2;
  real  vin;

  peak_level_detector_model dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real peak, mag;
    int  seed;
    seed  = 7;
    rst_n = 1'b0; tick = 1'b0; vin = 0.0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int run = 0; run < 4; run++) begin
      peak = 0.0;
      for (int i = 0; i < 400; i++) begin
        // slowly growing amplitude so all three output states occur
        vin  = (real'($urandom(seed + i + 1000 * run) % 2001) / 1000.0 - 1.0) * (i + 1) / 400.0;
        tick = ($urandom % 4) != 0;
        seed = seed + 3;
        mag  = (vin < 0.0) ? -vin : vin;
        if (tick && mag > peak) peak = mag;
        @(posedge clk);
        #1;
        check(vo1 == (peak > 0.3), $sformatf("run %0d step %0d: vo1 %0b peak %g", run, i, vo1, peak));
        check(vo2 == (peak > 0.6), $sformatf("run %0d step %0d: vo2 %0b peak %g", run, i, vo2, peak));
      end
      check(vo1 && vo2, "final peak above both levels");
      rst_n = 1'b0;
      #1;
      check(!vo1 && !vo2, "reset clears the peak");
      @(posedge clk);
      rst_n = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
