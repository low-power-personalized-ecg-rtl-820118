// tb_cic_decimator: decimation filter output levels and rate in both modes.
//
// The input is a periodic bit pattern of k ones followed by 16-k zeros.
// Every 16-bit window then holds exactly k ones, so once the filter has
// filled, each output must equal 256*k - 2048 in both modes (12-bit: 16^3*k/16
// - 2048; 8-bit: (16^2*k/16 - 128) << 4), saturated at the top. One output
// must appear per 16 input bits. The mode is changed with a clear, and a
// disabled filter must produce nothing.
module tb_cic_decimator;
  import ecg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    en, clear, mode_hp, in_valid, in_bit, out_valid;
  logic signed [ECG_W-1:0] out_sample;

  cic_decimator dut (.*);

  int checks = 0, failures = 0;
  int n_out;
  always @(posedge clk) if (rst_n && out_valid) n_out++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit hp, input int k);
    int exp_v, n0, seen;
    exp_v = 256 * k - 2048;
    if (hp && exp_v > 2047) exp_v = 2047;
    if (!hp && exp_v > 2032) exp_v = 2032;
    mode_hp <= hp;
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    n0 = n_out;
    seen = 0;
    for (int rep = 0; rep < 12; rep++) begin
      for (int b = 0; b < 16; b++) begin
        in_valid <= 1'b1;
        in_bit   <= (b < k);
        @(posedge clk);
        in_valid <= 1'b0;
        @(posedge clk);
        @(posedge clk);
        if (out_valid) begin
          seen++;
          if (seen > 4)
            check(int'(out_sample) == exp_v,
                  $sformatf("hp=%0d k=%0d: out %0d exp %0d", hp, k, out_sample, exp_v));
          if (!hp) check(out_sample[3:0] == 4'd0, "8-bit sample low bits");
        end
      end
    end
    check(n_out - n0 inside {11, 12}, $sformatf("hp=%0d k=%0d: %0d outputs for 192 bits", hp, k, n_out - n0));
  endtask

  initial begin
    rst_n = 1'b0;
    en = 1'b1; clear = 1'b0; mode_hp = 1'b1; in_valid = 1'b0; in_bit = 1'b0;
    n_out = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k <= 16; k += 3) begin
      run(1'b1, k);
      run(1'b0, k);
    end
    run(1'b1, 16);
    run(1'b0, 16);
    run(1'b1, 8);
    // disabled filter
    en <= 1'b0;
    repeat (2) @(posedge clk);
    begin
      int n0;
      n0 = n_out;
      for (int b = 0; b < 64; b++) begin
        in_valid <= 1'b1; in_bit <= b[0];
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (3) @(posedge clk);
      check(n_out == n0, "no output while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
