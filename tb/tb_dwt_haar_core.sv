// tb_dwt_haar_core: checks every level-3 and level-5 Haar detail of two
// frames of random 12-bit samples against a direct array computation.
// Samples are fed with irregular gaps; the coefficient indices, the count
// per frame and the frame_done pulse are checked too.
module tb_dwt_haar_core;
  import ecg_pkg::*;
  import ecg_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    frame_start, in_valid;
  logic signed [ECG_W-1:0] in_sample;
  logic                    cd3_valid, cd5_valid, frame_done;
  logic [CD3_AW-1:0]       cd3_idx;
  logic [CD5_AW-1:0]       cd5_idx;
  logic signed [CD3_W-1:0] cd3;
  logic signed [CD5_W-1:0] cd5;

  dwt_haar_core dut (.*);

  int checks = 0, failures = 0;
  ecg_arr_t x;
  cd3_arr_t r3;
  cd5_arr_t r5;
  int n3, n5, ndone, gap;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cd3_valid) begin
      check(int'(cd3_idx) == n3 && int'(cd3) == r3[n3],
            $sformatf("cd3[%0d] idx %0d got %0d exp %0d", n3, cd3_idx, cd3, r3[n3]));
      n3++;
    end
    if (cd5_valid) begin
      check(int'(cd5_idx) == n5 && int'(cd5) == r5[n5],
            $sformatf("cd5[%0d] idx %0d got %0d exp %0d", n5, cd5_idx, cd5, r5[n5]));
      n5++;
    end
    if (frame_done) ndone++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    frame_start = 1'b0;
    in_valid = 1'b0;
    in_sample = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < NF; i++)
        x[i] = (f == 0) ? int'($urandom_range(4095)) - 2048
                        : synth_ecg(i, 777, 123, 1500.0, 1'b0);
      haar_ref(x, r3, r5);
      n3 = 0; n5 = 0; ndone = 0;
      @(posedge clk);
      frame_start <= 1'b1;
      @(posedge clk);
      frame_start <= 1'b0;
      for (int i = 0; i < NF; i++) begin
        in_valid  <= 1'b1;
        in_sample <= ECG_W'(x[i]);
        @(posedge clk);
        gap = int'($urandom_range(2));
        if (gap > 0) begin
          in_valid <= 1'b0;
          repeat (gap) @(posedge clk);
        end
      end
      in_valid <= 1'b0;
      repeat (20) @(posedge clk);
      check(n3 == NF3, $sformatf("frame %0d: %0d cd3 coefficients", f, n3));
      check(n5 == NF5, $sformatf("frame %0d: %0d cd5 coefficients", f, n5));
      check(ndone == 1, $sformatf("frame %0d: %0d frame_done pulses", f, ndone));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
