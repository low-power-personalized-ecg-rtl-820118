// tb_clu: control sequence and heart-rate based resolution switching.
//
// The testbench offers a new sample every clock and plays the roles of the
// DWT core, boundary detection and feature extraction (pulsing their done
// signals and supplying R-peak positions). It checks that nothing is stored
// before the AGC has finished, that each frame writes exactly N samples to
// consecutive addresses starting with the right sample, the order
// dwt start -> bd_start -> fe_start -> frame_done, fe_active, and the
// mode_hp / mode_switch / hr_abnormal outputs for normal, fast, normal and
// too-few-peaks frames, including the DISCARD samples dropped after each
// resolution change.
module tb_clu;
  import ecg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    enable, agc_done, sample_valid;
  logic signed [ECG_W-1:0] sample;
  logic [ADDR_W-1:0]       rr_min, rr_max;
  logic                    ecg_we, dwt_start, dwt_frame_done;
  logic [ADDR_W-1:0]       ecg_waddr;
  logic signed [ECG_W-1:0] ecg_wdata;
  logic                    bd_start, bd_done, fe_start, fe_done, fe_active;
  bd_result_t              bd;
  logic                    mode_hp, mode_switch, hr_abnormal, frame_done;

  clu dut (.*);

  int checks = 0, failures = 0;
  int wr_in_frame, starts, bd_starts, fe_starts, switches, exp_discard;
  logic [ECG_W-1:0] expect_first;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", msg);
    end
  endtask

  // sample source: a counter, one sample per clock
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sample <= '0;
    else        sample <= sample + 1'b1;
  assign sample_valid = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (mode_switch) exp_discard = 4;
    if (dwt_start) begin
      starts++;
      expect_first = ECG_W'(sample + 1 + ECG_W'(exp_discard));
      exp_discard  = 0;
      wr_in_frame  = 0;
    end
    if (ecg_we) begin
      check(agc_done, "write before the AGC finished");
      check(int'(ecg_waddr) == wr_in_frame, $sformatf("address %0d exp %0d", ecg_waddr, wr_in_frame));
      if (wr_in_frame == 0)
        check(ecg_wdata == expect_first, $sformatf("first sample %0d exp %0d", ecg_wdata, expect_first));
      wr_in_frame++;
    end
    if (bd_start)    bd_starts++;
    if (fe_start)    fe_starts++;
    if (mode_switch) switches++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input int idx, input int rr, input int npk, input bit exp_abn);
    int b0, f0, s0;
    bit old_mode;
    wait (starts == idx + 1);
    b0 = bd_starts;
    f0 = fe_starts;
    s0 = switches;
    old_mode = mode_hp;
    wait (wr_in_frame == N_FRAME);
    check(bd_starts == b0, "bd_start before the DWT finished");
    repeat (6) @(posedge clk);
    dwt_frame_done <= 1'b1;
    @(posedge clk);
    dwt_frame_done <= 1'b0;
    wait (bd_starts == b0 + 1);
    bd = '0;
    bd.n_peaks = NPK_W'(npk);
    bd.too_few = (npk < 2);
    for (int j = 0; j < MAX_PEAKS; j++) bd.r_idx[j] = ADDR_W'(100 + j * rr);
    repeat (10) @(posedge clk);
    check(fe_starts == f0, "fe_start before bd_done");
    bd_done <= 1'b1;
    @(posedge clk);
    bd_done <= 1'b0;
    wait (fe_starts == f0 + 1);
    @(posedge clk);
    check(fe_active, "fe_active during feature extraction");
    repeat (10) @(posedge clk);
    fe_done <= 1'b1;
    @(posedge clk);
    fe_done <= 1'b0;
    @(posedge frame_done);
    repeat (2) @(posedge clk);
    check(hr_abnormal == exp_abn, $sformatf("RR=%0d: hr_abnormal %0d", rr, hr_abnormal));
    check(mode_hp == exp_abn, $sformatf("RR=%0d: mode_hp %0d", rr, mode_hp));
    check((switches - s0) == int'(old_mode != exp_abn), $sformatf("RR=%0d: mode switches", rr));
  endtask

  initial begin
    rst_n = 1'b0;
    enable = 1'b1;
    agc_done = 1'b0;
    rr_min = 12'd600;
    rr_max = 12'd1000;
    dwt_frame_done = 1'b0;
    bd_done = 1'b0;
    fe_done = 1'b0;
    bd = '0;
    exp_discard = 0;
    wr_in_frame = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (50) @(posedge clk);
    check(starts == 0 && !ecg_we, "no frame before agc_done");
    agc_done <= 1'b1;
    frame(0, 800, 5, 1'b0);   // normal: stay at 8 bits
    frame(1, 500, 7, 1'b1);   // too fast: switch to 12 bits
    frame(2, 900, 4, 1'b0);   // normal again: back to 8 bits
    frame(3, 800, 1, 1'b1);   // one peak only: abnormal
    wait (starts == 5 && wr_in_frame == 10);
    check(starts == 5, $sformatf("%0d frames started", starts));
    check(switches == 3, $sformatf("%0d switches", switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
