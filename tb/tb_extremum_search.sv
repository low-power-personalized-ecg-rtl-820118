// tb_extremum_search: random max / min / magnitude searches over a random
// memory with many repeated values (to exercise the first-index tie rule);
// checks index, value and the latency of (hi - lo + 1) + 1 clocks from start
// to done.
module tb_extremum_search;
  import ecg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                    start, busy, done;
  search_mode_e            mode;
  logic [ADDR_W-1:0]       lo, hi, rd_addr, best_idx;
  logic signed [CD5_W-1:0] rd_data, best_val;

  extremum_search dut (.*);

  logic signed [CD5_W-1:0] mem [N_FRAME];
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic int mag(int v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; mode = SRCH_MAX; lo = '0; hi = '0;
    for (int i = 0; i < N_FRAME; i++) mem[i] = CD5_W'(int'($urandom_range(40)) - 20);
    mem[100] = -CD5_W'(65536);   // most negative value
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      int l, h, m, ei, cyc;
      l = int'($urandom_range(N_FRAME - 1));
      h = l + int'($urandom_range(300));
      m = int'($urandom_range(2));
      if (t < 3) begin l = 90; h = 110; m = t; end
      if (h > N_FRAME - 1) h = N_FRAME - 1;
      ei = l;
      for (int i = l; i <= h; i++) begin
        if (m == 0 && mem[i] > mem[ei]) ei = i;
        if (m == 1 && mem[i] < mem[ei]) ei = i;
        if (m == 2 && mag(int'(mem[i])) > mag(int'(mem[ei]))) ei = i;
      end
      start <= 1'b1; mode <= search_mode_e'(m); lo <= ADDR_W'(l); hi <= ADDR_W'(h);
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!done);
      check(int'(best_idx) == ei && best_val == mem[ei],
            $sformatf("mode %0d [%0d,%0d]: idx %0d exp %0d", m, l, h, best_idx, ei));
      check(cyc == h - l + 3, $sformatf("latency %0d exp %0d", cyc, h - l + 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
