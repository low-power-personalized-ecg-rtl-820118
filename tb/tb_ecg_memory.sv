// tb_ecg_memory: fills the ECG, cD_L3 and cD_L5 arrays with random words,
// then reads every word back and checks value and one-clock read latency.
module tb_ecg_memory;
  import ecg_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    ecg_we, cd3_we, cd5_we;
  logic [ADDR_W-1:0]       ecg_waddr, ecg_raddr;
  logic [CD3_AW-1:0]       cd3_waddr, cd3_raddr;
  logic [CD5_AW-1:0]       cd5_waddr, cd5_raddr;
  logic signed [ECG_W-1:0] ecg_wdata, ecg_rdata;
  logic signed [CD3_W-1:0] cd3_wdata, cd3_rdata;
  logic signed [CD5_W-1:0] cd5_wdata, cd5_rdata;

  ecg_memory dut (.*);

  int checks = 0, failures = 0;
  logic [ECG_W-1:0] m_ecg [N_FRAME];
  logic [CD3_W-1:0] m_cd3 [N_FRAME/8];
  logic [CD5_W-1:0] m_cd5 [N_FRAME/32];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ecg_we, cd3_we, cd5_we} = '0;
    {ecg_waddr, ecg_raddr, cd3_waddr, cd3_raddr, cd5_waddr, cd5_raddr} = '0;
    {ecg_wdata, cd3_wdata, cd5_wdata} = '0;
    @(posedge clk);
    for (int i = 0; i < N_FRAME; i++) begin
      m_ecg[i] = ECG_W'($urandom);
      ecg_we <= 1'b1; ecg_waddr <= ADDR_W'(i); ecg_wdata <= m_ecg[i];
      cd3_we <= 1'b0; cd5_we <= 1'b0;
      if (i < N_FRAME/8) begin
        m_cd3[i] = CD3_W'($urandom);
        cd3_we <= 1'b1; cd3_waddr <= CD3_AW'(i); cd3_wdata <= m_cd3[i];
      end
      if (i < N_FRAME/32) begin
        m_cd5[i] = CD5_W'($urandom);
        cd5_we <= 1'b1; cd5_waddr <= CD5_AW'(i); cd5_wdata <= m_cd5[i];
      end
      @(posedge clk);
    end
    {ecg_we, cd3_we, cd5_we} <= '0;
    for (int i = 0; i < N_FRAME; i++) begin
      int j;
      j = int'($urandom_range(N_FRAME - 1));
      ecg_raddr <= ADDR_W'(j);
      cd3_raddr <= CD3_AW'(j / 8);
      cd5_raddr <= CD5_AW'(j / 32);
      @(posedge clk);
      #1;
      check(ecg_rdata == m_ecg[j], $sformatf("ecg[%0d] %h vs %h", j, ecg_rdata, m_ecg[j]));
      check(cd3_rdata == m_cd3[j/8], $sformatf("cd3[%0d]", j/8));
      check(cd5_rdata == m_cd5[j/32], $sformatf("cd5[%0d]", j/32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
