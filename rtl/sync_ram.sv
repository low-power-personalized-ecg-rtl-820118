// sync_ram: simple dual-port RAM, one write port and one read port.
//
// A write with we=1 stores wdata at waddr on the rising clock edge. The read
// port is synchronous: rdata holds mem[raddr] one clock after raddr is
// presented, like an FPGA block RAM or a small SRAM macro. Reading an address
// in the same cycle as it is written returns the old contents. The array has
// no reset; every word is written before it is read in this design.
module sync_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 12,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
