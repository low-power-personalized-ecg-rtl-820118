// ecg_memory: frame memory for the ECG samples and their wavelet coefficients.
//
// Three arrays, each with one write and one synchronous read port (data one
// clock after the address):
//   ecg : N samples of ECG_W bits           (4096 x 12)
//   cd3 : N/8 level-3 detail coefficients   (512 x 15)
//   cd5 : N/32 level-5 detail coefficients  (128 x 17)
// The frame length and the two coefficient sets are those of the
// boundary-detection and feature-extraction method; keeping them in one
// block-RAM style memory follows its FPGA implementation. Port arrangement
// and read latency are this design's choices.
module ecg_memory
  import ecg_pkg::*;
#(
  parameter int unsigned N = N_FRAME
) (
  input  logic                    clk,
  // ECG samples
  input  logic                    ecg_we,
  input  logic [ADDR_W-1:0]       ecg_waddr,
  input  logic signed [ECG_W-1:0] ecg_wdata,
  input  logic [ADDR_W-1:0]       ecg_raddr,
  output logic signed [ECG_W-1:0] ecg_rdata,
  // level-3 detail coefficients
  input  logic                    cd3_we,
  input  logic [CD3_AW-1:0]       cd3_waddr,
  input  logic signed [CD3_W-1:0] cd3_wdata,
  input  logic [CD3_AW-1:0]       cd3_raddr,
  output logic signed [CD3_W-1:0] cd3_rdata,
  // level-5 detail coefficients
  input  logic                    cd5_we,
  input  logic [CD5_AW-1:0]       cd5_waddr,
  input  logic signed [CD5_W-1:0] cd5_wdata,
  input  logic [CD5_AW-1:0]       cd5_raddr,
  output logic signed [CD5_W-1:0] cd5_rdata
);
  initial assert (N <= N_FRAME && N % 1024 == 0)
    else $error("ecg_memory: N must be a multiple of 1024 and at most %0d", N_FRAME);

  sync_ram #(.DEPTH(N), .WIDTH(ECG_W), .AW(ADDR_W)) u_ecg (
    .clk, .we(ecg_we), .waddr(ecg_waddr), .wdata(ecg_wdata),
    .raddr(ecg_raddr), .rdata(ecg_rdata));

  sync_ram #(.DEPTH(N/8), .WIDTH(CD3_W), .AW(CD3_AW)) u_cd3 (
    .clk, .we(cd3_we), .waddr(cd3_waddr), .wdata(cd3_wdata),
    .raddr(cd3_raddr), .rdata(cd3_rdata));

  sync_ram #(.DEPTH(N/32), .WIDTH(CD5_W), .AW(CD5_AW)) u_cd5 (
    .clk, .we(cd5_we), .waddr(cd5_waddr), .wdata(cd5_wdata),
    .raddr(cd5_raddr), .rdata(cd5_rdata));
endmodule
