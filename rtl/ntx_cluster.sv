// ntx_cluster: one NTX processing cluster.
//
// One processor core controls NUM_NTX = 8 NTX coprocessors. All of them,
// and the DMA engine, share a 128 kB tightly coupled data memory (TCDM) of
// 32 banks through the logarithmic interconnect. The DMA moves tiles
// between the SoC port and the TCDM (double buffering) while the NTX
// compute. Masters of the interconnect, in port order: the processor (via
// the cluster bus), NTX k port 0/1 at 1+2k / 2+2k, then the DMA's two
// ports.
// The processor core itself (a RV32IMC core with its instruction cache) is
// not part of this RTL: its data port is core_req_i/core_rsp_o, and the
// NTX and DMA interrupts are brought out for it. The SoC interconnect is
// likewise outside: the DMA's 64-bit port (dma_ext_*) and the cluster
// bus's port for other addresses (soc_*) lead to it.
// Timing: a single clock for the whole cluster (the architecture runs the
// NTX at twice the cluster clock).
module ntx_cluster
  import ntx_pkg::*;
#(
  parameter int unsigned NUM_NTX    = 8,
  parameter int unsigned NUM_BANKS  = 32,
  parameter int unsigned TCDM_BYTES = 131072
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // processor data port
  input  tcdm_req_t          core_req_i,
  output tcdm_rsp_t          core_rsp_o,
  // towards the SoC interconnect
  output tcdm_req_t          soc_req_o,
  input  tcdm_rsp_t          soc_rsp_i,
  output ext_req_t           dma_ext_req_o,
  input  ext_rsp_t           dma_ext_rsp_i,
  // interrupts and status for the processor
  output logic [NUM_NTX-1:0] ntx_irq_o,
  output logic [NUM_NTX-1:0] ntx_busy_o,
  output logic               dma_done_o,
  output logic               dma_busy_o
);
  localparam int unsigned NM = 1 + 2 * NUM_NTX + 2;
  localparam int unsigned BANK_WORDS = TCDM_BYTES / (4 * NUM_BANKS);

  tcdm_req_t [NM-1:0]      x_req;
  tcdm_rsp_t [NM-1:0]      x_rsp;
  tcdm_req_t [NUM_NTX-1:0] ntx_cfg_req;
  tcdm_rsp_t [NUM_NTX-1:0] ntx_cfg_rsp;
  tcdm_req_t               dma_cfg_req;
  tcdm_rsp_t               dma_cfg_rsp;

  ntx_cluster_bus #(.NUM_NTX(NUM_NTX), .TCDM_BYTES(TCDM_BYTES)) i_bus (
    .clk_i, .rst_ni, .core_req_i, .core_rsp_o,
    .tcdm_req_o(x_req[0]), .tcdm_rsp_i(x_rsp[0]),
    .ntx_req_o(ntx_cfg_req), .ntx_rsp_i(ntx_cfg_rsp),
    .dma_req_o(dma_cfg_req), .dma_rsp_i(dma_cfg_rsp),
    .soc_req_o, .soc_rsp_i
  );

  for (genvar k = 0; k < NUM_NTX; k++) begin : gen_ntx
    ntx i_ntx (
      .clk_i, .rst_ni,
      .reg_req_i(ntx_cfg_req[k]), .reg_rsp_o(ntx_cfg_rsp[k]),
      .tcdm_req_o(x_req[2*k+2 : 2*k+1]), .tcdm_rsp_i(x_rsp[2*k+2 : 2*k+1]),
      .irq_o(ntx_irq_o[k]), .busy_o(ntx_busy_o[k])
    );
  end

  ntx_dma i_dma (
    .clk_i, .rst_ni, .cfg_req_i(dma_cfg_req), .cfg_rsp_o(dma_cfg_rsp),
    .tcdm_req_o(x_req[NM-1 : NM-2]), .tcdm_rsp_i(x_rsp[NM-1 : NM-2]),
    .ext_req_o(dma_ext_req_o), .ext_rsp_i(dma_ext_rsp_i),
    .done_o(dma_done_o), .busy_o(dma_busy_o)
  );

  ntx_tcdm_xbar #(.NUM_MASTERS(NM), .NUM_BANKS(NUM_BANKS), .BANK_WORDS(BANK_WORDS)) i_xbar (
    .clk_i, .rst_ni, .req_i(x_req), .rsp_o(x_rsp)
  );
endmodule
