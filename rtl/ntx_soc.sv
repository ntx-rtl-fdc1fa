// ntx_soc: NTX processing clusters on the logic base of a memory cube.
//
// NUM_CLUSTERS copies of ntx_cluster (each 8 NTX, 128 kB TCDM, DMA, cluster
// bus), the shared L2 memory (ntx_l2) and the SoC interconnect
// (ntx_soc_interconnect) that joins them to NUM_PORTS 256-bit master ports
// of the cube's main interconnect. Cluster c uses interconnect masters 2c
// (its DMA, 64 bit) and 2c+1 (its processor's off-cluster accesses, 32 bit,
// carried in the upper or lower half of a 64-bit access by address bit 2).
// The processors themselves are not part of this RTL: each cluster's core
// data port is a port of this module. The default of 16 clusters is the
// small configuration of the architecture ("NTX 16": 16 clusters, 1 core
// and 8 NTX per cluster); 64 gives the big one.
// Interfaces: core_req_i/core_rsp_o per cluster (32-bit, request/grant,
// data one cycle after the grant for cluster-local targets, later for L2
// and the cube), lob_req_o/lob_rsp_i towards the cube (in-order answers,
// any latency), interrupts and status per cluster.
// All of it runs on one clock here; the number of cube ports is a choice of
// this design (the architecture leaves it open as p).
module ntx_soc
  import ntx_pkg::*;
#(
  parameter int unsigned NUM_CLUSTERS = 16,
  parameter int unsigned NUM_PORTS    = 4,
  parameter int unsigned L2_BYTES     = 131072
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  tcdm_req_t [NUM_CLUSTERS-1:0]      core_req_i,
  output tcdm_rsp_t [NUM_CLUSTERS-1:0]      core_rsp_o,
  output lob_req_t  [NUM_PORTS-1:0]         lob_req_o,
  input  lob_rsp_t  [NUM_PORTS-1:0]         lob_rsp_i,
  output logic      [NUM_CLUSTERS-1:0][7:0] ntx_irq_o,
  output logic      [NUM_CLUSTERS-1:0][7:0] ntx_busy_o,
  output logic      [NUM_CLUSTERS-1:0]      dma_done_o,
  output logic      [NUM_CLUSTERS-1:0]      dma_busy_o
);
  localparam int unsigned NM = 2 * NUM_CLUSTERS;

  ext_req_t [NM-1:0] m_req;
  ext_rsp_t [NM-1:0] m_rsp;
  ext_req_t          l2_req;
  ext_rsp_t          l2_rsp;

  for (genvar c = 0; c < NUM_CLUSTERS; c++) begin : gen_cl
    tcdm_req_t soc_req;
    tcdm_rsp_t soc_rsp;
    logic      hi_q;

    ntx_cluster i_cluster (
      .clk_i, .rst_ni,
      .core_req_i(core_req_i[c]), .core_rsp_o(core_rsp_o[c]),
      .soc_req_o(soc_req), .soc_rsp_i(soc_rsp),
      .dma_ext_req_o(m_req[2*c]), .dma_ext_rsp_i(m_rsp[2*c]),
      .ntx_irq_o(ntx_irq_o[c]), .ntx_busy_o(ntx_busy_o[c]),
      .dma_done_o(dma_done_o[c]), .dma_busy_o(dma_busy_o[c])
    );

    // 32-bit processor accesses as 64-bit SoC accesses
    always_comb begin
      m_req[2*c+1].req   = soc_req.req;
      m_req[2*c+1].addr  = soc_req.addr;
      m_req[2*c+1].we    = soc_req.we;
      m_req[2*c+1].be    = soc_req.addr[2] ? {soc_req.be, 4'b0} : {4'b0, soc_req.be};
      m_req[2*c+1].wdata = {soc_req.wdata, soc_req.wdata};
    end

    always_comb begin
      soc_rsp.gnt    = m_rsp[2*c+1].gnt;
      soc_rsp.rvalid = m_rsp[2*c+1].rvalid;
      soc_rsp.rdata  = hi_q ? m_rsp[2*c+1].rdata[63:32] : m_rsp[2*c+1].rdata[31:0];
    end

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni)                         hi_q <= 1'b0;
      else if (soc_req.req && soc_rsp.gnt) hi_q <= soc_req.addr[2];
    end
  end

  ntx_soc_interconnect #(
    .NUM_MASTERS(NM), .NUM_PORTS(NUM_PORTS), .L2_BYTES(L2_BYTES)
  ) i_ic (
    .clk_i, .rst_ni,
    .req_i(m_req), .rsp_o(m_rsp),
    .l2_req_o(l2_req), .l2_rsp_i(l2_rsp),
    .lob_req_o, .lob_rsp_i
  );

  ntx_l2 #(.BYTES(L2_BYTES)) i_l2 (
    .clk_i, .rst_ni, .req_i(l2_req), .rsp_o(l2_rsp)
  );
endmodule
