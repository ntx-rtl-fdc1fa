// ntx_cluster_bus: routes the processor's data accesses inside the cluster.
//
// One 32-bit master (the processor's load/store port) reaches three kinds
// of targets, selected by address: the TCDM window (TCDM_BASE, TCDM_BYTES)
// through a port of the TCDM interconnect; the peripheral window at
// PERIPH_BASE, where NTX k's registers sit at PERIPH_BASE + k*0x100 and the
// DMA's registers at PERIPH_BASE + 0x1000; everything else goes out to the
// SoC port. The request is forwarded to exactly one target and its gnt is
// returned; the target of a granted request is remembered until its answer
// (rvalid/rdata) arrives, one cycle later for the cluster's own targets and
// any number of cycles later from the SoC. One access is outstanding at a
// time: a new request is forwarded in the cycle the answer arrives at the
// earliest.
// The address map is a choice of this design; the architecture shows the
// cluster bus between processor, DMA, TCDM and SoC interconnect.
// Lint note: when the cluster sits inside the SoC, a lint tool may report a
// circular combinational path through 'go'. There is no such path bit by
// bit: 'go' reads only the SoC port's rvalid, which the SoC interconnect
// takes from its targets' registered answers, while the SoC's gnt (which
// does depend on this request) feeds only core_rsp_o.gnt and the flops.
// The report comes from the tool treating the SoC's packed response array
// as a single signal, so the warning stands.
module ntx_cluster_bus
  import ntx_pkg::*;
#(
  parameter int unsigned NUM_NTX    = 8,
  parameter int unsigned TCDM_BYTES = 131072
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  tcdm_req_t               core_req_i,
  output tcdm_rsp_t               core_rsp_o,
  output tcdm_req_t               tcdm_req_o,
  input  tcdm_rsp_t               tcdm_rsp_i,
  output tcdm_req_t [NUM_NTX-1:0] ntx_req_o,
  input  tcdm_rsp_t [NUM_NTX-1:0] ntx_rsp_i,
  output tcdm_req_t               dma_req_o,
  input  tcdm_rsp_t               dma_rsp_i,
  output tcdm_req_t               soc_req_o,
  input  tcdm_rsp_t               soc_rsp_i
);
  localparam int unsigned NT = NUM_NTX + 3;  // targets: NTX..., DMA, TCDM, SoC
  localparam int unsigned TW = $clog2(NT);
  localparam int unsigned T_DMA = NUM_NTX, T_TCDM = NUM_NTX + 1, T_SOC = NUM_NTX + 2;

  logic [TW-1:0] sel, sel_q;
  logic          pend_q;
  tcdm_rsp_t [NT-1:0] rsp;
  logic [31:0]   a;
  logic          free, go;

  always_comb begin
    a = core_req_i.addr;
    if (a >= TCDM_BASE && a < TCDM_BASE + 32'(TCDM_BYTES))         sel = TW'(T_TCDM);
    else if (a >= PERIPH_BASE + DMA_OFFSET && a < PERIPH_BASE + DMA_OFFSET + 32'h100)
                                                                    sel = TW'(T_DMA);
    else if (a >= PERIPH_BASE && a < PERIPH_BASE + 32'(NUM_NTX * 256)) sel = TW'((a - PERIPH_BASE) >> 8);
    else                                                            sel = TW'(T_SOC);
  end

  always_comb begin
    for (int k = 0; k < NUM_NTX; k++) rsp[k] = ntx_rsp_i[k];
    rsp[T_DMA]  = dma_rsp_i;
    rsp[T_TCDM] = tcdm_rsp_i;
    rsp[T_SOC]  = soc_rsp_i;
  end

  always_comb begin
    free = !pend_q || rsp[sel_q].rvalid;
    go   = core_req_i.req && free;
    for (int k = 0; k < NUM_NTX; k++) begin
      ntx_req_o[k]     = core_req_i;
      ntx_req_o[k].req = go && (int'(sel) == k);
    end
    dma_req_o      = core_req_i;
    dma_req_o.req  = go && (int'(sel) == T_DMA);
    tcdm_req_o     = core_req_i;
    tcdm_req_o.req = go && (int'(sel) == T_TCDM);
    soc_req_o      = core_req_i;
    soc_req_o.req  = go && (int'(sel) == T_SOC);
  end

  always_comb begin
    core_rsp_o.gnt    = go && rsp[sel].gnt;
    core_rsp_o.rvalid = pend_q && rsp[sel_q].rvalid;
    core_rsp_o.rdata  = rsp[sel_q].rdata;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pend_q <= 1'b0;
      sel_q  <= '0;
    end else begin
      if (go && rsp[sel].gnt) begin
        pend_q <= 1'b1;
        sel_q  <= sel;
      end else if (pend_q && rsp[sel_q].rvalid) begin
        pend_q <= 1'b0;
      end
    end
  end
endmodule
