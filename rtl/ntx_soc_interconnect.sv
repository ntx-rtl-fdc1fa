// ntx_soc_interconnect: joins the clusters to the L2 and the memory cube.
//
// NUM_MASTERS 64-bit master ports (two per cluster: its DMA and the
// off-cluster accesses of its processor) reach NUM_TARGETS = 1 + NUM_PORTS
// targets: target 0 is the 64-bit L2 port (addresses L2_BASE ..
// L2_BASE+L2_BYTES-1), targets 1..NUM_PORTS are the 256-bit master ports
// towards the memory cube's main interconnect (every other address). The
// cube ports are interleaved on 32-byte lines: port = address bits
// [5 +: log2 NUM_PORTS]. A 64-bit access to a cube port travels in the
// 64-bit lane given by address bits [4:3], with its byte enables moved to
// that lane, and the read data is taken from that lane on the way back.
// Each target has a round-robin arbiter; a master that loses sees gnt low
// and keeps requesting. A target may answer any number of cycles after the
// grant but in order: a FIFO per target (OUTSTANDING entries) remembers
// which master and which lane each accepted request belongs to, and a
// target with a full FIFO accepts nothing.
// Timing: grant in the cycle of the request when the target grants; the
// answer reaches the master in the cycle the target gives it.
// The architecture shows the SoC interconnect with 64-bit cluster ports,
// the L2 and p master ports of 256 bits; the address map, the line
// interleaving, the arbitration and the number of ports are choices of this
// design.
module ntx_soc_interconnect
  import ntx_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 32,
  parameter int unsigned NUM_PORTS   = 4,
  parameter int unsigned L2_BYTES    = 131072,
  parameter int unsigned OUTSTANDING = 4
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  input  ext_req_t [NUM_MASTERS-1:0]    req_i,
  output ext_rsp_t [NUM_MASTERS-1:0]    rsp_o,
  output ext_req_t                      l2_req_o,
  input  ext_rsp_t                      l2_rsp_i,
  output lob_req_t [NUM_PORTS-1:0]      lob_req_o,
  input  lob_rsp_t [NUM_PORTS-1:0]      lob_rsp_i
);
  localparam int unsigned NT = 1 + NUM_PORTS;
  localparam int unsigned MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;
  localparam int unsigned PW = (NUM_PORTS > 1) ? $clog2(NUM_PORTS) : 1;
  localparam int unsigned TW = $clog2(NT);

  // target of each master's request
  logic [NUM_MASTERS-1:0][TW-1:0] tgt;
  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) begin
      if (req_i[m].addr >= L2_BASE && req_i[m].addr < L2_BASE + 32'(L2_BYTES))
        tgt[m] = '0;
      else if (NUM_PORTS > 1)
        tgt[m] = TW'(1 + int'(req_i[m].addr[5 +: PW]));
      else
        tgt[m] = TW'(1);
    end
  end

  logic [NT-1:0]          t_req, t_gnt, t_acc, t_rvalid, t_full, t_empty;
  logic [NT-1:0][MW-1:0]  win, rr_q;
  logic [NT-1:0][MW+1:0]  ord_in, ord_out;   // {lane, master}
  logic [NT-1:0][63:0]    t_rdata;

  always_comb begin
    for (int t = 0; t < NT; t++) begin
      t_req[t] = 1'b0;
      win[t]   = '0;
      for (int k = NUM_MASTERS - 1; k >= 0; k--) begin
        int m;
        m = (int'(rr_q[t]) + k) % NUM_MASTERS;
        if (req_i[m].req && int'(tgt[m]) == t) begin
          t_req[t] = !t_full[t];
          win[t]   = MW'(m);
        end
      end
      ord_in[t] = {req_i[win[t]].addr[4:3], win[t]};
    end
  end

  // target ports: requests out
  always_comb begin
    l2_req_o     = req_i[win[0]];
    l2_req_o.req = t_req[0];
    for (int p = 0; p < NUM_PORTS; p++) begin
      ext_req_t r;
      logic [1:0] lane;
      r     = req_i[win[p+1]];
      lane  = r.addr[4:3];
      lob_req_o[p].req   = t_req[p+1];
      lob_req_o[p].addr  = {r.addr[31:5], 5'b0};
      lob_req_o[p].we    = r.we;
      lob_req_o[p].be    = 32'(r.be) << (8 * lane);
      lob_req_o[p].wdata = {4{r.wdata}};
    end
  end

  // target ports: grants and answers in
  always_comb begin
    t_gnt[0]    = l2_rsp_i.gnt;
    t_rvalid[0] = l2_rsp_i.rvalid;
    t_rdata[0]  = l2_rsp_i.rdata;
    for (int p = 0; p < NUM_PORTS; p++) begin
      logic [1:0] rlane;
      rlane = ord_out[p+1][MW +: 2];
      t_gnt[p+1]    = lob_rsp_i[p].gnt;
      t_rvalid[p+1] = lob_rsp_i[p].rvalid;
      t_rdata[p+1]  = lob_rsp_i[p].rdata[64*rlane +: 64];
    end
  end

  assign t_acc = t_req & t_gnt;

  // in-order bookkeeping per target
  for (genvar t = 0; t < NT; t++) begin : gen_ord
    ntx_fifo #(.WIDTH(MW + 2), .DEPTH(OUTSTANDING)) i_ord (
      .clk_i, .rst_ni,
      .push_i(t_acc[t]), .data_i(ord_in[t]),
      .pop_i(t_rvalid[t] && !t_empty[t]), .data_o(ord_out[t]),
      .full_o(t_full[t]), .empty_o(t_empty[t]), .count_o()
    );
  end

  // responses
  always_comb begin
    for (int m = 0; m < NUM_MASTERS; m++) begin
      rsp_o[m].gnt    = 1'b0;
      rsp_o[m].rvalid = 1'b0;
      rsp_o[m].rdata  = '0;
      for (int t = 0; t < NT; t++) begin
        if (t_acc[t] && int'(win[t]) == m) rsp_o[m].gnt = 1'b1;
        if (t_rvalid[t] && !t_empty[t] && int'(ord_out[t][MW-1:0]) == m) begin
          rsp_o[m].rvalid = 1'b1;
          rsp_o[m].rdata  = t_rdata[t];
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rr_q <= '0;
    else begin
      for (int t = 0; t < NT; t++)
        if (t_acc[t]) rr_q[t] <= (int'(win[t]) == NUM_MASTERS - 1) ? '0 : win[t] + 1'b1;
    end
  end

  // A target must not answer without an accepted request outstanding.
  for (genvar t = 0; t < NT; t++) begin : gen_chk
    assert property (@(posedge clk_i) disable iff (!rst_ni) t_rvalid[t] |-> !t_empty[t])
      else $error("target %0d answered with nothing outstanding", t);
  end
endmodule
