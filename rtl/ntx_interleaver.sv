// ntx_interleaver: memory side of the NTX, two 32-bit TCDM master ports.
//
// Holds the stream FIFOs: the read address FIFOs of streams 0 and 1
// (RA_DEPTH = 5 entries), the store address and store data FIFOs
// (ST_DEPTH = 7) and the read data FIFOs RD0 and RD1 (RD_DEPTH = 5). The
// writeback interleaver maps the three streams onto the two ports: port 0
// serves read stream 0 and port 1 read stream 1; a store (address and data
// both present) takes a port in a cycle where that port has no read to
// issue, port 1 first. When the store FIFOs are full, stores take port 1
// ahead of its reads so results always drain.
// A read is only issued when its data FIFO is sure to have room for the
// answer (entries + reads in flight < RD_DEPTH), so the ports never have to
// drop data. Bus handshake as in ntx_pkg (data one cycle after the grant;
// write acknowledgements with rvalid are ignored). idle_o: all FIFOs empty
// and no read in flight.
// FIFO depths follow the NTX architecture; the port assignment and
// priority rules are choices of this design.
module ntx_interleaver
  import ntx_pkg::*;
#(
  parameter int unsigned RA_DEPTH = 5,
  parameter int unsigned RD_DEPTH = 5,
  parameter int unsigned ST_DEPTH = 7
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // address streams from the controller
  input  logic              ra0_push_i,
  input  logic [ADDR_W-1:0] ra0_i,
  output logic              ra0_full_o,
  input  logic              ra1_push_i,
  input  logic [ADDR_W-1:0] ra1_i,
  output logic              ra1_full_o,
  input  logic              sa_push_i,
  input  logic [ADDR_W-1:0] sa_i,
  output logic              sa_full_o,
  // store data from the FPU
  input  logic              std_push_i,
  input  logic [DATA_W-1:0] std_i,
  output logic [$clog2(ST_DEPTH+1)-1:0] std_count_o,
  // read data to the FPU
  input  logic              rd0_pop_i,
  output logic [DATA_W-1:0] rd0_o,
  output logic              rd0_valid_o,
  input  logic              rd1_pop_i,
  output logic [DATA_W-1:0] rd1_o,
  output logic              rd1_valid_o,
  // TCDM master ports
  output tcdm_req_t [1:0]   port_req_o,
  input  tcdm_rsp_t [1:0]   port_rsp_i,
  output logic              idle_o
);
  localparam int unsigned RCW = $clog2(RD_DEPTH+1);
  localparam int unsigned SCW = $clog2(ST_DEPTH+1);

  logic [1:0][ADDR_W-1:0] ra_head;
  logic [1:0]             ra_empty, ra_pop;
  logic [1:0]             rd_empty, rd_full, rd_push;
  logic [1:0][RCW-1:0]    rd_count;
  logic [1:0]             inflight_q;
  logic [ADDR_W-1:0]      sa_head;
  logic [DATA_W-1:0]      std_head;
  logic                   sa_empty, std_empty, std_full, st_pop;
  logic [SCW-1:0]         sa_count;
  logic [1:0]             rd_want, st_on, rd_on, granted_rd;
  logic                   st_ready, st_urgent;

  ntx_fifo #(.WIDTH(ADDR_W), .DEPTH(RA_DEPTH)) i_ra0 (
    .clk_i, .rst_ni, .push_i(ra0_push_i), .data_i(ra0_i), .pop_i(ra_pop[0]),
    .data_o(ra_head[0]), .full_o(ra0_full_o), .empty_o(ra_empty[0]), .count_o());
  ntx_fifo #(.WIDTH(ADDR_W), .DEPTH(RA_DEPTH)) i_ra1 (
    .clk_i, .rst_ni, .push_i(ra1_push_i), .data_i(ra1_i), .pop_i(ra_pop[1]),
    .data_o(ra_head[1]), .full_o(ra1_full_o), .empty_o(ra_empty[1]), .count_o());
  ntx_fifo #(.WIDTH(ADDR_W), .DEPTH(ST_DEPTH)) i_sa (
    .clk_i, .rst_ni, .push_i(sa_push_i), .data_i(sa_i), .pop_i(st_pop),
    .data_o(sa_head), .full_o(sa_full_o), .empty_o(sa_empty), .count_o(sa_count));
  ntx_fifo #(.WIDTH(DATA_W), .DEPTH(ST_DEPTH)) i_std (
    .clk_i, .rst_ni, .push_i(std_push_i), .data_i(std_i), .pop_i(st_pop),
    .data_o(std_head), .full_o(std_full), .empty_o(std_empty), .count_o(std_count_o));
  ntx_fifo #(.WIDTH(DATA_W), .DEPTH(RD_DEPTH)) i_rd0 (
    .clk_i, .rst_ni, .push_i(rd_push[0]), .data_i(port_rsp_i[0].rdata), .pop_i(rd0_pop_i),
    .data_o(rd0_o), .full_o(rd_full[0]), .empty_o(rd_empty[0]), .count_o(rd_count[0]));
  ntx_fifo #(.WIDTH(DATA_W), .DEPTH(RD_DEPTH)) i_rd1 (
    .clk_i, .rst_ni, .push_i(rd_push[1]), .data_i(port_rsp_i[1].rdata), .pop_i(rd1_pop_i),
    .data_o(rd1_o), .full_o(rd_full[1]), .empty_o(rd_empty[1]), .count_o(rd_count[1]));

  assign rd0_valid_o = !rd_empty[0];
  assign rd1_valid_o = !rd_empty[1];

  always_comb begin
    st_ready  = !sa_empty && !std_empty;
    st_urgent = std_full || (sa_count == SCW'(ST_DEPTH));
    for (int p = 0; p < 2; p++)
      rd_want[p] = !ra_empty[p] && ((int'(rd_count[p]) + int'(inflight_q[p])) < int'(RD_DEPTH));
    st_on = '0;
    if (st_ready) begin
      if (!rd_want[1] || st_urgent) st_on[1] = 1'b1;
      else if (!rd_want[0])         st_on[0] = 1'b1;
    end
    rd_on = rd_want & ~st_on;
    for (int p = 0; p < 2; p++) begin
      port_req_o[p].req   = rd_on[p] || st_on[p];
      port_req_o[p].we    = st_on[p];
      port_req_o[p].addr  = st_on[p] ? sa_head : ra_head[p];
      port_req_o[p].wdata = std_head;
      port_req_o[p].be    = 4'hF;
      granted_rd[p]       = rd_on[p] && port_rsp_i[p].gnt;
      rd_push[p]          = inflight_q[p] && port_rsp_i[p].rvalid;
    end
    ra_pop = granted_rd;
    st_pop = (st_on[0] && port_rsp_i[0].gnt) || (st_on[1] && port_rsp_i[1].gnt);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) inflight_q <= '0;
    else         inflight_q <= granted_rd;
  end

  assign idle_o = (&ra_empty) && sa_empty && std_empty && (&rd_empty) && (inflight_q == '0);
endmodule
