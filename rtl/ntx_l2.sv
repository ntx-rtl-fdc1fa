// ntx_l2: the shared L2 memory of the SoC (128 kB by default).
//
// A single-ported synchronous memory of BYTES/8 64-bit words on the 64-bit
// SoC handshake of ntx_pkg: every request is granted at once, and rvalid
// (with the read data, or as the acknowledgement of a write) follows one
// cycle later. Writes update the bytes selected by be. The word is chosen by
// address bits [3 +: log2(BYTES/8)]; bits above are ignored (the SoC
// interconnect only routes the L2 window here). The contents are not
// initialised.
// The architecture gives the L2's size and its 64-bit connection to the SoC
// interconnect; the single-cycle latency is a choice of this design.
module ntx_l2
  import ntx_pkg::*;
#(
  parameter int unsigned BYTES = 131072
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  ext_req_t req_i,
  output ext_rsp_t rsp_o
);
  localparam int unsigned WORDS = BYTES / 8;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [63:0] mem_q [WORDS];
  logic [63:0] rdata_q;
  logic        rvalid_q;

  always_ff @(posedge clk_i) begin
    if (req_i.req) begin
      if (req_i.we) begin
        for (int b = 0; b < 8; b++)
          if (req_i.be[b]) mem_q[req_i.addr[3 +: AW]][8*b +: 8] <= req_i.wdata[8*b +: 8];
      end else begin
        rdata_q <= mem_q[req_i.addr[3 +: AW]];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= req_i.req;
  end

  assign rsp_o.gnt    = req_i.req;
  assign rsp_o.rvalid = rvalid_q;
  assign rsp_o.rdata  = rdata_q;
endmodule
