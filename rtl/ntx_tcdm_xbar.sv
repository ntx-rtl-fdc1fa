// ntx_tcdm_xbar: logarithmic interconnect between cluster masters and TCDM.
//
// Connects NUM_MASTERS 32-bit master ports (processor, NTX ports, DMA
// ports) to NUM_BANKS word-interleaved banks: consecutive words lie in
// consecutive banks (bank = address bits [2 +: log2 NUM_BANKS], row = the
// bits above), so streams with unit stride spread over all banks. Each
// bank has its own round-robin arbiter; a master whose bank is taken by
// another master sees gnt low and keeps requesting. The bank answers every
// granted request one cycle later, and the answer (rvalid, rdata) is routed
// back to the master that was granted. Address bits above the TCDM size
// are ignored. The banks (ntx_tcdm_bank) are inside this block.
// Timing: combinational grant, single-cycle access, one access per bank
// per cycle. The word interleaving and round-robin arbitration are choices
// of this design; the architecture names a logarithmic interconnect.
module ntx_tcdm_xbar
  import ntx_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 19,
  parameter int unsigned NUM_BANKS   = 32,
  parameter int unsigned BANK_WORDS  = 1024
) (
  input  logic                        clk_i,
  input  logic                        rst_ni,
  input  tcdm_req_t [NUM_MASTERS-1:0] req_i,
  output tcdm_rsp_t [NUM_MASTERS-1:0] rsp_o
);
  localparam int unsigned BW = $clog2(NUM_BANKS);
  localparam int unsigned RW = $clog2(BANK_WORDS);
  localparam int unsigned MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;

  logic [NUM_BANKS-1:0]                    b_req, b_we;
  logic [NUM_BANKS-1:0][RW-1:0]            b_addr;
  logic [NUM_BANKS-1:0][3:0]               b_be;
  logic [NUM_BANKS-1:0][31:0]              b_wdata, b_rdata;
  logic [NUM_BANKS-1:0][MW-1:0]            win, rr_q, owner_q;
  logic [NUM_BANKS-1:0]                    served_q;
  logic [NUM_MASTERS-1:0]                  gnt;

  always_comb begin
    gnt = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      b_req[b]   = 1'b0;
      win[b]     = '0;
      // Round-robin: first requester at or after the pointer.
      for (int k = NUM_MASTERS - 1; k >= 0; k--) begin
        int m;
        m = (int'(rr_q[b]) + k) % NUM_MASTERS;
        if (req_i[m].req && (int'(req_i[m].addr[2 +: BW]) == b)) begin
          b_req[b] = 1'b1;
          win[b]   = MW'(m);
        end
      end
      b_we[b]    = req_i[win[b]].we;
      b_addr[b]  = req_i[win[b]].addr[2+BW +: RW];
      b_be[b]    = req_i[win[b]].be;
      b_wdata[b] = req_i[win[b]].wdata;
      if (b_req[b]) gnt[win[b]] = 1'b1;
    end
    for (int m = 0; m < NUM_MASTERS; m++) begin
      rsp_o[m].gnt    = gnt[m];
      rsp_o[m].rvalid = 1'b0;
      rsp_o[m].rdata  = '0;
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (served_q[b] && (int'(owner_q[b]) == m)) begin
          rsp_o[m].rvalid = 1'b1;
          rsp_o[m].rdata  = b_rdata[b];
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rr_q     <= '0;
      owner_q  <= '0;
      served_q <= '0;
    end else begin
      served_q <= b_req;
      for (int b = 0; b < NUM_BANKS; b++) begin
        if (b_req[b]) begin
          owner_q[b] <= win[b];
          rr_q[b]    <= (int'(win[b]) == NUM_MASTERS - 1) ? '0 : win[b] + 1'b1;
        end
      end
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : gen_bank
    ntx_tcdm_bank #(.WORDS(BANK_WORDS)) i_bank (
      .clk_i, .req_i(b_req[b]), .we_i(b_we[b]), .addr_i(b_addr[b]), .be_i(b_be[b]),
      .wdata_i(b_wdata[b]), .rdata_o(b_rdata[b])
    );
  end
endmodule
