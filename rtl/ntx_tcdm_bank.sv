// ntx_tcdm_bank: one bank of the cluster's tightly coupled data memory.
//
// A single-ported synchronous SRAM of WORDS 32-bit words with byte
// enables: 128 kB of TCDM in 32 banks gives 1024 words per bank. A request
// (req_i) is served every cycle; a read returns its word in rdata_o on the
// next cycle, a write updates the enabled bytes at the clock edge. The
// contents are not initialised. Written as an array, so synthesis can map it to
// an SRAM macro.
module ntx_tcdm_bank #(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk_i,
  input  logic                     req_i,
  input  logic                     we_i,
  input  logic [$clog2(WORDS)-1:0] addr_i,
  input  logic [3:0]               be_i,
  input  logic [31:0]              wdata_i,
  output logic [31:0]              rdata_o
);
  logic [31:0] mem_q [WORDS];

  always_ff @(posedge clk_i) begin
    if (req_i) begin
      if (we_i) begin
        for (int b = 0; b < 4; b++) if (be_i[b]) mem_q[addr_i][8*b +: 8] <= wdata_i[8*b +: 8];
      end else begin
        rdata_o <= mem_q[addr_i];
      end
    end
  end
endmodule
