// tb_ntx_tcdm_bank: self-checking test of one TCDM bank.
//
// Random full-word and byte-enabled writes and reads against an array
// model over all 1024 words; checks the one-cycle read latency and that a
// cycle without a request leaves the read data unchanged.
module tb_ntx_tcdm_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req, we; logic [9:0] addr; logic [3:0] be; logic [31:0] wdata, rdata;

  ntx_tcdm_bank dut (.clk_i(clk), .req_i(req), .we_i(we), .addr_i(addr), .be_i(be), .wdata_i(wdata), .rdata_o(rdata));

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model [1024];
    req = 0; we = 0; addr = 0; be = 0; wdata = 0;
    // fill
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); req = 1; we = 1; addr = 10'(i); be = 4'hF; wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req = $urandom_range(0, 3) != 0; we = $urandom_range(0, 1); addr = 10'($urandom); be = 4'($urandom); wdata = $urandom;
      if (req && we) for (int b = 0; b < 4; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      if (req && !we) begin
        logic [31:0] e; logic [31:0] held;
        e = model[addr];
        @(negedge clk); req = 0;
        checks++; if (rdata !== e) begin failures++; $display("FAIL read %0d: %h exp %h", addr, rdata, e); end
        held = rdata;
        @(negedge clk);
        checks++; if (rdata !== held) begin failures++; $display("FAIL read data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
