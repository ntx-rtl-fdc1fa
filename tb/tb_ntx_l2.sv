// tb_ntx_l2: self-checking test of the L2 memory.
//
// Random 64-bit reads and writes with random byte enables over the first
// words of a 128 kB L2, every cycle or with idle gaps, compared with a
// model kept in the testbench. Checks that every request is granted at
// once, that rvalid follows exactly one cycle later (for writes too), and
// the read data.
module tb_ntx_l2;
  import ntx_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ext_req_t req; ext_rsp_t rsp;
  ntx_l2 dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  logic [63:0] model [256];
  logic [255:0] known;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pend_rd; logic [63:0] pend_exp; bit pend_known; bit pend;
    req = '0; known = '0; pend = 0; pend_rd = 0; pend_exp = '0; pend_known = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int w; logic [63:0] d; logic [7:0] be;
      w = $urandom_range(0, 255);
      d = {$urandom, $urandom};
      be = (i < 300) ? 8'hFF : 8'($urandom);
      req.req = ($urandom_range(0, 3) != 0);
      req.we = (i < 300) || ($urandom_range(0, 1) == 1);
      // bits above the L2 size must be ignored
      req.addr = L2_BASE + 32'(w * 8) + (($urandom_range(0, 1) == 1) ? 32'h0002_0000 : 32'h0);
      req.be = be; req.wdata = d;
      #1 chk(rsp.gnt == req.req, "grant follows request");
      chk(rsp.rvalid == pend, "rvalid one cycle after the request");
      if (pend && pend_rd && pend_known) chk(rsp.rdata == pend_exp, $sformatf("read data word %0d", w));
      @(posedge clk);
      pend = req.req; pend_rd = req.req && !req.we; pend_exp = model[w]; pend_known = known[w];
      if (req.req && req.we) begin
        for (int b = 0; b < 8; b++) if (be[b]) model[w][8*b +: 8] = d[8*b +: 8];
        if (be == 8'hFF) known[w] = 1'b1;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
