// tb_ntx_regif: self-checking test of the NTX register interface.
//
// Writes random values to every staging register and reads them back,
// issues a command and checks that the controller side sees the staged
// configuration, that the staging area can be rewritten while a command
// waits in the slot without changing it, that a second CMD write is held
// off until the slot frees, and the STATUS, IRQ flag, IRQ enable and
// write-1-to-clear behaviour.
module tb_ntx_regif;
  import ntx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tcdm_req_t req; tcdm_rsp_t rsp;
  logic issue_valid, issue_ready, busy, done, irq;
  ntx_cfg_t cfg_out, model;

  ntx_regif dut (.clk_i(clk), .rst_ni(rst_n), .bus_req_i(req), .bus_rsp_o(rsp),
    .issue_valid_o(issue_valid), .issue_cfg_o(cfg_out), .issue_ready_i(issue_ready),
    .busy_i(busy), .done_i(done), .irq_o(irq));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [7:0] off, logic [31:0] d);
    req = '{req: 1'b1, addr: {24'h00, off}, we: 1'b1, be: 4'hF, wdata: d};
    #1 while (!rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 req.req = 0;
  endtask

  task automatic rd(logic [7:0] off, output logic [31:0] d);
    req = '{req: 1'b1, addr: {24'h00, off}, we: 1'b0, be: 4'hF, wdata: 0};
    #1 while (!rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 req.req = 0;
    @(posedge clk); d = rsp.rdata; #1;
  endtask

  task automatic stage_random();
    for (int k = 0; k < 5; k++) begin model.bound[k] = 16'($urandom); wr(REG_BOUND0 + 8'(4*k), 32'(model.bound[k])); end
    for (int g = 0; g < 3; g++) begin
      model.base[g] = $urandom; wr(REG_BASE0 + 8'(4*g), model.base[g]);
      for (int k = 0; k < 5; k++) begin model.stride[g][k] = $urandom; wr(REG_STRIDE0 + 8'(4*(5*g+k)), model.stride[g][k]); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d; ntx_cfg_t first; int held;
    req = '0; issue_ready = 0; busy = 0; done = 0; model = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    stage_random();
    for (int k = 0; k < 5; k++) begin rd(REG_BOUND0 + 8'(4*k), d); chk(d == 32'(model.bound[k]), "bound readback"); end
    for (int g = 0; g < 3; g++) begin
      rd(REG_BASE0 + 8'(4*g), d); chk(d == model.base[g], "base readback");
      for (int k = 0; k < 5; k++) begin rd(REG_STRIDE0 + 8'(4*(5*g+k)), d); chk(d == model.stride[g][k], "stride readback"); end
    end
    model.cmd = cmd_word_t'(16'h1234);
    wr(REG_CMD, 32'h1234);
    chk(issue_valid && cfg_out == model, "issued configuration equals staged one");
    rd(REG_STATUS, d); chk(d[1], "slot full in STATUS");
    first = model;
    stage_random();   // rewrite staging while the slot waits
    chk(cfg_out == first, "slot unchanged by staging writes");
    // second CMD write is held off until the controller takes the slot
    req = '{req: 1'b1, addr: {24'h00, REG_CMD}, we: 1'b1, be: 4'hF, wdata: 32'h0ABC};
    held = 0;
    repeat (5) begin @(posedge clk); if (!rsp.gnt) held++; end
    chk(held == 5, "CMD write held while slot full");
    #1 issue_ready = 1; @(posedge clk); #1 issue_ready = 0;
    #1 while (!rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 req.req = 0;
    model.cmd = cmd_word_t'(16'h0ABC);
    chk(issue_valid && cfg_out == model, "second command in slot");
    // IRQ
    wr(REG_CTRL, 1);
    busy = 1; rd(REG_STATUS, d); chk(d[0], "busy in STATUS");
    @(negedge clk) done = 1; @(negedge clk) done = 0; busy = 0;
    chk(irq, "irq raised");
    rd(REG_IRQ, d); chk(d[0], "done flag");
    wr(REG_CTRL, 0); chk(!irq, "irq masked");
    wr(REG_IRQ, 1); rd(REG_IRQ, d); chk(!d[0], "done flag cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
