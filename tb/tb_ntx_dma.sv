// tb_ntx_dma: self-checking test of the 2D DMA engine.
//
// A behavioural 64-bit external memory and a two-port 32-bit TCDM model,
// both granting at random. Checks a 2D copy from external memory into the
// TCDM (rows gathered from a strided source into a packed tile), a 2D copy
// back with a destination stride, that bytes outside the rows are left
// alone, the done and busy flags, the register readback, and that a
// START written while busy is held off.
module tb_ntx_dma;
  import ntx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tcdm_req_t cfg_req; tcdm_rsp_t cfg_rsp;
  tcdm_req_t [1:0] treq; tcdm_rsp_t [1:0] trsp;
  ext_req_t ereq; ext_rsp_t ersp;
  logic done, busy;

  ntx_dma dut (.clk_i(clk), .rst_ni(rst_n), .cfg_req_i(cfg_req), .cfg_rsp_o(cfg_rsp),
    .tcdm_req_o(treq), .tcdm_rsp_i(trsp), .ext_req_o(ereq), .ext_rsp_i(ersp),
    .done_o(done), .busy_o(busy));

  logic [31:0] tmem [4096];
  logic [63:0] emem [4096];
  logic [1:0] tg; logic eg;
  always_comb begin
    for (int p = 0; p < 2; p++) trsp[p].gnt = treq[p].req && tg[p];
    ersp.gnt = ereq.req && eg;
  end
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      tg[p] <= $urandom_range(0, 2) != 0;
      trsp[p].rvalid <= treq[p].req && trsp[p].gnt;
      if (treq[p].req && trsp[p].gnt) begin
        if (treq[p].we) tmem[treq[p].addr[13:2]] <= treq[p].wdata;
        else trsp[p].rdata <= tmem[treq[p].addr[13:2]];
      end
    end
    eg <= $urandom_range(0, 2) != 0;
    ersp.rvalid <= ereq.req && ersp.gnt;
    if (ereq.req && ersp.gnt) begin
      if (ereq.we) emem[ereq.addr[14:3]] <= ereq.wdata;
      else ersp.rdata <= emem[ereq.addr[14:3]];
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [7:0] off, logic [31:0] d);
    cfg_req = '{req: 1'b1, addr: {24'h0, off}, we: 1'b1, be: 4'hF, wdata: d};
    #1 while (!cfg_rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 cfg_req.req = 0;
  endtask

  task automatic rd(logic [7:0] off, output logic [31:0] d);
    cfg_req = '{req: 1'b1, addr: {24'h0, off}, we: 1'b0, be: 4'hF, wdata: 0};
    #1 while (!cfg_rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 cfg_req.req = 0;
    @(posedge clk); d = cfg_rsp.rdata; #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d; int held;
    cfg_req = '0;
    for (int i = 0; i < 4096; i++) begin tmem[i] = 32'hA5A5_0000 + i; emem[i] = {$urandom, $urandom}; end
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // ext -> TCDM: 6 rows of 40 bytes, source row stride 256, packed destination
    wr(8'h00, 32'h0000_1000); wr(8'h04, 32'h0000_0800); wr(8'h08, 40);
    wr(8'h0C, 256); wr(8'h10, 40); wr(8'h14, 6);
    rd(8'h08, d); chk(d == 40, "LEN readback");
    wr(8'h18, 0);
    chk(busy, "busy after start");
    // a second START while busy is held off
    cfg_req = '{req: 1'b1, addr: 32'h18, we: 1'b1, be: 4'hF, wdata: 0};
    held = 0;
    repeat (4) begin #1; if (!cfg_rsp.gnt) held++; @(posedge clk); end
    cfg_req.req = 0;
    chk(held == 4, "START held while busy");
    while (!done) @(posedge clk);
    #1;
    for (int r = 0; r < 6; r++) for (int w = 0; w < 5; w++) begin
      logic [63:0] e; e = emem[(32'h1000 + r*256 + w*8) >> 3];
      chk(tmem[(32'h800 + r*40 + w*8) >> 2] == e[31:0] && tmem[(32'h800 + r*40 + w*8 + 4) >> 2] == e[63:32],
          $sformatf("ext->tcdm row %0d beat %0d", r, w));
    end
    chk(tmem[(32'h800 + 240) >> 2] == 32'hA5A5_0000 + ((32'h800 + 240) >> 2), "nothing written past the tile");
    rd(8'h1C, d); chk(d == 32'h2, "STATUS done, not busy");
    wr(8'h1C, 2); rd(8'h1C, d); chk(d == 0, "done cleared");
    // TCDM -> ext: 4 rows of 16 bytes from stride 64 to stride 128
    wr(8'h00, 32'h0000_0400); wr(8'h04, 32'h0000_6000); wr(8'h08, 16);
    wr(8'h0C, 64); wr(8'h10, 128); wr(8'h14, 4);
    wr(8'h18, 1);
    while (!done) @(posedge clk);
    #1;
    for (int r = 0; r < 4; r++) for (int w = 0; w < 2; w++) begin
      logic [63:0] g; g = emem[(32'h6000 + r*128 + w*8) >> 3];
      chk(g == {tmem[(32'h400 + r*64 + w*8 + 4) >> 2], tmem[(32'h400 + r*64 + w*8) >> 2]},
          $sformatf("tcdm->ext row %0d beat %0d", r, w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
