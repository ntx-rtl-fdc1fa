// tb_ntx_cluster_bus: self-checking test of the cluster bus address decoder.
//
// Behavioural targets (8 NTX register ports, DMA registers, TCDM port and
// SoC port) each answer reads with a word that names the target and the
// address, with random grant delays. The test issues reads and writes to
// all windows and checks that exactly the right target sees each request,
// that read data comes back from it, and that the window edges decode
// correctly.
module tb_ntx_cluster_bus;
  import ntx_pkg::*;
  localparam int NT = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tcdm_req_t core_req; tcdm_rsp_t core_rsp;
  tcdm_req_t [NT-1:0] treq; tcdm_rsp_t [NT-1:0] trsp;
  int hits [NT];

  ntx_cluster_bus dut (.clk_i(clk), .rst_ni(rst_n), .core_req_i(core_req), .core_rsp_o(core_rsp),
    .tcdm_req_o(treq[9]), .tcdm_rsp_i(trsp[9]), .ntx_req_o(treq[7:0]), .ntx_rsp_i(trsp[7:0]),
    .dma_req_o(treq[8]), .dma_rsp_i(trsp[8]), .soc_req_o(treq[10]), .soc_rsp_i(trsp[10]));

  logic [NT-1:0] g;
  always_comb for (int t = 0; t < NT; t++) begin
    trsp[t].gnt = treq[t].req && g[t];
  end
  always_ff @(posedge clk) for (int t = 0; t < NT; t++) begin
    g[t] <= $urandom_range(0, 2) != 0;
    trsp[t].rvalid <= treq[t].req && trsp[t].gnt;
    trsp[t].rdata  <= {8'(t), treq[t].addr[23:0]};
    if (treq[t].req && trsp[t].gnt) hits[t]++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int target_of(logic [31:0] a);
    if (a >= 32'h1000_0000 && a < 32'h1002_0000) return 9;
    if (a >= 32'h1020_1000 && a < 32'h1020_1100) return 8;
    if (a >= 32'h1020_0000 && a < 32'h1020_0800) return int'((a - 32'h1020_0000) / 256);
    return 10;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] addrs[$];
    for (int t = 0; t < NT; t++) hits[t] = 0;
    core_req = '0;
    addrs = '{32'h1000_0000, 32'h1001_FFFC, 32'h1002_0000, 32'h0FFF_FFFC, 32'h1020_0000, 32'h1020_00FC,
              32'h1020_0100, 32'h1020_07FC, 32'h1020_0800, 32'h1020_1000, 32'h1020_10FC, 32'h1020_1100, 32'h8000_0000};
    for (int i = 0; i < 300; i++) addrs.push_back($urandom_range(0, 3) == 0 ? $urandom :
      (32'h1000_0000 + ($urandom_range(0, 1) ? 32'h0020_0000 : 0) + ($urandom_range(0, 32'h2_1000) & 32'hFFFF_FFFC)));
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (addrs[i]) begin
      int t, hits0[NT]; bit we;
      t = target_of(addrs[i]); we = $urandom_range(0, 1);
      for (int k = 0; k < NT; k++) hits0[k] = hits[k];
      @(negedge clk);
      core_req = '{req: 1'b1, addr: addrs[i], we: we, be: 4'hF, wdata: $urandom};
      #1 while (!core_rsp.gnt) begin @(posedge clk); #1; end
      @(posedge clk); #1 core_req.req = 0;
      if (!core_rsp.rvalid) @(posedge clk);
      #1;
      chk(core_rsp.rvalid, "rvalid");
      if (!we) chk(core_rsp.rdata == {8'(t), addrs[i][23:0]}, $sformatf("read %h from target %0d: %h", addrs[i], t, core_rsp.rdata));
      for (int k = 0; k < NT; k++) chk(hits[k] == hits0[k] + (k == t), $sformatf("addr %h routed to target %0d only", addrs[i], t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
