// tb_ntx_soc: end-to-end test of the SoC at its default size.
//
// Sixteen clusters of eight NTX, the L2 and the SoC interconnect, with the
// memory cube's four 256-bit ports played by a behavioural memory that
// grants at random and answers in order after a random delay. The
// testbench also plays the sixteen processors. All clusters work at the
// same time, each through the whole flow of one operation:
//   1. 2D DMA of two vectors x and w (32 floats each) from the cube into the
//      TCDM;
//   2. a dot product z = sum x[i]*w[i] on one NTX of the cluster (a
//      different NTX index per cluster), started through its registers, and
//      waited for through STATUS;
//   3. DMA of z (plus a marker word written by the processor) from the TCDM
//      into the cluster's slot in the L2;
//   4. processor reads of the L2 slot through the SoC interconnect, checked
//      against the dot product computed here and the marker;
//   5. a processor write and read-back of a word in the cube (32-bit access
//      in a 64-bit lane of a 256-bit port);
//   6. DMA of x from the TCDM back into the cube, checked word by word.
// Counted (each must occur): requests held off at the SoC interconnect,
// L2 accesses, accesses on each cube port, NTX completions (16) and DMA
// transfers overlapping between clusters.
module tb_ntx_soc;
  import ntx_pkg::*;
  import ntx_tb_pkg::*;

  localparam int NC = 16, NP = 4, N = 32;
  localparam logic [31:0] CUBE_X = 32'h8000_0000;  // inputs, 1 kB per cluster
  localparam logic [31:0] CUBE_Y = 32'h8004_0000;  // copies of x, 256 B per cluster
  localparam logic [31:0] CUBE_W = 32'h9000_0000;  // processor words
  localparam logic [31:0] DMA    = PERIPH_BASE + DMA_OFFSET;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tcdm_req_t [NC-1:0]      core_req;
  tcdm_rsp_t [NC-1:0]      core_rsp;
  lob_req_t  [NP-1:0]      lob_req;
  lob_rsp_t  [NP-1:0]      lob_rsp;
  logic      [NC-1:0][7:0] irq, nbusy;
  logic      [NC-1:0]      dma_done, dma_busy;

  ntx_soc dut (.clk_i(clk), .rst_ni(rst_n), .core_req_i(core_req), .core_rsp_o(core_rsp),
    .lob_req_o(lob_req), .lob_rsp_i(lob_rsp), .ntx_irq_o(irq), .ntx_busy_o(nbusy),
    .dma_done_o(dma_done), .dma_busy_o(dma_busy));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  // ---------------- memory cube model: 256-bit lines, random grant and delay
  logic [255:0] cube [bit [31:0]];
  typedef struct { int due; logic [255:0] data; } ans_t;
  ans_t q[NP][$];
  logic [NP-1:0] g, rv;
  logic [255:0]  rd [NP];
  int cyc = 0, port_acc[NP], held = 0, l2_acc = 0, dma_overlap = 0, done_cnt = 0;
  logic [NC-1:0][7:0] nbusy_q;

  always_comb
    for (int p = 0; p < NP; p++) begin
      lob_rsp[p].gnt    = lob_req[p].req && g[p];
      lob_rsp[p].rvalid = rv[p];
      lob_rsp[p].rdata  = rd[p];
    end

  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < NP; p++) begin
      g[p]  <= ($urandom_range(0, 3) != 0);
      rv[p] <= 1'b0;
      if (q[p].size() > 0 && q[p][0].due <= cyc) begin
        rv[p] <= 1'b1; rd[p] <= q[p][0].data; void'(q[p].pop_front());
      end
      if (lob_req[p].req && lob_rsp[p].gnt) begin
        bit [31:0] l; ans_t a;
        l = lob_req[p].addr >> 5;
        if (!cube.exists(l)) cube[l] = '0;
        if (lob_req[p].we)
          for (int b = 0; b < 32; b++) if (lob_req[p].be[b]) cube[l][8*b +: 8] = lob_req[p].wdata[8*b +: 8];
        a.data = cube[l]; a.due = cyc + $urandom_range(1, 10);
        q[p].push_back(a); port_acc[p]++;
      end
    end
    // mechanism counters
    for (int m = 0; m < 2 * NC; m++) if (dut.m_req[m].req && !dut.m_rsp[m].gnt) held++;
    if (dut.l2_req.req && dut.l2_rsp.gnt) l2_acc++;
    if ($countones(dma_busy) > 1) dma_overlap++;
    for (int c = 0; c < NC; c++) done_cnt += $countones(nbusy_q[c] & ~nbusy[c]);
    nbusy_q <= nbusy;
  end

  // cube contents as 32-bit words
  function automatic logic [31:0] cube_rd(logic [31:0] a);
    bit [31:0] l;
    l = a >> 5;
    return cube.exists(l) ? cube[l][32*a[4:2] +: 32] : 32'h0;
  endfunction
  function automatic void cube_wr(logic [31:0] a, logic [31:0] d);
    bit [31:0] l;
    l = a >> 5;
    if (!cube.exists(l)) cube[l] = '0;
    cube[l][32*a[4:2] +: 32] = d;
  endfunction

  // ---------------- processor accesses of cluster c
  // Requests change 1 time unit after a clock edge and grants are sampled 3
  // units after it, so that all sixteen processors have set their requests.
  task automatic core_wr(int c, logic [31:0] a, logic [31:0] d);
    @(posedge clk); #1;
    core_req[c] = '{req: 1'b1, addr: a, we: 1'b1, be: 4'hF, wdata: d};
    #2 while (!core_rsp[c].gnt) begin @(posedge clk); #3; end
    @(posedge clk); #1 core_req[c].req = 1'b0;
    while (!core_rsp[c].rvalid) begin @(posedge clk); #1; end
  endtask
  task automatic core_rd(int c, logic [31:0] a, output logic [31:0] d);
    @(posedge clk); #1;
    core_req[c] = '{req: 1'b1, addr: a, we: 1'b0, be: 4'hF, wdata: 32'h0};
    #2 while (!core_rsp[c].gnt) begin @(posedge clk); #3; end
    @(posedge clk); #1 core_req[c].req = 1'b0;
    while (!core_rsp[c].rvalid) begin @(posedge clk); #1; end
    d = core_rsp[c].rdata;
  endtask
  task automatic dma_2d(int c, logic [31:0] src, logic [31:0] dst, int len, int sstr, int dstr, int reps, bit to_ext);
    logic [31:0] s;
    core_wr(c, DMA + 32'h00, src); core_wr(c, DMA + 32'h04, dst); core_wr(c, DMA + 32'h08, 32'(len));
    core_wr(c, DMA + 32'h0C, 32'(sstr)); core_wr(c, DMA + 32'h10, 32'(dstr)); core_wr(c, DMA + 32'h14, 32'(reps));
    core_wr(c, DMA + 32'h18, 32'(to_ext));
    do core_rd(c, DMA + 32'h1C, s); while (s[0]);
    core_wr(c, DMA + 32'h1C, 32'h2);
  endtask

  int xv[NC][N], wv[NC][N];
  int finished = 0;

  task automatic run_cluster(int c);
    logic [31:0] base, d, z;
    longint dot;
    int k;
    k = c % 8;
    base = PERIPH_BASE + 32'(k * 256);
    // 1. x and w: two rows of 128 B, 512 B apart in the cube, 256 B apart in the TCDM
    dma_2d(c, CUBE_X + 32'(c * 1024), TCDM_BASE, 4 * N, 512, 256, 2, 1'b0);
    // 2. dot product on NTX k
    core_wr(c, base + 32'(REG_BOUND0), 32'(N - 1));
    for (int j = 1; j < 5; j++) core_wr(c, base + 32'(REG_BOUND0) + 32'(4 * j), 32'h0);
    core_wr(c, base + 32'(REG_BASE0),     TCDM_BASE);
    core_wr(c, base + 32'(REG_BASE0) + 4, TCDM_BASE + 32'h100);
    core_wr(c, base + 32'(REG_BASE0) + 8, TCDM_BASE + 32'h200);
    for (int g2 = 0; g2 < 3; g2++)
      for (int j = 0; j < 5; j++)
        core_wr(c, base + 32'(REG_STRIDE0) + 32'(4 * (5 * g2 + j)), (j == 0 && g2 < 2) ? 32'd4 : 32'd0);
    core_wr(c, TCDM_BASE + 32'h204, 32'hC0DE_0000 + 32'(c));
    begin
      cmd_word_t cw;
      cw = '0; cw.opcode = OP_MAC; cw.init_level = 3'd1; cw.store_level = 3'd1;
      cw.outer_level = 3'd1; cw.init_src = ISRC_ZERO;
      core_wr(c, base + 32'(REG_CMD), 32'(cw));
    end
    do core_rd(c, base + 32'(REG_STATUS), d); while (d[0]);
    // 3. result and marker into the cluster's L2 slot
    dma_2d(c, TCDM_BASE + 32'h200, L2_BASE + 32'(c * 8), 8, 0, 0, 1, 1'b1);
    // 4. read the L2 slot through the SoC interconnect
    dot = 0;
    for (int i = 0; i < N; i++) dot += longint'(xv[c][i]) * longint'(wv[c][i]);
    core_rd(c, L2_BASE + 32'(c * 8), z);
    chk(z == int_to_f(dot), $sformatf("cluster %0d dot product %h expected %h", c, z, int_to_f(dot)));
    core_rd(c, L2_BASE + 32'(c * 8) + 4, d);
    chk(d == 32'hC0DE_0000 + 32'(c), $sformatf("cluster %0d marker in L2", c));
    // 5. processor word in the cube
    core_wr(c, CUBE_W + 32'(c * 4), 32'hABCD_0000 + 32'(c));
    core_rd(c, CUBE_W + 32'(c * 4), d);
    chk(d == 32'hABCD_0000 + 32'(c), $sformatf("cluster %0d processor word in the cube", c));
    // 6. x back to the cube
    dma_2d(c, TCDM_BASE, CUBE_Y + 32'(c * 256), 4 * N, 0, 0, 1, 1'b1);
    for (int i = 0; i < N; i++)
      chk(cube_rd(CUBE_Y + 32'(c * 256) + 32'(4 * i)) == int_to_f(longint'(xv[c][i])),
          $sformatf("cluster %0d copy of x[%0d]", c, i));
    finished++;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    core_req = '0; g = '0; rv = '0; nbusy_q = '0;
    for (int p = 0; p < NP; p++) rd[p] = '0;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < N; i++) begin
        xv[c][i] = $urandom_range(0, 16) - 8;
        wv[c][i] = $urandom_range(0, 16) - 8;
        cube_wr(CUBE_X + 32'(c * 1024) + 32'(4 * i), int_to_f(longint'(xv[c][i])));
        cube_wr(CUBE_X + 32'(c * 1024) + 32'(512 + 4 * i), int_to_f(longint'(wv[c][i])));
      end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int c = 0; c < NC; c++) fork automatic int cc = c; run_cluster(cc); join_none
    while (finished < NC) @(posedge clk);
    repeat (20) @(posedge clk);
    $display("cycles %0d, held off %0d, L2 accesses %0d, cube port accesses %0d %0d %0d %0d, NTX completions %0d, DMA overlap %0d",
             cyc, held, l2_acc, port_acc[0], port_acc[1], port_acc[2], port_acc[3], done_cnt, dma_overlap);
    chk(held > 0, "requests held off at the SoC interconnect");
    chk(l2_acc > 0, "L2 accessed");
    for (int p = 0; p < NP; p++) chk(port_acc[p] > 0, $sformatf("cube port %0d used", p));
    chk(done_cnt == NC, "one NTX completion per cluster");
    chk(dma_overlap > 0, "DMA transfers of several clusters overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
