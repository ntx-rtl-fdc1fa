// tb_ntx_cluster: end-to-end test of one NTX cluster at its default size.
//
// The testbench plays the processor core (through the core data port) and
// the SoC side (a 64-bit external memory that grants at random). It runs a
// tiled DNN convolution the way the cluster is meant to be programmed:
//   y[k][n][m] = b[k] + sum_{d,u,v} x[d][n+u][m+v] * w[k][d][u][v]
// with K = 8 output channels, one per NTX, each NTX running the five-level
// nest {N, M, D, U, V} with the accumulator initialised from y (preloaded
// with the bias) at level 3 and stored at level 3. Two input tiles are cut
// from a larger image in external memory by 2D DMA transfers into two TCDM
// buffers (double buffering): the second tile is loaded while the NTX work
// on the first, and its commands are issued while the first ones still
// run, so they wait in the command slots. Results go back by DMA and are
// compared with a model computed here.
// Mechanisms counted (each must occur): DMA beats in and out, DMA/NTX
// overlap, TCDM bank conflicts seen by NTX ports, INIT slots, stores on
// each NTX port, FPU stalls, commands queued behind a running one, command
// completions (done pulses) and the interrupt lines.
module tb_ntx_cluster;
  import ntx_pkg::*;
  import ntx_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tcdm_req_t core_req; tcdm_rsp_t core_rsp;
  tcdm_req_t soc_req;  tcdm_rsp_t soc_rsp;
  ext_req_t  ereq;     ext_rsp_t  ersp;
  logic [7:0] irq, nbusy;
  logic dma_done, dma_busy;

  ntx_cluster dut (.clk_i(clk), .rst_ni(rst_n), .core_req_i(core_req), .core_rsp_o(core_rsp),
    .soc_req_o(soc_req), .soc_rsp_i(soc_rsp), .dma_ext_req_o(ereq), .dma_ext_rsp_i(ersp),
    .ntx_irq_o(irq), .ntx_busy_o(nbusy), .dma_done_o(dma_done), .dma_busy_o(dma_busy));

  // ---------------- external memory (64-bit words), SoC port responder
  logic [63:0] emem [8192];
  logic eg;
  assign ersp.gnt = ereq.req && eg;
  assign soc_rsp.gnt = soc_req.req;
  always_ff @(posedge clk) begin
    eg <= $urandom_range(0, 3) != 0;
    ersp.rvalid <= ereq.req && ersp.gnt;
    if (ereq.req && ersp.gnt) begin
      if (ereq.we) emem[ereq.addr[15:3]] <= ereq.wdata;
      else ersp.rdata <= emem[ereq.addr[15:3]];
    end
    soc_rsp.rvalid <= soc_req.req;
    soc_rsp.rdata  <= 32'h0;
  end

  // ---------------- mechanism counters
  int dma_in_beats = 0, dma_out_beats = 0, overlap = 0, conflicts = 0, init_slots = 0;
  int st_port[2] = '{0, 0}, fpu_stalls = 0, queued = 0, irqs = 0, cycles = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ereq.req && ersp.gnt) begin if (ereq.we) dma_out_beats++; else dma_in_beats++; end
    if (dma_busy && |nbusy) overlap++;
  end
  for (genvar k = 0; k < 8; k++) begin : gen_mon
    always @(posedge clk) if (rst_n) begin
      for (int p = 0; p < 2; p++) begin
        if (dut.x_req[1+2*k+p].req && !dut.x_rsp[1+2*k+p].gnt) conflicts++;
        if (dut.x_req[1+2*k+p].req && dut.x_req[1+2*k+p].we && dut.x_rsp[1+2*k+p].gnt) st_port[p]++;
      end
      if (dut.gen_ntx[k].i_ntx.ucmd_push && dut.gen_ntx[k].i_ntx.ucmd_in.init_mem) init_slots++;
      if (!dut.gen_ntx[k].i_ntx.ucmd_empty && !dut.gen_ntx[k].i_ntx.ucmd_pop) fpu_stalls++;
      if (dut.gen_ntx[k].i_ntx.ctrl_done) irqs++;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  // ---------------- processor accesses
  task automatic core_wr(logic [31:0] a, logic [31:0] d);
    core_req = '{req: 1'b1, addr: a, we: 1'b1, be: 4'hF, wdata: d};
    #1 while (!core_rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 core_req.req = 0;
  endtask
  task automatic core_rd(logic [31:0] a, output logic [31:0] d);
    core_req = '{req: 1'b1, addr: a, we: 1'b0, be: 4'hF, wdata: 0};
    #1 while (!core_rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 core_req.req = 0;
    while (!core_rsp.rvalid) begin @(posedge clk); #1; end
    d = core_rsp.rdata;
    @(posedge clk); #1;
  endtask

  localparam logic [31:0] DMA = PERIPH_BASE + DMA_OFFSET;
  task automatic dma_2d(logic [31:0] src, logic [31:0] dst, int len, int sstr, int dstr, int reps, bit to_ext);
    core_wr(DMA + 32'h00, src); core_wr(DMA + 32'h04, dst); core_wr(DMA + 32'h08, 32'(len));
    core_wr(DMA + 32'h0C, 32'(sstr)); core_wr(DMA + 32'h10, 32'(dstr)); core_wr(DMA + 32'h14, 32'(reps));
    core_wr(DMA + 32'h18, 32'(to_ext));
  endtask
  task automatic dma_wait();
    logic [31:0] s;
    do core_rd(DMA + 32'h1C, s); while (s[0]);
  endtask

  // Strides for one AGU from per-loop element offsets (bytes): the stride of
  // loop k moves one step in k and rewinds all loops below it.
  function automatic logic [4:0][31:0] strides(int n[5], int o[5]);
    logic [4:0][31:0] s; int rew;
    rew = 0;
    for (int k = 0; k < 5; k++) begin
      s[k] = 32'(o[k] - rew);
      rew += (n[k] - 1) * o[k];
    end
    return s;
  endfunction

  task automatic ntx_setup(int k, int n[5], logic [31:0] b0, int o0[5], logic [31:0] b1, int o1[5], logic [31:0] b2, int o2[5]);
    logic [31:0] base; logic [4:0][31:0] s0, s1, s2;
    base = PERIPH_BASE + 32'(k * 256);
    s0 = strides(n, o0); s1 = strides(n, o1); s2 = strides(n, o2);
    for (int j = 0; j < 5; j++) core_wr(base + 32'(REG_BOUND0) + 32'(4*j), 32'(n[j] - 1));
    core_wr(base + 32'(REG_BASE0), b0); core_wr(base + 32'(REG_BASE0) + 4, b1); core_wr(base + 32'(REG_BASE0) + 8, b2);
    for (int j = 0; j < 5; j++) begin
      core_wr(base + 32'(REG_STRIDE0) + 32'(4*j), s0[j]);
      core_wr(base + 32'(REG_STRIDE0) + 32'(4*(5+j)), s1[j]);
      core_wr(base + 32'(REG_STRIDE0) + 32'(4*(10+j)), s2[j]);
    end
  endtask

  task automatic ntx_issue(int k);
    cmd_word_t c;
    c = '0; c.opcode = OP_MAC; c.init_level = 3; c.store_level = 3; c.outer_level = 5; c.init_src = ISRC_AGU2;
    if (nbusy[k]) queued++;
    core_wr(PERIPH_BASE + 32'(k * 256) + 32'(REG_CMD), 32'(c));
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Problem size: image D x IH x IW in external memory, tiles of H x W.
  localparam int K = 8, D = 4, U = 3, V = 3, H = 8, W = 8, IH = 8, IW = 16;
  localparam int OH = H - U + 1, OW = W - V + 1;
  // external memory layout (bytes)
  localparam int E_X = 32'h0000, E_W = 32'h2000, E_B = 32'h3000, E_Y0 = 32'h4000, E_Y1 = 32'h6000;
  // TCDM layout (bytes from TCDM_BASE)
  localparam int T_W = 32'h0000, T_X0 = 32'h1000, T_X1 = 32'h2000, T_Y0 = 32'h3000, T_Y1 = 32'h5000;

  longint img [D][IH][IW];
  longint wt  [K][D][U][V];
  longint bias[K];

  function automatic void put32(int byte_addr, logic [31:0] v);
    if (byte_addr[2]) emem[byte_addr >> 3][63:32] = v; else emem[byte_addr >> 3][31:0] = v;
  endfunction
  function automatic logic [31:0] get32(int byte_addr);
    return byte_addr[2] ? emem[byte_addr >> 3][63:32] : emem[byte_addr >> 3][31:0];
  endfunction

  task automatic load_tile(int col0, int t_x, int e_y_init_dummy);
    // D*H rows of W floats, from column col0 of the image
    dma_2d(E_X + 4*col0, TCDM_BASE + t_x, 4*W, 4*IW, 4*W, D*H, 0);
  endtask

  task automatic issue_all(int t_x, int t_y);
    int n[5], ox[5], ow[5], oy[5];
    n  = '{V, U, D, OW, OH};
    ox = '{4, 4*W, 4*H*W, 4, 4*W};
    ow = '{4, 4*V, 4*U*V, 0, 0};
    oy = '{0, 0, 0, 4, 4*OW};
    for (int k = 0; k < K; k++) begin
      ntx_setup(k, n, TCDM_BASE + t_x, ox, TCDM_BASE + T_W + 4*k*D*U*V, ow, TCDM_BASE + t_y + 4*k*OH*OW, oy);
      ntx_issue(k);
    end
  endtask

  task automatic check_tile(int col0, int e_y, string tag);
    for (int k = 0; k < K; k++) for (int n = 0; n < OH; n++) for (int m = 0; m < OW; m++) begin
      longint e;
      e = bias[k];
      for (int d = 0; d < D; d++) for (int u = 0; u < U; u++) for (int v = 0; v < V; v++)
        e += img[d][n+u][col0+m+v] * wt[k][d][u][v];
      chk(get32(e_y + 4*((k*OH + n)*OW + m)) == int_to_f(e),
          $sformatf("%s y[%0d][%0d][%0d] = %h, expected %0d", tag, k, n, m, get32(e_y + 4*((k*OH + n)*OW + m)), e));
    end
  endtask

  initial begin
    int t_start, t_tile0;
    core_req = '0;
    for (int i = 0; i < 8192; i++) emem[i] = 64'h0;
    foreach (img[d, i, j]) begin img[d][i][j] = longint'($urandom_range(0, 30)) - 15; put32(E_X + 4*((d*IH + i)*IW + j), int_to_f(img[d][i][j])); end
    foreach (wt[k, d, u, v]) begin wt[k][d][u][v] = longint'($urandom_range(0, 10)) - 5; put32(E_W + 4*(((k*D + d)*U + u)*V + v), int_to_f(wt[k][d][u][v])); end
    foreach (bias[k]) bias[k] = longint'($urandom_range(0, 20)) - 10;
    // bias broadcast into y-init images for both tiles
    for (int k = 0; k < K; k++) for (int i = 0; i < OH*OW; i++) begin
      put32(E_B + 4*(k*OH*OW + i), int_to_f(bias[k]));
    end
    repeat (3) @(posedge clk); rst_n = 1; #1;
    for (int k = 0; k < K; k++) core_wr(PERIPH_BASE + 32'(k*256) + 32'(REG_CTRL), 1);
    t_start = cycles;
    // weights, bias (as initial y) for tile 0 and tile 0 inputs
    dma_2d(E_W, TCDM_BASE + T_W, 4*K*D*U*V, 0, 0, 1, 0); dma_wait();
    dma_2d(E_B, TCDM_BASE + T_Y0, 4*K*OH*OW, 0, 0, 1, 0); dma_wait();
    dma_2d(E_B, TCDM_BASE + T_Y1, 4*K*OH*OW, 0, 0, 1, 0); dma_wait();
    load_tile(0, T_X0, 0); dma_wait();
    issue_all(T_X0, T_Y0);
    // double buffering: next tile's inputs and initial outputs while the NTX run
    load_tile(W - V + 1, T_X1, 0); dma_wait();
    issue_all(T_X1, T_Y1);    // queued behind the running commands
    // write back tile 0 once its commands are done: the queued tile-1 ones start then
    begin
      logic [31:0] s; bit any;
      do begin
        any = 0;
        for (int k = 0; k < K; k++) begin core_rd(PERIPH_BASE + 32'(k*256) + 32'(REG_STATUS), s); if (s[1]) any = 1; end
      end while (any);
    end
    t_tile0 = cycles;
    wait (nbusy == 0);
    @(posedge clk); #1;
    dma_2d(TCDM_BASE + T_Y0, E_Y0, 4*K*OH*OW, 0, 0, 1, 1); dma_wait();
    dma_2d(TCDM_BASE + T_Y1, E_Y1, 4*K*OH*OW, 0, 0, 1, 1); dma_wait();
    check_tile(0, E_Y0, "tile 0");
    check_tile(W - V + 1, E_Y1, "tile 1");
    $display("cycles %0d: dma beats in %0d out %0d, overlap %0d, conflicts %0d, init slots %0d, stores p0 %0d p1 %0d, fpu stalls %0d, queued %0d, irqs %0d",
             cycles - t_start, dma_in_beats, dma_out_beats, overlap, conflicts, init_slots, st_port[0], st_port[1], fpu_stalls, queued, irqs);
    chk(dma_in_beats == (4*K*D*U*V + 2*4*K*OH*OW + 2*4*D*H*W) / 8, "DMA input beats");
    chk(dma_out_beats == 2*4*K*OH*OW / 8, "DMA output beats");
    chk(overlap > 0, "DMA overlapped with NTX computation");
    chk(conflicts > 0, "TCDM bank conflicts occurred");
    chk(init_slots == 2*K*OH*OW, "one INIT slot per output pixel");
    chk(st_port[0] + st_port[1] == 2*K*OH*OW, "one store per output pixel");
    chk(st_port[0] > 0 && st_port[1] > 0, "stores on both ports");
    chk(fpu_stalls > 0, "FPU stalled on operands");
    chk(queued > 0, "commands queued behind running ones");
    chk(irqs == 2*K, "one done pulse per command");
    chk(irq == 8'hFF, "interrupt lines raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
