// tb_ntx: self-checking test of one NTX coprocessor.
//
// The NTX is configured through its register port and works on a
// behavioural two-port memory that grants requests at random in the
// stalling phases. Checked against results computed in the testbench:
//   1. matrix-vector product with bias, y[i] = y[i] + sum_j W[i][j]*x[j]
//      (init from memory via AGU2, store at level 1), with the cycle count
//      of the stall-free run (one body per cycle plus one init slot per row);
//   2. a 3-level convolution-like nest with init 0.0 and ReLU on writeback;
//   3. ARGMAX and MAX over rows (maxpool and its index);
//   4. element-wise SUB with store at level 0;
//   5. a second command staged and issued while the first runs;
//   6. the completion interrupt and the STATUS register;
//   7. operand a taken from AGU2 (the command's a-source field), in place.
module tb_ntx;
  import ntx_pkg::*;
  import ntx_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint ref_v [64];

  tcdm_req_t       reg_req;
  tcdm_rsp_t       reg_rsp;
  tcdm_req_t [1:0] m_req;
  tcdm_rsp_t [1:0] m_rsp;
  logic irq, busy;
  int checks = 0, failures = 0;
  bit stall = 0;
  int stalls = 0;

  ntx dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(reg_req), .reg_rsp_o(reg_rsp),
           .tcdm_req_o(m_req), .tcdm_rsp_i(m_rsp), .irq_o(irq), .busy_o(busy));

  // Behavioural memory: 16k words, two ports, random grants when stalling.
  logic [31:0] mem [16384];
  logic [1:0]  gnt_r;
  always_comb for (int p = 0; p < 2; p++) m_rsp[p].gnt = m_req[p].req && gnt_r[p];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      gnt_r[p] <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
      m_rsp[p].rvalid <= m_req[p].req && m_rsp[p].gnt;
      if (m_req[p].req && !m_rsp[p].gnt) stalls++;
      if (m_req[p].req && m_rsp[p].gnt) begin
        if (m_req[p].we) mem[m_req[p].addr[15:2]] <= m_req[p].wdata;
        else m_rsp[p].rdata <= mem[m_req[p].addr[15:2]];
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [7:0] off, logic [31:0] d);
    reg_req = '{req: 1'b1, addr: {24'd0, off}, we: 1'b1, be: 4'hF, wdata: d};
    #1 while (!reg_rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 reg_req.req = 0;
  endtask

  task automatic rd(logic [7:0] off, output logic [31:0] d);
    reg_req = '{req: 1'b1, addr: {24'd0, off}, we: 1'b0, be: 4'hF, wdata: 0};
    #1 while (!reg_rsp.gnt) begin @(posedge clk); #1; end
    @(posedge clk); #1 reg_req.req = 0;
    @(posedge clk); d = reg_rsp.rdata; #1;
  endtask

  task automatic set_loops(int n0, int n1, int n2, int n3, int n4);
    int n[5]; n = '{n0, n1, n2, n3, n4};
    for (int k = 0; k < 5; k++) wr(REG_BOUND0 + 8'(4*k), 32'(n[k] - 1));
  endtask

  task automatic set_agu(int g, int base, int s0, int s1, int s2, int s3, int s4);
    int s[5]; s = '{s0, s1, s2, s3, s4};
    wr(REG_BASE0 + 8'(4*g), 32'(base));
    for (int k = 0; k < 5; k++) wr(REG_STRIDE0 + 8'(4*(5*g+k)), 32'(s[k]));
  endtask

  function automatic logic [31:0] cmd(opcode_e op, int il, int sl, int ol, isrc_e is, bit relu);
    cmd_word_t c;
    c = '0;
    c.opcode = op; c.init_level = 3'(il); c.store_level = 3'(sl);
    c.outer_level = 3'(ol); c.init_src = is; c.relu = relu;
    return 32'(c);
  endfunction

  task automatic wait_idle(output int cycles);
    cycles = 0;
    do begin @(posedge clk); cycles++; end while (busy);
    #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W_A = 32'h0000, X_A = 32'h4000, Y_A = 32'h6000, Z_A = 32'h8000;

  initial begin
    logic [31:0] d;
    int cyc, M, N;
    longint exp_v;
    reg_req = '0;
    for (int i = 0; i < 16384; i++) mem[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    wr(REG_CTRL, 1);

    // ---- 1. matrix-vector with bias, no stalls, cycle count
    M = 12; N = 20;
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) mem[(W_A>>2) + i*N + j] = int_to_f(longint'($urandom_range(0, 40)) - 20);
    for (int j = 0; j < N; j++) mem[(X_A>>2) + j] = int_to_f(longint'($urandom_range(0, 40)) - 20);
    for (int i = 0; i < M; i++) mem[(Y_A>>2) + i] = int_to_f(longint'(i) - 5);
    set_loops(N, M, 1, 1, 1);
    set_agu(0, W_A, 4, 4, 0, 0, 0);
    set_agu(1, X_A, 4, -(N-1)*4, 0, 0, 0);
    set_agu(2, Y_A, 0, 4, 0, 0, 0);
    wr(REG_CMD, cmd(OP_MAC, 1, 1, 2, ISRC_AGU2, 0));
    wait_idle(cyc);
    for (int i = 0; i < M; i++) begin
      exp_v = longint'(i) - 5;
      for (int j = 0; j < N; j++) exp_v += f_to_int(mem[(W_A>>2) + i*N + j]) * f_to_int(mem[(X_A>>2) + j]);
      chk(mem[(Y_A>>2) + i] == int_to_f(exp_v), $sformatf("matvec y[%0d] = %h, expected %0d", i, mem[(Y_A>>2)+i], exp_v));
    end
    // one body per cycle plus one init slot per row, plus pipeline fill/drain
    chk(cyc >= M*N + M && cyc <= M*N + M + 16, $sformatf("matvec took %0d cycles for %0d bodies", cyc, M*N));
    chk(irq, "interrupt after completion");
    rd(REG_IRQ, d); chk(d[0], "done flag");
    wr(REG_IRQ, 1);
    rd(REG_IRQ, d); chk(!d[0] && !irq, "done flag cleared");

    // ---- 2. 2D convolution-like nest with stalls: z[n][m] = relu(sum_u sum_v x[n+u][m+v]*w[u][v])
    stall = 1;
    begin
      int H = 8, Wd = 8, K = 3, OH, OW;
      OH = H - K + 1; OW = Wd - K + 1;
      for (int i = 0; i < H*Wd; i++) mem[(X_A>>2) + i] = int_to_f(longint'($urandom_range(0, 16)) - 8);
      for (int i = 0; i < K*K; i++) mem[(W_A>>2) + i] = int_to_f(longint'($urandom_range(0, 6)) - 3);
      set_loops(K, K, OW, OH, 1);
      // AGU0 walks x, AGU1 walks w, AGU2 walks z
      set_agu(0, X_A, 4, 4*(Wd-K+1), 4*(1 - (K-1)*Wd - (K-1)), 4*(Wd - (OW-1) - (K-1)*Wd - (K-1)), 0);
      set_agu(1, W_A, 4, 4, -4*(K*K-1), -4*(K*K-1), 0);
      set_agu(2, Z_A, 0, 0, 4, 4, 0);
      wr(REG_CMD, cmd(OP_MAC, 2, 2, 4, ISRC_ZERO, 1));
      wait_idle(cyc);
      for (int n = 0; n < OH; n++) for (int m = 0; m < OW; m++) begin
        exp_v = 0;
        for (int u = 0; u < K; u++) for (int v = 0; v < K; v++)
          exp_v += f_to_int(mem[(X_A>>2) + (n+u)*Wd + m+v]) * f_to_int(mem[(W_A>>2) + u*K + v]);
        if (exp_v < 0) exp_v = 0;
        chk(mem[(Z_A>>2) + n*OW + m] == int_to_f(exp_v), $sformatf("conv z[%0d][%0d]=%h exp %0d", n, m, mem[(Z_A>>2) + n*OW + m], exp_v));
      end
    end

    // ---- 3. ARGMAX then MAX over 6 rows of 10
    M = 6; N = 10;
    for (int i = 0; i < M*N; i++) mem[(X_A>>2) + i] = int_to_f(longint'($urandom_range(0, 200)) - 100);
    set_loops(N, M, 1, 1, 1);
    set_agu(0, X_A, 4, 4, 0, 0, 0);
    set_agu(1, 0, 0, 0, 0, 0, 0);
    set_agu(2, Y_A, 0, 4, 0, 0, 0);
    wr(REG_CMD, cmd(OP_ARGMAX, 1, 1, 2, ISRC_AGU0, 0));
    wait_idle(cyc);
    set_agu(2, Z_A, 0, 4, 0, 0, 0);
    wr(REG_CMD, cmd(OP_MAX, 1, 1, 2, ISRC_AGU0, 0));
    wait_idle(cyc);
    for (int i = 0; i < M; i++) begin
      longint best; int bi;
      best = f_to_int(mem[(X_A>>2) + i*N]); bi = 0;
      for (int j = 1; j < N; j++) if (f_to_int(mem[(X_A>>2) + i*N + j]) > best) begin best = f_to_int(mem[(X_A>>2) + i*N + j]); bi = j; end
      chk(mem[(Y_A>>2) + i] == 32'(bi), $sformatf("argmax row %0d = %0d exp %0d", i, mem[(Y_A>>2)+i], bi));
      chk(mem[(Z_A>>2) + i] == int_to_f(best), $sformatf("max row %0d", i));
    end

    // ---- 4. element-wise z = y - x (SUB, init from AGU2 at level 0, store level 0)
    N = 30;
    for (int i = 0; i < N; i++) begin
      mem[(X_A>>2) + i] = int_to_f(longint'($urandom_range(0, 100)));
      mem[(Y_A>>2) + i] = int_to_f(longint'($urandom_range(0, 100)));
    end
    set_loops(N, 1, 1, 1, 1);
    set_agu(0, X_A, 4, 0, 0, 0, 0);
    set_agu(2, Y_A, 4, 0, 0, 0, 0);
    wr(REG_CMD, cmd(OP_SUB, 0, 0, 1, ISRC_AGU2, 0));
    // ---- 5. stage and issue a second command while the first runs: MIN over x
    set_loops(N, 1, 1, 1, 1);
    set_agu(0, X_A, 4, 0, 0, 0, 0);
    set_agu(2, Z_A, 0, 0, 0, 0, 0);
    rd(REG_STATUS, d); chk(d[0], "busy while running");
    wr(REG_CMD, cmd(OP_MIN, 1, 1, 1, ISRC_AGU0, 0));
    wait_idle(cyc);
    begin
      longint mn; mn = 1000;
      for (int i = 0; i < N; i++) begin
        longint xv, yv;
        xv = f_to_int(mem[(X_A>>2) + i]);
        if (xv < mn) mn = xv;
      end
      chk(mem[(Z_A>>2)] == int_to_f(mn), "min (second, queued command)");
    end
    // ---- 7. operand a from AGU2, in place: y[i] = x[i] - y[i]
    //         (init x from AGU0, a = *AGU2, store *AGU2 at level 0)
    for (int i = 0; i < N; i++) begin
      mem[(X_A>>2) + i] = int_to_f(longint'($urandom_range(0, 100)));
      mem[(Y_A>>2) + i] = int_to_f(longint'($urandom_range(0, 100)));
      ref_v[i] = f_to_int(mem[(X_A>>2) + i]) - f_to_int(mem[(Y_A>>2) + i]);
    end
    set_loops(N, 1, 1, 1, 1);
    set_agu(0, X_A, 4, 0, 0, 0, 0);
    set_agu(2, Y_A, 4, 0, 0, 0, 0);
    wr(REG_CMD, cmd(OP_SUB, 0, 0, 1, ISRC_AGU0, 0) | (32'(ASRC_AGU2) << 16));
    wait_idle(cyc);
    for (int i = 0; i < N; i++)
      chk(mem[(Y_A>>2) + i] == int_to_f(ref_v[i]), $sformatf("in-place sub a=*AGU2 [%0d]", i));
    rd(REG_STATUS, d); chk(d == 0, "idle status");
    chk(stalls > 0, "memory stalls were exercised");
    $display("stall count %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
