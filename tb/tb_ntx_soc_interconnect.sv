// tb_ntx_soc_interconnect: self-checking test of the SoC interconnect.
//
// Six 64-bit masters (with the default four cube ports) run random traffic
// at the same time: each owns a slice of the L2 window and of the cube's
// address space, writes random data with random byte enables and reads it
// back, one access outstanding per master. The L2 and the four 256-bit
// cube ports are behavioural memories that grant at random and answer in
// order after a random delay. Checked: the read data against a model per
// master, that writes reach the right 64-bit lane of the right cube port
// (port = address bits [6:5]), that every target answers only what it
// granted, and that nothing hangs. Counted (each must occur): grants per
// target, requests held off by another master, cycles with more than one
// answer outstanding at a target, and a target refusing requests because
// its in-order FIFO is full.
module tb_ntx_soc_interconnect;
  import ntx_pkg::*;

  localparam int NM = 6, NP = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ext_req_t [NM-1:0] req; ext_rsp_t [NM-1:0] rsp;
  ext_req_t l2_req; ext_rsp_t l2_rsp;
  lob_req_t [NP-1:0] lob_req; lob_rsp_t [NP-1:0] lob_rsp;

  ntx_soc_interconnect #(.NUM_MASTERS(NM), .NUM_PORTS(NP)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp),
    .l2_req_o(l2_req), .l2_rsp_i(l2_rsp), .lob_req_o(lob_req), .lob_rsp_i(lob_rsp));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", what); end
  endtask

  // ---------------- target models: random grant, in-order random delay
  logic [63:0]  l2m  [bit [31:0]];
  logic [255:0] lobm [bit [31:0]];
  int grants[1+NP], held = 0, multi = 0, full_seen = 0;

  typedef struct { int due; logic [255:0] data; } ans_t;
  ans_t q[1+NP][$];
  logic [1+NP-1:0] g;
  int cyc = 0;

  // answers are registered here and merged with the grants below
  logic [1+NP-1:0] rv;
  logic [255:0]    rd [1+NP];
  always_comb begin
    l2_rsp.gnt    = l2_req.req && g[0];
    l2_rsp.rvalid = rv[0];
    l2_rsp.rdata  = rd[0][63:0];
    for (int p = 0; p < NP; p++) begin
      lob_rsp[p].gnt    = lob_req[p].req && g[1+p];
      lob_rsp[p].rvalid = rv[1+p];
      lob_rsp[p].rdata  = rd[1+p];
    end
  end

  always @(posedge clk) begin
    cyc++;
    for (int t = 0; t < 1 + NP; t++) g[t] <= ($urandom_range(0, 2) != 0);
    // answers
    for (int t = 0; t < 1 + NP; t++) begin
      rv[t] <= 1'b0;
      if (q[t].size() > 0 && q[t][0].due <= cyc) begin
        rv[t] <= 1'b1; rd[t] <= q[t][0].data; void'(q[t].pop_front());
      end
    end
    // accepted requests
    if (l2_req.req && l2_rsp.gnt) begin
      bit [31:0] w; ans_t a;
      w = l2_req.addr >> 3;
      if (!l2m.exists(w)) l2m[w] = '0;
      if (l2_req.we) for (int b = 0; b < 8; b++) if (l2_req.be[b]) l2m[w][8*b +: 8] = l2_req.wdata[8*b +: 8];
      a.data = 256'(l2m[w]); a.due = cyc + $urandom_range(1, 4);
      q[0].push_back(a); grants[0]++;
    end
    for (int p = 0; p < NP; p++) if (lob_req[p].req && lob_rsp[p].gnt) begin
      bit [31:0] l; ans_t a;
      l = lob_req[p].addr >> 5;
      chk(lob_req[p].addr[4:0] == 0, "cube address line aligned");
      chk(int'(l[1:0]) == p, "cube port chosen by line bits");
      if (!lobm.exists(l)) lobm[l] = '0;
      if (lob_req[p].we) for (int b = 0; b < 32; b++) if (lob_req[p].be[b]) lobm[l][8*b +: 8] = lob_req[p].wdata[8*b +: 8];
      a.data = lobm[l]; a.due = cyc + $urandom_range(1, 8);
      q[1+p].push_back(a); grants[1+p]++;
    end
    for (int t = 0; t < 1 + NP; t++) begin
      if (q[t].size() > 1) multi++;
      if (dut.t_full[t]) full_seen++;
    end
    for (int m = 0; m < NM; m++) if (req[m].req && !rsp[m].gnt) held++;
  end

  int finished = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    for (int m = 0; m < NM; m++) $display("m%0d req=%b addr=%h gnt=%b", m, req[m].req, req[m].addr, rsp[m].gnt);
    for (int t = 0; t < 1 + NP; t++) $display("t%0d q=%0d full=%b empty=%b treq=%b", t, q[t].size(), dut.t_full[t], dut.t_empty[t], dut.t_req[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- masters
  task automatic master(int m);
    logic [63:0] model [32];
    bit known [32];
    for (int i = 0; i < 32; i++) known[i] = 0;
    for (int i = 0; i < 300; i++) begin
      int w; bit l2, wr; logic [31:0] a; logic [63:0] d; logic [7:0] be;
      w  = $urandom_range(0, 31);
      l2 = w < 8;
      a  = l2 ? (L2_BASE + 32'(m * 64 + w * 8)) : (32'h8000_0000 + 32'(m * 256 + (w - 8) * 8));
      wr = !known[w] || ($urandom_range(0, 1) == 1);
      be = known[w] ? 8'($urandom) : 8'hFF;
      d  = {$urandom, $urandom};
      // requests change 1 time unit after the edge, grants are sampled
      // 3 units after it, once every master has set its request
      @(posedge clk); #1;
      req[m] = '{req: 1'b1, addr: a, we: wr, be: be, wdata: d};
      #2 while (!rsp[m].gnt) begin @(posedge clk); #3; end
      @(posedge clk); #1 req[m].req = 1'b0;
      while (!rsp[m].rvalid) begin @(posedge clk); #1; end
      if (wr) begin
        for (int b = 0; b < 8; b++) if (be[b]) model[w][8*b +: 8] = d[8*b +: 8];
        known[w] = 1;
      end else chk(rsp[m].rdata == model[w], $sformatf("master %0d read %h", m, a));
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    finished++;
  endtask

  initial begin
    req = '0; g = '0;
    rv = '0;
    for (int t = 0; t < 1 + NP; t++) rd[t] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int m = 0; m < NM; m++) fork automatic int mm = m; master(mm); join_none
    while (finished < NM) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int t = 0; t < 1 + NP; t++) begin
      chk(q[t].size() == 0, "all answers delivered");
      chk(grants[t] > 0, $sformatf("target %0d used", t));
      $display("target %0d grants %0d", t, grants[t]);
    end
    $display("held off %0d, multiple outstanding %0d, order FIFO full %0d", held, multi, full_seen);
    chk(held > 0, "requests held off by arbitration");
    chk(multi > 0, "several answers outstanding at a target");
    chk(full_seen > 0, "in-order FIFO full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
