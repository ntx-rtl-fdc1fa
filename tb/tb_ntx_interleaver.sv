// tb_ntx_interleaver: self-checking test of the NTX memory ports.
//
// Pushes random read addresses on both read streams and random stores
// (address and data), pops read data at random, and serves the two ports
// from a behavioural memory with random grants. Checks that every read
// returns the memory word at its address in stream order, that every store
// lands, that both ports carry stores, that reads never overflow their
// data FIFOs, and that a full store FIFO drains. Reads and stores use
// disjoint address ranges so that their order does not matter.
module tb_ntx_interleaver;
  import ntx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ra0_push, ra0_full, ra1_push, ra1_full, sa_push, sa_full, std_push;
  logic [31:0] ra0, ra1, sa, std, rd0, rd1;
  logic [2:0] std_count;
  logic rd0_pop, rd0_valid, rd1_pop, rd1_valid, idle;
  tcdm_req_t [1:0] preq; tcdm_rsp_t [1:0] prsp;

  ntx_interleaver dut (.clk_i(clk), .rst_ni(rst_n),
    .ra0_push_i(ra0_push), .ra0_i(ra0), .ra0_full_o(ra0_full),
    .ra1_push_i(ra1_push), .ra1_i(ra1), .ra1_full_o(ra1_full),
    .sa_push_i(sa_push), .sa_i(sa), .sa_full_o(sa_full),
    .std_push_i(std_push), .std_i(std), .std_count_o(std_count),
    .rd0_pop_i(rd0_pop), .rd0_o(rd0), .rd0_valid_o(rd0_valid),
    .rd1_pop_i(rd1_pop), .rd1_o(rd1), .rd1_valid_o(rd1_valid),
    .port_req_o(preq), .port_rsp_i(prsp), .idle_o(idle));

  logic [31:0] mem [4096];
  logic [1:0]  g;
  int stores_on[2] = '{0, 0};
  always_comb for (int p = 0; p < 2; p++) prsp[p].gnt = preq[p].req && g[p];
  always_ff @(posedge clk) for (int p = 0; p < 2; p++) begin
    g[p] <= $urandom_range(0, 3) != 0;
    prsp[p].rvalid <= preq[p].req && prsp[p].gnt;
    if (preq[p].req && prsp[p].gnt) begin
      if (preq[p].we) begin mem[preq[p].addr[13:2]] <= preq[p].wdata; stores_on[p]++; end
      else prsp[p].rdata <= mem[preq[p].addr[13:2]];
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] e0[$], e1[$];
  logic [31:0] st_a[$], st_d[$];
  int std_full_seen = 0;

  initial begin
    logic [31:0] smodel [4096];
    for (int i = 0; i < 4096; i++) begin mem[i] = $urandom; smodel[i] = mem[i]; end
    ra0_push = 0; ra1_push = 0; sa_push = 0; std_push = 0; rd0_pop = 0; rd1_pop = 0;
    ra0 = 0; ra1 = 0; sa = 0; std = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (std_count == 7) std_full_seen++;
      // consume read data
      rd0_pop = rd0_valid && ($urandom_range(0, 2) != 0) && (i < 1500 || i > 2000);
      rd1_pop = rd1_valid && ($urandom_range(0, 2) != 0) && (i < 1500 || i > 2000);
      if (rd0_pop) chk(rd0 == e0.pop_front(), "stream 0 data");
      if (rd1_pop) chk(rd1 == e1.pop_front(), "stream 1 data");
      // produce requests (reads in [0, 8 kB), stores in [8 kB, 16 kB))
      ra0_push = !ra0_full && i < 2500 && $urandom_range(0, 1);
      ra1_push = !ra1_full && i < 2500 && $urandom_range(0, 1);
      ra0 = $urandom_range(0, 2047) * 4; ra1 = $urandom_range(0, 2047) * 4;
      if (ra0_push) e0.push_back(smodel[ra0[13:2]]);
      if (ra1_push) e1.push_back(smodel[ra1[13:2]]);
      sa_push = !sa_full && i < 2500 && (std_count < 7) && ($urandom_range(0, 2) == 0 || (i > 1500 && i < 2000));
      std_push = sa_push;
      sa = 8192 + $urandom_range(0, 2047) * 4; std = $urandom;
      if (sa_push) begin smodel[sa[13:2]] = std; st_a.push_back(sa); end
    end
    while (!idle || rd0_valid || rd1_valid) begin
      @(negedge clk);
      rd0_pop = rd0_valid; rd1_pop = rd1_valid;
      if (rd0_pop) chk(rd0 == e0.pop_front(), "stream 0 data (drain)");
      if (rd1_pop) chk(rd1 == e1.pop_front(), "stream 1 data (drain)");
      ra0_push = 0; ra1_push = 0; sa_push = 0; std_push = 0;
    end
    @(negedge clk); rd0_pop = 0; rd1_pop = 0;
    chk(e0.size() == 0 && e1.size() == 0, "all reads returned");
    for (int i = 0; i < st_a.size(); i++) chk(mem[st_a[i][13:2]] == smodel[st_a[i][13:2]], "store landed");
    chk(stores_on[0] > 0 && stores_on[1] > 0, "stores used both ports");
    chk(std_full_seen > 0, "store FIFO became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
