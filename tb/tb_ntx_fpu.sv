// tb_ntx_fpu: self-checking test of the NTX datapath.
//
// Feeds micro-commands and operand words from testbench queues, with
// random gaps in operand arrival and a store-data FIFO model that is
// drained slowly, and compares each stored result with a model: MAC with
// init from memory and with init 0.0, NMAC, ADD with b = 1.0, ReLU on
// writeback, MAX/MIN, ARGMAX/ARGMIN (ties keep the first index). Also
// checks that the datapath stalls instead of overrunning the store FIFO.
module tb_ntx_fpu;
  import ntx_pkg::*;
  import ntx_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ucmd_t       uc;
  logic        uc_valid, uc_pop, rd0_valid, rd0_pop, rd1_valid, rd1_pop, std_push, idle;
  logic [31:0] rd0, rd1, std_data;
  logic [2:0]  std_count;

  ntx_fpu dut (.clk_i(clk), .rst_ni(rst_n), .ucmd_i(uc), .ucmd_valid_i(uc_valid), .ucmd_pop_o(uc_pop),
               .rd0_i(rd0), .rd0_valid_i(rd0_valid), .rd0_pop_o(rd0_pop),
               .rd1_i(rd1), .rd1_valid_i(rd1_valid), .rd1_pop_o(rd1_pop),
               .std_count_i(std_count), .std_push_o(std_push), .std_data_o(std_data), .idle_o(idle));

  ucmd_t       cq[$];
  logic [31:0] aq[$], bq[$], exp_q[$], std_q[$];
  bit          gate_a, gate_b;
  int          overruns = 0, stalls = 0;

  assign uc        = cq.size() > 0 ? cq[0] : '0;
  assign uc_valid  = cq.size() > 0;
  assign rd0       = aq.size() > 0 ? aq[0] : '0;
  assign rd1       = bq.size() > 0 ? bq[0] : '0;
  assign rd0_valid = aq.size() > 0 && gate_a;
  assign rd1_valid = bq.size() > 0 && gate_b;
  assign std_count = 3'(std_q.size());

  always @(posedge clk) if (rst_n) begin
    if (uc_valid && !uc_pop) stalls++;
    if (uc_pop) void'(cq.pop_front());
    if (rd0_pop) void'(aq.pop_front());
    if (rd1_pop) void'(bq.pop_front());
    if (std_push) begin
      if (std_q.size() >= 7) overruns++;
      std_q.push_back(std_data);
    end
    if (std_q.size() > 0 && $urandom_range(0, 3) == 0) begin
      logic [31:0] g, e;
      g = std_q.pop_front(); e = exp_q.pop_front();
      checks++;
      if (g !== e) begin failures++; $display("FAIL result %h expected %h", g, e); end
    end
    gate_a <= $urandom_range(0, 4) != 0;
    gate_b <= $urandom_range(0, 4) != 0;
  end

  function automatic ucmd_t mk(fpu_fn_e fn, bit init, bit init_mem, bit body, bsrc_e bs, bit store, bit relu);
    ucmd_t u;
    u = '0; u.fn = fn; u.init = init; u.init_mem = init_mem; u.body = body;
    u.a_mem = body; u.b_mem = body && bs == BSRC_AGU1; u.b_src = bs; u.store = store; u.relu = relu;
    return u;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_a = 1; gate_b = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 80; t++) begin
      int n, kind; longint acc; fpu_fn_e fn; bit from_mem, relu; int bi;
      n = $urandom_range(1, 12); kind = $urandom_range(0, 6);
      from_mem = $urandom_range(0, 1); relu = $urandom_range(0, 1);
      fn = (kind == 0 || kind == 5) ? FN_MAC : (kind == 1) ? FN_NMAC : (kind == 2) ? FN_MAX
         : (kind == 3) ? FN_MIN : (kind == 4) ? FN_ARGMAX : FN_ARGMIN;
      if (kind == 6) fn = FN_MAC;
      acc = 0; bi = 0;
      if (from_mem) begin
        longint iv; iv = longint'($urandom_range(0, 40)) - 20;
        cq.push_back(mk(fn, 1, 1, 0, BSRC_ONE, 0, relu)); aq.push_back(int_to_f(iv)); acc = iv;
      end
      for (int i = 0; i < n; i++) begin
        longint av, bv; bsrc_e bs;
        av = longint'($urandom_range(0, 40)) - 20; bv = longint'($urandom_range(0, 40)) - 20;
        bs = (kind == 5) ? BSRC_ONE : (kind == 6) ? BSRC_ZERO : BSRC_AGU1;
        if (!(fn inside {FN_MAC, FN_NMAC})) bs = BSRC_NONE;
        cq.push_back(mk(fn, !from_mem && i == 0, 0, 1, bs, i == n - 1, relu));
        aq.push_back(int_to_f(av));
        if (bs == BSRC_AGU1) bq.push_back(int_to_f(bv));
        if (bs == BSRC_ONE) bv = 1;
        if (bs == BSRC_ZERO) bv = 0;
        case (fn)
          FN_MAC:  acc += av * bv;
          FN_NMAC: acc -= av * bv;
          FN_MAX, FN_ARGMAX: if (av > acc) begin acc = av; bi = from_mem ? i : i; end
          default: if (av < acc) begin acc = av; bi = i; end
        endcase
      end
      if (fn inside {FN_ARGMAX, FN_ARGMIN}) exp_q.push_back(32'(bi));
      else exp_q.push_back(int_to_f((relu && acc < 0) ? 0 : acc));
      while (cq.size() > 4) @(posedge clk);
    end
    while (cq.size() > 0 || std_q.size() > 0 || !idle) @(posedge clk);
    checks++; if (overruns != 0) begin failures++; $display("FAIL store FIFO overrun"); end
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
