// tb_ntx_controller: self-checking test of the NTX sequencer.
//
// Starts random loop nests (random bounds, strides, levels, init sources
// and opcodes) and records every micro-command and address the controller
// issues, with the downstream FIFOs reporting full at random. The record
// is compared with a software walk of the same nest: per body, the INIT
// slot where loops below the init level are all at 0 (when the initial
// value comes from memory), the operand addresses, and the store address
// where loops below the store level are all at their last iteration.
// Also checks that done comes only after the datapath reports idle and
// that, without back-pressure, one body issues per cycle.
module tb_ntx_controller;
  import ntx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     start, ready, busy, done, dp_idle;
  ntx_cfg_t cfg;
  logic     uc_push, uc_full, ra0_push, ra0_full, ra1_push, ra1_full, sa_push, sa_full;
  ucmd_t    uc;
  logic [31:0] ra0, ra1, sa;
  bit       bp;

  ntx_controller dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .cfg_i(cfg), .ready_o(ready),
    .busy_o(busy), .done_o(done), .dp_idle_i(dp_idle),
    .ucmd_push_o(uc_push), .ucmd_o(uc), .ucmd_full_i(uc_full),
    .ra0_push_o(ra0_push), .ra0_o(ra0), .ra0_full_i(ra0_full),
    .ra1_push_o(ra1_push), .ra1_o(ra1), .ra1_full_i(ra1_full),
    .sa_push_o(sa_push), .sa_o(sa), .sa_full_i(sa_full));

  string got[$];
  always @(posedge clk) if (rst_n) begin
    if (uc_push) got.push_back($sformatf("%s%s%s%s r0=%h r1=%h s=%h", uc.init ? "I" : "-", uc.init_mem ? "M" : "-",
      uc.body ? "B" : "-", uc.store ? "S" : "-", ra0_push ? ra0 : 32'h0, ra1_push ? ra1 : 32'h0, sa_push ? sa : 32'h0));
    uc_full  <= bp && ($urandom_range(0, 3) == 0);
    ra0_full <= bp && ($urandom_range(0, 3) == 0);
    ra1_full <= bp && ($urandom_range(0, 3) == 0);
    sa_full  <= bp && ($urandom_range(0, 3) == 0);
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cfg = '0; dp_idle = 1; bp = 0;
    uc_full = 0; ra0_full = 0; ra1_full = 0; sa_full = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      string exp_q[$];
      int n[5], idx[5], nl, il, sl, total, cyc, bodies;
      logic [31:0] ad[3];
      op_lut_t lut;
      exp_q.delete();
      bp = (t % 2 == 1);
      cfg = '0;
      nl = $urandom_range(1, 5);
      for (int k = 0; k < 5; k++) begin n[k] = (k < nl) ? $urandom_range(1, 3) : 1; cfg.bound[k] = 16'(n[k] - 1); idx[k] = 0; end
      for (int g = 0; g < 3; g++) begin
        cfg.base[g] = $urandom & 32'hFFFC; ad[g] = cfg.base[g];
        for (int k = 0; k < 5; k++) cfg.stride[g][k] = $urandom_range(0, 255) * 4;
      end
      il = $urandom_range(0, nl); sl = $urandom_range(0, nl);
      cfg.cmd.outer_level = 3'(nl); cfg.cmd.init_level = 3'(il); cfg.cmd.store_level = 3'(sl);
      cfg.cmd.init_src = isrc_e'($urandom_range(0, 3));
      cfg.cmd.opcode = opcode_e'($urandom_range(0, 7));
      cfg.cmd.a_src = asrc_e'($urandom_range(0, 3));
      lut = op_lut(cfg.cmd.opcode);
      if (cfg.cmd.a_src != ASRC_NONE) lut.a_src = cfg.cmd.a_src;
      // software walk of the nest
      total = 1; for (int k = 0; k < nl; k++) total *= n[k];
      for (int s = 0; s < total; s++) begin
        bit f, l; int lvl; logic [31:0] r0, r1;
        f = 1; l = 1;
        for (int j = 0; j < il; j++) if (idx[j] != 0) f = 0;
        for (int j = 0; j < sl; j++) if (idx[j] != n[j] - 1) l = 0;
        if (f && cfg.cmd.init_src != ISRC_ZERO)
          exp_q.push_back($sformatf("IM-- r0=%h r1=%h s=%h", ad[int'(cfg.cmd.init_src)], 32'h0, 32'h0));
        r0 = (lut.a_src == ASRC_NONE) ? 32'h0 : ad[int'(lut.a_src)];
        r1 = (lut.b_src == BSRC_AGU1) ? ad[1] : 32'h0;
        exp_q.push_back($sformatf("%s-B%s r0=%h r1=%h s=%h", (f && cfg.cmd.init_src == ISRC_ZERO) ? "I" : "-",
          l ? "S" : "-", r0, r1, l ? ad[2] : 32'h0));
        lvl = 0;
        for (int k = 0; k < nl; k++) begin
          if (idx[k] == n[k] - 1) idx[k] = 0;
          else begin idx[k]++; lvl = k; break; end
        end
        if (s == total - 1) lvl = nl - 1;
        for (int g = 0; g < 3; g++) ad[g] += cfg.stride[g][lvl];
      end
      got.delete();
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 0; dp_idle = 0;
      while (got.size() < exp_q.size() && cyc < 5000) begin @(negedge clk); cyc++; end
      if (!bp) chk(cyc <= exp_q.size() + 1, $sformatf("rate: %0d cycles for %0d slots", cyc, exp_q.size()));
      repeat (3) @(negedge clk);
      chk(!done && busy, "waits for the datapath before done");
      dp_idle = 1;
      @(posedge clk); #1; chk(done, "done pulse");
      @(negedge clk); chk(ready, "ready again");
      chk(got.size() == exp_q.size(), $sformatf("t%0d: %0d slots, expected %0d", t, got.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < got.size(); i++)
        chk(got[i] == exp_q[i], $sformatf("t%0d slot %0d: %s expected %s", t, i, got[i], exp_q[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
