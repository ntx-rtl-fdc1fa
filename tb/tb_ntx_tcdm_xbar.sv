// tb_ntx_tcdm_xbar: self-checking test of the TCDM logarithmic interconnect.
//
// 19 masters issue random reads and writes over the 128 kB TCDM, each with
// at most one access per cycle, keeping its request until granted. A
// reference memory is updated in grant order. Checks: every read returns
// the reference word, a bank grants at most one master per cycle, no master
// starves (round-robin), all 19 masters on one bank each get one grant in
// 19 cycles, and streams with unit stride on different banks are served in
// parallel without conflicts.
module tb_ntx_tcdm_xbar;
  import ntx_pkg::*;
  localparam int NM = 19;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  tcdm_req_t [NM-1:0] req; tcdm_rsp_t [NM-1:0] rsp;
  ntx_tcdm_xbar dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp));

  logic [31:0] model [32768];
  logic [31:0] expect_q [NM];
  bit          pend [NM];
  int          wait_c [NM], max_wait = 0, grants = 0, conflicts = 0;

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

  // Reference: apply granted accesses at the clock edge, check read data a cycle later.
  bit mode_random = 0;
  always @(posedge clk) if (rst_n) begin
    int bank_used [32];
    for (int b = 0; b < 32; b++) bank_used[b] = 0;
    for (int m = 0; m < NM; m++) begin
      if (pend[m]) begin
        chk(rsp[m].rvalid, "rvalid after grant");
        chk(rsp[m].rdata == expect_q[m] || req_was_write[m], $sformatf("master %0d read data", m));
        pend[m] = 0;
      end
    end
    for (int m = 0; m < NM; m++) begin
      if (req[m].req && rsp[m].gnt) begin
        bank_used[req[m].addr[6:2]]++;
        grants++;
        req_was_write[m] = req[m].we;
        if (req[m].we) model[req[m].addr[16:2]] = req[m].wdata;
        else expect_q[m] = model[req[m].addr[16:2]];
        pend[m] = 1;
        wait_c[m] = 0;
      end else if (req[m].req) begin
        wait_c[m]++; conflicts++;
        if (wait_c[m] > max_wait) max_wait = wait_c[m];
      end
    end
    for (int b = 0; b < 32; b++) chk(bank_used[b] <= 1, "one grant per bank per cycle");
  end
  bit req_was_write [NM];

  initial begin
    int t0;
    req = '0;
    for (int i = 0; i < 32768; i++) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // zero the memory through master 0 so the reference matches
    for (int i = 0; i < 32768; i++) begin
      @(negedge clk); req[0] = '{req: 1'b1, addr: 32'(TCDM_BASE + 4*i), we: 1'b1, be: 4'hF, wdata: 32'h0};
    end
    @(negedge clk); req[0].req = 0;
    // random traffic
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        if (!req[m].req || rsp_granted_last[m]) begin
          req[m].req   = $urandom_range(0, 1);
          req[m].addr  = TCDM_BASE + 32'($urandom_range(0, 32767) * 4);
          if (c % 500 < 50) req[m].addr = TCDM_BASE + 32'($urandom_range(0, 3) * 128); // hot bank
          req[m].we    = $urandom_range(0, 1);
          req[m].be    = 4'hF;
          req[m].wdata = $urandom;
        end
      end
    end
    @(negedge clk); req = '0;
    chk(max_wait < NM, $sformatf("no starvation (max wait %0d cycles)", max_wait));
    chk(conflicts > 0, "bank conflicts occurred");
    // all masters on bank 0: each served once within NM cycles
    @(negedge clk);
    for (int m = 0; m < NM; m++) req[m] = '{req: 1'b1, addr: TCDM_BASE + 32'(m * 128), we: 1'b0, be: 4'hF, wdata: 0};
    t0 = grants;
    for (int c = 0; c < NM; c++) begin @(negedge clk); for (int m = 0; m < NM; m++) if (rsp_granted_last[m]) req[m].req = 0; end
    chk(grants - t0 == NM, $sformatf("same-bank round robin: %0d grants in %0d cycles", grants - t0, NM));
    // unit-stride streams on disjoint banks: 16 masters, 32 words each, no conflicts
    req = '0; @(negedge clk);
    t0 = conflicts;
    for (int c = 0; c < 32; c++) begin
      for (int m = 0; m < 16; m++) req[m] = '{req: 1'b1, addr: TCDM_BASE + 32'(4 * (2*m + (c % 2))), we: 1'b0, be: 4'hF, wdata: 0};
      @(negedge clk);
    end
    req = '0;
    chk(conflicts == t0, "parallel streams on distinct banks are conflict free");
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit rsp_granted_last [NM];
  always @(posedge clk) for (int m = 0; m < NM; m++) rsp_granted_last[m] <= req[m].req && rsp[m].gnt;
endmodule
