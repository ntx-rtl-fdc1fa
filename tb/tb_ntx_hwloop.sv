// tb_ntx_hwloop: self-checking test of the five nested hardware loops.
//
// Steps random loop nests (random bounds, 1..5 active loops) through
// their full iteration space and compares the counters, the enabled level
// and the first/last flags with a software model of nested for-loops. Also
// checks that the nest ends after exactly prod(bounds) steps.
module tb_ntx_hwloop;
  import ntx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, step;
  logic [4:0][15:0] bound, cnt;
  logic [2:0] nl, level;
  logic [5:0] first, last;
  int checks = 0, failures = 0;

  ntx_hwloop dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .step_i(step), .bound_i(bound),
                  .num_loops_i(nl), .cnt_o(cnt), .level_o(level), .first_o(first), .last_o(last));

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

  initial begin
    clear = 0; step = 0; bound = '0; nl = 5;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int n[5], total, idx[5], nla, lvl;
      nla = 1 + (t % 5);
      for (int k = 0; k < 5; k++) begin
        n[k] = (k < nla) ? $urandom_range(1, 4) : 1;
        bound[k] = 16'($urandom_range(1, 4) - 1);
        if (k < nla) bound[k] = 16'(n[k] - 1);
        idx[k] = 0;
      end
      total = 1; for (int k = 0; k < nla; k++) total *= n[k];
      nl = 3'(nla);
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      for (int s = 0; s < total; s++) begin
        bit f, l;
        // compare state before the step
        for (int k = 0; k < 5; k++) chk(cnt[k] == 16'(idx[k]), $sformatf("t%0d s%0d cnt[%0d]=%0d exp %0d", t, s, k, cnt[k], idx[k]));
        for (int k = 0; k <= 5; k++) begin
          f = 1; l = 1;
          for (int j = 0; j < k && j < 5; j++) begin
            if (idx[j] != 0) f = 0;
            if (j < nla && idx[j] != n[j] - 1) l = 0;
          end
          chk(first[k] == f && last[k] == l, $sformatf("t%0d s%0d flags level %0d", t, s, k));
        end
        lvl = 0;
        for (int k = 1; k < nla; k++) if (idx[k-1] == n[k-1] - 1 && lvl == k - 1) lvl = k;
        chk(int'(level) == lvl, $sformatf("t%0d s%0d level %0d exp %0d", t, s, level, lvl));
        chk(last[5] == (s == total - 1), "end of nest flag");
        // software model step
        for (int k = 0; k < nla; k++) begin
          if (idx[k] == n[k] - 1) idx[k] = 0;
          else begin idx[k]++; break; end
        end
        step = 1; @(negedge clk); step = 0;
      end
      for (int k = 0; k < 5; k++) chk(cnt[k] == 0, "wrapped to zero after the nest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
