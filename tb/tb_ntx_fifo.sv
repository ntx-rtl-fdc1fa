// tb_ntx_fifo: self-checking test of the FIFO at the depths the NTX uses.
//
// Random pushes and pops against a queue model for depth 5 and depth 7;
// checks data order, full/empty/count, and that a full FIFO holds exactly
// DEPTH words.
module tb_ntx_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic push5, pop5, full5, empty5; logic [31:0] din5, dout5; logic [2:0] cnt5;
  logic push7, pop7, full7, empty7; logic [31:0] din7, dout7; logic [3:0] cnt7;

  ntx_fifo #(.WIDTH(32), .DEPTH(5)) d5 (.clk_i(clk), .rst_ni(rst_n), .push_i(push5), .data_i(din5),
    .pop_i(pop5), .data_o(dout5), .full_o(full5), .empty_o(empty5), .count_o(cnt5));
  ntx_fifo #(.WIDTH(32), .DEPTH(7)) d7 (.clk_i(clk), .rst_ni(rst_n), .push_i(push7), .data_i(din7),
    .pop_i(pop7), .data_o(dout7), .full_o(full7), .empty_o(empty7), .count_o(cnt7));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q5[$], q7[$];
    int fills5 = 0, fills7 = 0;
    push5 = 0; pop5 = 0; push7 = 0; pop7 = 0; din5 = 0; din7 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(int'(cnt5) == q5.size() && full5 == (q5.size() == 5) && empty5 == (q5.size() == 0), "status 5");
      chk(int'(cnt7) == q7.size() && full7 == (q7.size() == 7) && empty7 == (q7.size() == 0), "status 7");
      if (q5.size() > 0) chk(dout5 == q5[0], "head 5");
      if (q7.size() > 0) chk(dout7 == q7[0], "head 7");
      if (full5) fills5++;
      if (full7) fills7++;
      // bias towards filling in the first half, draining in the second
      push5 = !full5 && ($urandom_range(0, 9) < ((i / 500) % 2 ? 3 : 7));
      pop5  = !empty5 && ($urandom_range(0, 9) < ((i / 500) % 2 ? 7 : 3));
      push7 = !full7 && ($urandom_range(0, 9) < ((i / 500) % 2 ? 3 : 7));
      pop7  = !empty7 && ($urandom_range(0, 9) < ((i / 500) % 2 ? 7 : 3));
      din5 = $urandom; din7 = $urandom;
      if (pop5) void'(q5.pop_front());
      if (push5) q5.push_back(din5);
      if (pop7) void'(q7.pop_front());
      if (push7) q7.push_back(din7);
    end
    chk(fills5 > 0 && fills7 > 0, "FIFOs reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
