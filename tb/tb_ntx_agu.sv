// tb_ntx_agu: self-checking test of the address generation unit.
//
// Loads random bases, steps with random loop levels and compares the
// address with a model that adds the stride of the given level; also checks
// that loading the base wins over a step and that an idle cycle holds.
module tb_ntx_agu;
  import ntx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, step;
  logic [31:0] base, addr;
  logic [2:0] level;
  logic [4:0][31:0] stride;
  int checks = 0, failures = 0;

  ntx_agu dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .base_i(base), .step_i(step),
               .level_i(level), .stride_i(stride), .addr_o(addr));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    load = 0; step = 0; base = 0; level = 0;
    for (int k = 0; k < 5; k++) stride[k] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = ($urandom_range(0, 30) == 0);
      step = $urandom_range(0, 3) != 0;
      base = $urandom;
      level = 3'($urandom_range(0, 4));
      if (i % 100 == 0) for (int k = 0; k < 5; k++) stride[k] = (k == 0) ? 32'd4 : $urandom;
      if (load) model = base;
      else if (step) model = model + stride[level];
      @(posedge clk); #1;
      checks++;
      if (addr !== model) begin failures++; $display("FAIL step %0d: %h exp %h", i, addr, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
