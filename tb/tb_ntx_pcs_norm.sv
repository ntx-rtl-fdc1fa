// tb_ntx_pcs_norm: self-checking test of the accumulator normaliser.
//
// Drives accumulator states directly: integers scaled to the accumulator
// LSB (2^-150), split between the two segments with and without a pending
// saved carry, negative values, values needing round-to-nearest-even
// (ties both ways), a denormal, values rounding up into the next binade,
// an overflow to infinity and zero. Expected values are written out by hand
// or computed from the integer by the testbench's own conversion.
module tb_ntx_pcs_norm;
  import ntx_tb_pkg::*;
  logic [149:0] hi, lo;
  logic c, ovf;
  logic [31:0] z;
  int checks = 0, failures = 0;

  ntx_pcs_norm dut (.acc_hi_i(hi), .acc_carry_i(c), .acc_lo_i(lo), .ovf_i(ovf), .z_o(z));

  // Place v * 2^sh (two's complement) in the accumulator, optionally moving
  // one unit of 2^150 from the high segment into the saved carry.
  task automatic put(longint v, int sh, bit use_carry);
    logic [299:0] w;
    w = 300'(v) << sh;
    if (v < 0) w = -((300'(-v)) << sh);
    hi = w[299:150]; lo = w[149:0]; c = 0;
    if (use_carry) begin hi = hi - 1'b1; c = 1; end
  endtask

  task automatic chk(logic [31:0] exp, string what);
    #1; checks++;
    if (z !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, z, exp); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ovf = 0;
    for (int i = 0; i < 200; i++) begin
      longint v; v = longint'($urandom_range(0, 2000000)) - 1000000;
      put(v, 150, i % 2);           // integer values
      chk(int_to_f(v), $sformatf("integer %0d", v));
    end
    put(1, 150, 0);            chk(32'h3F80_0000, "1.0");
    put(-3, 149, 1);           chk(32'hBFC0_0000, "-1.5 with saved carry");
    put(1, 0, 0);              chk(32'h0000_0000 | 32'd0, "2^-150 rounds to 0 (tie to even)");
    put(3, 0, 0);              chk(32'h0000_0002, "3*2^-150 rounds to 2^-148 (tie to even)");
    put(1, 10, 0);             chk(32'h0000_0200, "denormal 2^-140");
    put(32'h1FF_FFFF, 150, 0); chk(32'h4C00_0000, "2^25-1 rounds up to 2^25");
    put(32'h100_0001, 150, 0); chk(32'h4B80_0000, "2^24+1 tie rounds to even 2^24");
    put(32'h100_0003, 150, 0); chk(32'h4B80_0002, "2^24+3 tie rounds up");
    put(0, 0, 0);              chk(32'h0, "zero");
    put(1, 150 + 128, 0);      chk(32'h7F80_0000, "2^128 overflows to inf");
    put(-1, 150 + 127, 1);     chk(32'hFF00_0000, "-2^127");
    put(5, 150, 0); ovf = 1;   chk(32'h7F80_0000, "overflow flag gives inf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
