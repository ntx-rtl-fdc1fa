// tb_ntx_fmac: self-checking test of the FMAC and its normaliser.
//
// Random dot products of operands of the form +-m*2^e (m < 256, |e| <= 8)
// are accumulated, so the exact result is an integer multiple of 2^-16
// that the testbench tracks in a 64-bit integer and rounds to float32 by
// its own routine (round to nearest, ties to even). Directed cases cover
// the init (clear) path, subtraction, exact cancellation, a denormal
// result, a product too large for the accumulator (infinity), and the
// one-accumulation-per-cycle rate.
module tb_ntx_fmac;
  logic clk = 0, rst_n = 0;
  logic en, clear, neg;
  logic [31:0] a, b, z;
  logic [149:0] hi, lo;
  logic c, ovf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ntx_fmac dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .clear_i(clear), .neg_i(neg),
                .a_i(a), .b_i(b), .acc_hi_o(hi), .acc_carry_o(c), .acc_lo_o(lo), .ovf_o(ovf));
  ntx_pcs_norm norm (.acc_hi_i(hi), .acc_carry_i(c), .acc_lo_i(lo), .ovf_i(ovf), .z_o(z));

  function automatic logic [31:0] mk(bit s, int m, int e);
    int l;
    l = $clog2(m + 1) - 1;
    return {s, 8'(e + l + 127), 23'((m << (23 - l)) & 32'h7FFFFF)};
  endfunction

  // Round S * 2^-16 to float32 (normal range only).
  function automatic logic [31:0] ref_float(longint s);
    bit sg; longint unsigned m, kept, rem, half; int l, sh; logic [31:0] r;
    if (s == 0) return 32'h0;
    sg = s < 0; m = sg ? -s : s;
    l = 63; while (!m[l]) l--;
    if (l > 23) begin
      sh = l - 23; kept = m >> sh; rem = m & ((64'd1 << sh) - 1); half = 64'd1 << (sh - 1);
      if (rem > half || (rem == half && kept[0])) kept++;
      if (kept[24]) begin kept >>= 1; l++; end
    end else kept = m << (23 - l);
    r = {sg, 8'(l - 16 + 127), kept[22:0]};
    return r;
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic op(logic [31:0] x, logic [31:0] y, bit clr, bit n);
    a = x; b = y; clear = clr; neg = n; en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    int t0, t1;
    en = 0; clear = 0; neg = 0; a = 0; b = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    // random dot products
    for (int t = 0; t < 60; t++) begin
      int n; acc = 0;
      n = 1 + $urandom_range(0, 40);
      for (int i = 0; i < n; i++) begin
        int m1, m2, e1, e2; bit s1, s2, ng;
        m1 = $urandom_range(1, 255); m2 = $urandom_range(1, 255);
        e1 = $urandom_range(0, 16) - 8; e2 = $urandom_range(0, 16) - 8;
        s1 = $urandom_range(0, 1); s2 = $urandom_range(0, 1); ng = $urandom_range(0, 1);
        op(mk(s1, m1, e1), mk(s2, m2, e2), i == 0, ng);
        if (s1 ^ s2 ^ ng) acc -= longint'(m1 * m2) <<< (e1 + e2 + 16);
        else              acc += longint'(m1 * m2) <<< (e1 + e2 + 16);
      end
      check(z, ref_float(acc), $sformatf("dot product %0d (%0d terms)", t, n));
    end
    // exact cancellation gives +0
    op(32'h4040_0000, 32'h3F80_0000, 1, 0);   // 3.0
    op(32'h4040_0000, 32'h3F80_0000, 0, 1);   // -3.0
    check(z, 32'h0, "cancellation");
    // 1 + 2^-30 - 1: only exact accumulation keeps the small term
    op(32'h3F80_0000, 32'h3F80_0000, 1, 0);
    op(32'h3080_0000, 32'h3F80_0000, 0, 0);   // 2^-30
    op(32'h3F80_0000, 32'h3F80_0000, 0, 1);
    check(z, 32'h3080_0000, "no rounding between accumulations");
    // denormal result 2^-100 * 2^-40 = 2^-140 = 512 * 2^-149
    op({1'b0, 8'(127 - 100), 23'd0}, {1'b0, 8'(127 - 40), 23'd0}, 1, 0);
    check(z, 32'h0000_0200, "denormal result");
    // product beyond the accumulator range saturates to infinity
    op({1'b0, 8'(127 + 80), 23'd0}, {1'b1, 8'(127 + 80), 23'd0}, 1, 0);
    check({1'b0, z[30:0]}, 32'h7F80_0000, "overflow to infinity");
    checks++; if (!ovf) begin failures++; $display("FAIL ovf flag"); end
    // rate: one accumulation per cycle, 16 back to back
    a = 32'h3F80_0000; b = 32'h3F80_0000; clear = 1; neg = 0; en = 1;
    t0 = $time / 10;
    @(posedge clk); #1 clear = 0;
    repeat (15) @(posedge clk);
    #1 en = 0; t1 = $time / 10;
    check(z, 32'h4180_0000, "16 back-to-back accumulations");
    checks++; if (t1 - t0 != 16) begin failures++; $display("FAIL rate %0d cycles", t1 - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
