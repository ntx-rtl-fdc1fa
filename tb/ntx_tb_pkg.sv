// ntx_tb_pkg: helpers shared by the NTX testbenches.
//
// Conversion between small integers and float32 bit patterns, written
// independently of the design so that expected values do not come from
// the code under test. int_to_f handles |v| < 2^24 exactly.
package ntx_tb_pkg;
  function automatic logic [31:0] int_to_f(longint v);
    bit s; longint unsigned m; int l;
    if (v == 0) return 32'h0;
    s = v < 0; m = s ? -v : v;
    l = 63; while (!m[l]) l--;
    return {s, 8'(l + 127), 23'((m << (23 - l)) & 64'h7FFFFF)};
  endfunction

  // Inverse for integral values below 2^24 in magnitude.
  function automatic longint f_to_int(logic [31:0] f);
    int e; longint m;
    if (f[30:0] == 0) return 0;
    e = int'(f[30:23]) - 127;
    m = longint'({1'b1, f[22:0]});
    m = (e >= 23) ? (m <<< (e - 23)) : (m >>> (23 - e));
    return f[31] ? -m : m;
  endfunction
endpackage
