// tb_ref_pkg: reference models for the testbenches.
//
// Each function restates one block's published logic equations as plain
// Boolean expressions (AND/OR/NOT, no majority-gate netlist), so a wiring or
// gate error in the RTL shows up as a mismatch. fnv() is the FNV-1a step the
// exhaustive testbenches use to fold every result into one checksum; the
// expected checksums, error sums and maximum errors were computed from an
// independent software model of the same equations.
package tb_ref_pkg;

  function automatic bit m3(bit a, bit b, bit c);
    return (a && b) || (a && c) || (b && c);
  endfunction

  // {cout, s1, s0}
  function automatic bit [2:0] ref_mlafa_a(bit [1:0] a, bit [1:0] b, bit cin);
    bit co;
    co = m3(cin, a[1], b[1]);
    return {co, m3(!co, a[0], b[0]), m3(!co, a[1], b[1])};
  endfunction

  function automatic bit [2:0] ref_mlafa_b(bit [1:0] a, bit [1:0] b, bit cin);
    bit co;
    co = m3(a[1], b[0], b[1]);
    return {co, m3(a[0] && b[0], !co, m3(a[1], !b[0], b[1])), cin};
  endfunction

  // {cout, s3, s2, s1, s0}
  function automatic bit [4:0] ref_mlafa_i(bit [3:0] a, bit [3:0] b, bit cin);
    bit co, s21, inner;
    co    = m3(b[2], b[3], a[3]);
    inner = m3(!b[2], b[3], a[3]);
    s21   = m3(!b[2], a[1], a[2]);
    return {co, m3(!co, b[2], inner), s21, s21, inner};
  endfunction

  function automatic bit [4:0] ref_mlafa_ii(bit [3:0] a, bit [3:0] b, bit cin);
    bit co, s20;
    co  = m3(b[2], b[3], a[3]);
    s20 = m3(!b[2], b[1], a[2]);
    return {co, m3(!co, b[3], m3(b[2], !b[3], a[3])), s20, m3(!b[2], a[2], a[0]), s20};
  endfunction

  function automatic int unsigned fnv(int unsigned h, int unsigned v);
    return (h ^ v) * 32'h0100_0193;
  endfunction

  localparam int unsigned FNV_INIT = 32'h811c_9dc5;

endpackage
