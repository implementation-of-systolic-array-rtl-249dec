// tb_svm_ref_pkg: reference arithmetic for the SVM testbenches, written
// independently of the RTL.
//
// CSD digits come from the textbook non-adjacent-form loop (take the value
// modulo 4: 1 gives digit +1, 3 gives digit -1, then halve), not from the
// carry recoding of the RTL. Products are plain 64-bit multiplications shifted
// right by the 8 fraction bits (floor), so callers keep operands small enough
// that no 64-bit product overflows.
package tb_svm_ref_pkg;

  localparam int FRAC = 8;

  // CSD (NAF) digits of a w-bit two's complement value.
  function automatic void naf(input longint v, input int w,
                              output logic [63:0] s, output logic [63:0] m);
    longint r;
    s = '0;
    m = '0;
    for (int i = 0; i < w; i++) begin
      r = v & 3;
      if (r == 1) begin
        m[i] = 1'b1;
        v = v - 1;
      end else if (r == 3) begin
        m[i] = 1'b1;
        s[i] = 1'b1;
        v = v + 1;
      end
      v = v >>> 1;
    end
  endfunction

  // Value of a CSD word.
  function automatic longint csd_value(input logic [63:0] s, input logic [63:0] m, input int w);
    longint v = 0;
    for (int i = 0; i < w; i++)
      if (m[i]) v = s[i] ? v - (longint'(1) <<< i) : v + (longint'(1) <<< i);
    return v;
  endfunction

  function automatic longint mulq(input longint a, input longint b);
    return (a * b) >>> FRAC;
  endfunction

  // Kernel of a 2-D test vector and support vector (Q.8 in, Q.8 out).
  function automatic longint kernel(input longint x0, input longint x1,
                                    input longint s0, input longint s1,
                                    input bit poly, input int deg);
    longint dot = mulq(x0, s0) + mulq(x1, s1);
    longint t, k;
    if (!poly) return dot;
    t = dot + (longint'(1) <<< FRAC);
    k = t;
    for (int j = 1; j < deg; j++) k = mulq(k, t);
    return k;
  endfunction

  // alpha * y * K.
  function automatic longint term(input longint alpha, input bit neg, input longint k);
    longint p = mulq(alpha, k);
    return neg ? -p : p;
  endfunction

endpackage
