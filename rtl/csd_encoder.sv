// csd_encoder: converts a W-bit two's complement number into its canonic
// signed digit (CSD) form.
//
// Each of the W output digits is -1, 0 or +1 and carries the weight 2^i (the
// binary point is wherever the caller puts it; with Q5.8 data the digit at
// index 8 is the units digit). A digit is sign-magnitude encoded in two bits:
// 0 = (xis,xim) 00, +1 = 01, -1 = 11. The result has no two adjacent non-zero
// digits and the fewest non-zero digits of any signed-digit form, which is
// what lets the kernel replace multipliers with few shifted additions.
//
// The recoding is the classic carry-propagate CSD algorithm, run from the LSB
// with the input sign-extended by one bit: with carry c_i,
//   digit_i non-zero  <=> x_i XOR c_i,
//   digit_i negative  <=> non-zero and x_{i+1} = 1,
//   c_{i+1}           =   majority(x_i, x_{i+1}, c_i).
// Every W-bit two's complement value, -2^(W-1) included, fits in W digits.
// Purely combinational; no clock.
module csd_encoder #(
  parameter int unsigned W = svm_pkg::DATA_W
) (
  input  logic [W-1:0] x,    // two's complement input
  output logic [W-1:0] xis,  // digit sign bits
  output logic [W-1:0] xim   // digit magnitude bits
);

  always_comb begin
    logic c;
    logic xn;
    logic nz;
    c   = 1'b0;
    xis = '0;
    xim = '0;
    for (int i = 0; i < int'(W); i++) begin
      xn     = (i == int'(W) - 1) ? x[W-1] : x[i+1];
      nz     = x[i] ^ c;
      xim[i] = nz;
      xis[i] = nz & xn;
      c      = (x[i] & xn) | (x[i] & c) | (xn & c);
    end
  end

endmodule
