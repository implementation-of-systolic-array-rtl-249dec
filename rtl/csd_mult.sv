// csd_mult: multiplierless product of a CSD-coded operand and a two's
// complement operand.
//
// For every non-zero CSD digit i of operand a the operand b, shifted left by
// i, is added (+1) or subtracted (-1); no multiplier is used. The exact
// product is then shifted right arithmetically by SHIFT bits to bring it back
// to the fixed-point format of the result (SHIFT = 8 for Q.8 times Q.8), which
// rounds towards minus infinity, and is truncated to P_W bits. The internal
// sum is wide enough for any product of the given widths.
// Purely combinational; no clock.
module csd_mult #(
  parameter int unsigned A_W   = svm_pkg::DATA_W,  // CSD digits of a
  parameter int unsigned B_W   = svm_pkg::DATA_W,  // width of b
  parameter int unsigned P_W   = svm_pkg::ACC_W,   // width of the product
  parameter int unsigned SHIFT = svm_pkg::FRAC_W   // fraction bits dropped
) (
  input  logic [A_W-1:0]        a_s,  // CSD sign bits of a
  input  logic [A_W-1:0]        a_m,  // CSD magnitude bits of a
  input  logic signed [B_W-1:0] b,
  output logic signed [P_W-1:0] p
);

  localparam int unsigned SUM_W = A_W + B_W + 1;

  logic signed [SUM_W-1:0] b_ext;
  logic signed [SUM_W-1:0] sum;
  logic signed [SUM_W-1:0] shifted;

  assign b_ext = SUM_W'(b);

  always_comb begin
    sum = '0;
    for (int i = 0; i < int'(A_W); i++) begin
      if (a_m[i]) begin
        if (a_s[i]) sum = sum - (b_ext <<< i);
        else        sum = sum + (b_ext <<< i);
      end
    end
  end

  assign shifted = sum >>> SHIFT;

  if (P_W <= SUM_W) begin : g_trunc
    assign p = shifted[P_W-1:0];
  end else begin : g_ext
    assign p = P_W'(shifted);
  end

endmodule
