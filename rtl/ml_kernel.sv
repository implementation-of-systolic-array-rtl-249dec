// ml_kernel: multiplierless kernel between the test vector and one support
// vector.
//
// The test vector arrives already in CSD form (one csd_t per dimension). Each
// element product x_d * sv_d is formed by csd_mult as shifted additions and
// subtractions of sv_d, brought back to Q.8, and the DIM products are summed:
//   linear      K = x . sv
//   polynomial  K = (1 + x . sv)^POLY_DEG
// The linear kernel, used by the binary linear and the multiclass
// classifiers, contains no multiplier at all. For the polynomial kernel of
// the binary non-linear classifier the dot product is still multiplierless,
// but the power is taken with ordinary multipliers (DSP blocks on an FPGA),
// each step truncated back to Q.8. The output is a 64-bit Q.8 value; values
// that do not fit wrap (no saturation), which the Q5.8 input range avoids for
// the linear kernel and for POLY_DEG = 4 with element magnitudes below 8.
// Purely combinational; no clock.
module ml_kernel
  import svm_pkg::*;
#(
  parameter kernel_e     KERNEL   = KERNEL_LINEAR,
  parameter int unsigned POLY_DEG = 4
) (
  input  csd_t  x_csd [DIM],  // CSD-coded test vector
  input  data_t sv    [DIM],  // support vector, Q5.8
  output acc_t  k             // kernel value, Q.8
);

  acc_t prod [DIM];
  acc_t dot;

  for (genvar d = 0; d < int'(DIM); d++) begin : g_dim
    csd_mult #(
      .A_W  (DATA_W),
      .B_W  (DATA_W),
      .P_W  (ACC_W),
      .SHIFT(FRAC_W)
    ) u_mult (
      .a_s(x_csd[d].s),
      .a_m(x_csd[d].m),
      .b  (sv[d]),
      .p  (prod[d])
    );
  end

  always_comb begin
    dot = '0;
    for (int d = 0; d < int'(DIM); d++) dot = dot + prod[d];
  end

  if (KERNEL == KERNEL_POLY) begin : g_poly
    acc_t base;
    acc_t pw [POLY_DEG];
    assign base  = dot + (acc_t'(1) <<< FRAC_W);
    assign pw[0] = base;
    for (genvar j = 1; j < int'(POLY_DEG); j++) begin : g_pow
      logic signed [2*ACC_W-1:0] full;
      assign full  = pw[j-1] * base;
      assign pw[j] = acc_t'(full >>> FRAC_W);
    end
    assign k = pw[POLY_DEG-1];
  end else begin : g_lin
    assign k = dot;
  end

endmodule
