// svm_pe: one processing element of the systolic SVM chain; it holds one
// support vector and its trained coefficients.
//
// Every cycle in which valid_i is high the PE
//   1. computes the multiplierless kernel K(x, sv) of the CSD test vector
//      arriving from its left neighbour (ml_kernel),
//   2. multiplies K by alpha, again by CSD shift-and-add (alpha is stored in
//      CSD form when it is written), and by the class label y = +1 / -1
//      (a conditional negation),
//   3. adds alpha*y*K to the running sum of the class this support vector
//      belongs to, leaving the sums of the other classes untouched,
// and registers the test vector, the class sums and valid for the next PE.
// The test vector and the class sums thus move one PE per clock: a new test
// vector can enter every cycle and each PE adds one cycle of latency.
//
// The kernel-then-alpha-then-label order follows the specification; that the
// class sums travel down the chain with the test vector, the CSD storage of
// alpha and the configuration port are this design's choices.
// Configuration: while cfg_we is high the PE stores cfg_sv, cfg_alpha,
// cfg_neg (1 = label -1) and cfg_class. Reset clears valid and the
// coefficients (alpha = 0 makes an unwritten PE add nothing).
module svm_pe
  import svm_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 2,
  parameter kernel_e     KERNEL      = KERNEL_LINEAR,
  parameter int unsigned POLY_DEG    = 4,
  localparam int unsigned CLS_W      = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic             cfg_we,
  input  data_t            cfg_sv    [DIM],
  input  alpha_t           cfg_alpha,
  input  logic             cfg_neg,
  input  logic [CLS_W-1:0] cfg_class,
  // systolic input from the left neighbour
  input  logic             valid_i,
  input  csd_t             x_i       [DIM],
  input  acc_t             psum_i    [NUM_CLASSES],
  // systolic output to the right neighbour
  output logic             valid_o,
  output csd_t             x_o       [DIM],
  output acc_t             psum_o    [NUM_CLASSES]
);

  data_t              sv_q [DIM];
  logic [ALPHA_W-1:0] alpha_s_q, alpha_m_q;
  logic               neg_q;
  logic [CLS_W-1:0]   class_q;

  logic [ALPHA_W-1:0] alpha_s_d, alpha_m_d;
  acc_t               kval;
  acc_t               akval;
  acc_t               term;

  csd_encoder #(.W(ALPHA_W)) u_alpha_csd (
    .x  (cfg_alpha),
    .xis(alpha_s_d),
    .xim(alpha_m_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(DIM); d++) sv_q[d] <= '0;
      alpha_s_q <= '0;
      alpha_m_q <= '0;
      neg_q     <= 1'b0;
      class_q   <= '0;
    end else if (cfg_we) begin
      sv_q      <= cfg_sv;
      alpha_s_q <= alpha_s_d;
      alpha_m_q <= alpha_m_d;
      neg_q     <= cfg_neg;
      class_q   <= cfg_class;
    end
  end

  ml_kernel #(.KERNEL(KERNEL), .POLY_DEG(POLY_DEG)) u_kernel (
    .x_csd(x_i),
    .sv   (sv_q),
    .k    (kval)
  );

  csd_mult #(
    .A_W  (ALPHA_W),
    .B_W  (ACC_W),
    .P_W  (ACC_W),
    .SHIFT(FRAC_W)
  ) u_alpha_mult (
    .a_s(alpha_s_q),
    .a_m(alpha_m_q),
    .b  (kval),
    .p  (akval)
  );

  assign term = neg_q ? -akval : akval;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
    end
  end

  always_ff @(posedge clk) begin
    if (valid_i) begin
      x_o <= x_i;
      for (int c = 0; c < int'(NUM_CLASSES); c++) begin
        psum_o[c] <= (class_q == CLS_W'(c)) ? psum_i[c] + term : psum_i[c];
      end
    end
  end

endmodule
