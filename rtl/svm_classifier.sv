// svm_classifier: systolic-array SVM classifier with a multiplierless kernel.
//
// Data path, left to right:
//   input stage   each element of the 2-D test vector is converted to CSD
//                 (csd_encoder) and registered;
//   PE chain      NUM_SV processing elements (svm_pe), one per support
//                 vector; the CSD test vector and the running class sums move
//                 one PE per clock, each PE adding alpha*y*K(x, sv) of its
//                 support vector to the sum of its class;
//   decision      svm_decision adds the class biases and selects the class
//                 with the largest score.
// Timing: a test vector accepted with in_valid appears at out_valid
// NUM_SV + 2 cycles later; a new test vector may be accepted every cycle.
//
// Trained parameters are loaded before use: cfg_we writes support vector
// cfg_addr (its elements, alpha, label sign and class), bias_we writes the
// bias of class bias_class. Loading while test vectors are in flight affects
// those test vectors from the PE being written onward.
// The three reference configurations are 8 SVs / 2 classes (linear), 24 SVs /
// 2 classes (polynomial of degree 4) and 74 SVs / 3 classes (linear); the
// defaults are the multiclass one.
module svm_classifier
  import svm_pkg::*;
#(
  parameter int unsigned NUM_SV      = 74,
  parameter int unsigned NUM_CLASSES = 3,
  parameter kernel_e     KERNEL      = KERNEL_LINEAR,
  parameter int unsigned POLY_DEG    = 4,
  localparam int unsigned CLS_W      = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  localparam int unsigned ADDR_W     = (NUM_SV > 1) ? $clog2(NUM_SV) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // support-vector configuration
  input  logic              cfg_we,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  data_t             cfg_sv    [DIM],
  input  alpha_t            cfg_alpha,
  input  logic              cfg_neg,
  input  logic [CLS_W-1:0]  cfg_class,
  // bias configuration
  input  logic              bias_we,
  input  logic [CLS_W-1:0]  bias_class,
  input  acc_t              bias_val,
  // test vectors
  input  logic              in_valid,
  input  data_t             in_x      [DIM],
  // classification results
  output logic              out_valid,
  output logic [CLS_W-1:0]  out_class,
  output acc_t              out_score [NUM_CLASSES]
);

  csd_t csd_d [DIM];

  logic valid_c [NUM_SV+1];
  csd_t x_c     [NUM_SV+1][DIM];
  acc_t psum_c  [NUM_SV+1][NUM_CLASSES];

  // Input stage: CSD conversion of the test vector.
  for (genvar d = 0; d < int'(DIM); d++) begin : g_in
    csd_encoder #(.W(DATA_W)) u_csd (
      .x  (in_x[d]),
      .xis(csd_d[d].s),
      .xim(csd_d[d].m)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_c[0] <= 1'b0;
    else        valid_c[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) x_c[0] <= csd_d;
  end

  // The class sums start at zero at the head of the chain.
  for (genvar c = 0; c < int'(NUM_CLASSES); c++) begin : g_zero
    assign psum_c[0][c] = '0;
  end

  // PE chain.
  for (genvar i = 0; i < int'(NUM_SV); i++) begin : g_pe
    svm_pe #(
      .NUM_CLASSES(NUM_CLASSES),
      .KERNEL     (KERNEL),
      .POLY_DEG   (POLY_DEG)
    ) u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_we   (cfg_we && (cfg_addr == ADDR_W'(i))),
      .cfg_sv   (cfg_sv),
      .cfg_alpha(cfg_alpha),
      .cfg_neg  (cfg_neg),
      .cfg_class(cfg_class),
      .valid_i  (valid_c[i]),
      .x_i      (x_c[i]),
      .psum_i   (psum_c[i]),
      .valid_o  (valid_c[i+1]),
      .x_o      (x_c[i+1]),
      .psum_o   (psum_c[i+1])
    );
  end

  svm_decision #(.NUM_CLASSES(NUM_CLASSES)) u_decision (
    .clk       (clk),
    .rst_n     (rst_n),
    .bias_we   (bias_we),
    .bias_class(bias_class),
    .bias_val  (bias_val),
    .valid_i   (valid_c[NUM_SV]),
    .psum_i    (psum_c[NUM_SV]),
    .valid_o   (out_valid),
    .class_o   (out_class),
    .score_o   (out_score)
  );

endmodule
