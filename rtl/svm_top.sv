// svm_top: the three classifiers built from the systolic multiplierless-
// kernel SVM array, side by side with separate ports:
//   lin_*  binary linear classifier      8 PEs, 2 classes, linear kernel
//          (3 support vectors of class 0, 5 of class 1 in the reference
//          training: setosa / non-setosa of the Fisher iris data)
//   nl_*   binary non-linear classifier  24 PEs, 2 classes, polynomial
//          kernel (1 + x.z)^4 (12 support vectors per class)
//   mc_*   multiclass classifier         74 PEs, 3 classes, linear kernel
//          (12, 30 and 32 support vectors), one-against-all
// All share clock and reset. Each classifier accepts one 2-D Q5.8 test vector
// per cycle and answers NUM_SV + 2 cycles later (10, 26 and 76 cycles); see
// svm_classifier for the configuration ports through which the trained
// support vectors, alphas, labels and biases are loaded.
module svm_top
  import svm_pkg::*;
#(
  parameter int unsigned LIN_SV  = 8,
  parameter int unsigned NL_SV   = 24,
  parameter int unsigned MC_SV   = 74,
  parameter int unsigned NL_DEG  = 4,
  localparam int unsigned LIN_AW = $clog2(LIN_SV),
  localparam int unsigned NL_AW  = $clog2(NL_SV),
  localparam int unsigned MC_AW  = $clog2(MC_SV)
) (
  input  logic              clk,
  input  logic              rst_n,

  // binary linear classifier
  input  logic              lin_cfg_we,
  input  logic [LIN_AW-1:0] lin_cfg_addr,
  input  data_t             lin_cfg_sv    [DIM],
  input  alpha_t            lin_cfg_alpha,
  input  logic              lin_cfg_neg,
  input  logic              lin_cfg_class,
  input  logic              lin_bias_we,
  input  logic              lin_bias_class,
  input  acc_t              lin_bias_val,
  input  logic              lin_in_valid,
  input  data_t             lin_in_x      [DIM],
  output logic              lin_out_valid,
  output logic              lin_out_class,
  output acc_t              lin_out_score [2],

  // binary non-linear classifier
  input  logic              nl_cfg_we,
  input  logic [NL_AW-1:0]  nl_cfg_addr,
  input  data_t             nl_cfg_sv     [DIM],
  input  alpha_t            nl_cfg_alpha,
  input  logic              nl_cfg_neg,
  input  logic              nl_cfg_class,
  input  logic              nl_bias_we,
  input  logic              nl_bias_class,
  input  acc_t              nl_bias_val,
  input  logic              nl_in_valid,
  input  data_t             nl_in_x       [DIM],
  output logic              nl_out_valid,
  output logic              nl_out_class,
  output acc_t              nl_out_score  [2],

  // multiclass classifier
  input  logic              mc_cfg_we,
  input  logic [MC_AW-1:0]  mc_cfg_addr,
  input  data_t             mc_cfg_sv     [DIM],
  input  alpha_t            mc_cfg_alpha,
  input  logic              mc_cfg_neg,
  input  logic [1:0]        mc_cfg_class,
  input  logic              mc_bias_we,
  input  logic [1:0]        mc_bias_class,
  input  acc_t              mc_bias_val,
  input  logic              mc_in_valid,
  input  data_t             mc_in_x       [DIM],
  output logic              mc_out_valid,
  output logic [1:0]        mc_out_class,
  output acc_t              mc_out_score  [3]
);

  svm_classifier #(
    .NUM_SV     (LIN_SV),
    .NUM_CLASSES(2),
    .KERNEL     (KERNEL_LINEAR)
  ) u_lin (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (lin_cfg_we),
    .cfg_addr  (lin_cfg_addr),
    .cfg_sv    (lin_cfg_sv),
    .cfg_alpha (lin_cfg_alpha),
    .cfg_neg   (lin_cfg_neg),
    .cfg_class (lin_cfg_class),
    .bias_we   (lin_bias_we),
    .bias_class(lin_bias_class),
    .bias_val  (lin_bias_val),
    .in_valid  (lin_in_valid),
    .in_x      (lin_in_x),
    .out_valid (lin_out_valid),
    .out_class (lin_out_class),
    .out_score (lin_out_score)
  );

  svm_classifier #(
    .NUM_SV     (NL_SV),
    .NUM_CLASSES(2),
    .KERNEL     (KERNEL_POLY),
    .POLY_DEG   (NL_DEG)
  ) u_nl (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (nl_cfg_we),
    .cfg_addr  (nl_cfg_addr),
    .cfg_sv    (nl_cfg_sv),
    .cfg_alpha (nl_cfg_alpha),
    .cfg_neg   (nl_cfg_neg),
    .cfg_class (nl_cfg_class),
    .bias_we   (nl_bias_we),
    .bias_class(nl_bias_class),
    .bias_val  (nl_bias_val),
    .in_valid  (nl_in_valid),
    .in_x      (nl_in_x),
    .out_valid (nl_out_valid),
    .out_class (nl_out_class),
    .out_score (nl_out_score)
  );

  svm_classifier #(
    .NUM_SV     (MC_SV),
    .NUM_CLASSES(3),
    .KERNEL     (KERNEL_LINEAR)
  ) u_mc (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (mc_cfg_we),
    .cfg_addr  (mc_cfg_addr),
    .cfg_sv    (mc_cfg_sv),
    .cfg_alpha (mc_cfg_alpha),
    .cfg_neg   (mc_cfg_neg),
    .cfg_class (mc_cfg_class),
    .bias_we   (mc_bias_we),
    .bias_class(mc_bias_class),
    .bias_val  (mc_bias_val),
    .in_valid  (mc_in_valid),
    .in_x      (mc_in_x),
    .out_valid (mc_out_valid),
    .out_class (mc_out_class),
    .out_score (mc_out_score)
  );

endmodule
