// svm_decision: adds each class sum to its bias and picks the class with the
// largest result (one-against-all decision).
//
// The class sums sum_i alpha_i*y_i*K(x, sv_i) arrive from the last PE of the
// chain. The unit adds the bias b of every class, registers the NUM_CLASSES
// scores and the index of the largest one; ties go to the lower class index.
// For a class the sign of its score is the binary SVM decision sign(.. + b).
// One cycle of latency, one decision per cycle.
// The bias registers are written through bias_we / bias_class / bias_val and
// cleared by reset. Bias storage and tie rule are this design's choices.
module svm_decision
  import svm_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = 2,
  localparam int unsigned CLS_W      = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // bias configuration, Q.8
  input  logic             bias_we,
  input  logic [CLS_W-1:0] bias_class,
  input  acc_t             bias_val,
  // class sums from the PE chain
  input  logic             valid_i,
  input  acc_t             psum_i   [NUM_CLASSES],
  // decision
  output logic             valid_o,
  output logic [CLS_W-1:0] class_o,
  output acc_t             score_o  [NUM_CLASSES]
);

  acc_t             bias_q [NUM_CLASSES];
  acc_t             score  [NUM_CLASSES];
  logic [CLS_W-1:0] best;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NUM_CLASSES); c++) bias_q[c] <= '0;
    end else if (bias_we) begin
      bias_q[bias_class] <= bias_val;
    end
  end

  always_comb begin
    for (int c = 0; c < int'(NUM_CLASSES); c++) score[c] = psum_i[c] + bias_q[c];
    best = '0;
    for (int c = 1; c < int'(NUM_CLASSES); c++) begin
      if (score[c] > score[best]) best = CLS_W'(c);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      class_o <= '0;
      for (int c = 0; c < int'(NUM_CLASSES); c++) score_o[c] <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        class_o <= best;
        score_o <= score;
      end
    end
  end

endmodule
