// tb_svm_classifier: end-to-end check of two small classifier arrays, a
// 6-PE 3-class linear one and a 4-PE 2-class polynomial one, each driven and
// checked by tb_svm_agent (scores, winning class, latency NUM_SV + 2,
// back-to-back input, reload of the trained parameters).
module tb_svm_classifier;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  // linear, 6 PEs, 3 classes
  logic a_cfg_we; logic [2:0] a_cfg_addr; data_t a_cfg_sv [DIM]; alpha_t a_cfg_alpha;
  logic a_cfg_neg; logic [1:0] a_cfg_class; logic a_bias_we; logic [1:0] a_bias_class;
  acc_t a_bias_val; logic a_in_valid; data_t a_in_x [DIM]; logic a_out_valid;
  logic [1:0] a_out_class; acc_t a_out_score [3]; logic a_done;
  int a_checks, a_fail, a_neg, a_nl, a_b2b, a_idle, a_rel, a_res; logic [2:0] a_won;

  // polynomial, 4 PEs, 2 classes
  logic p_cfg_we; logic [1:0] p_cfg_addr; data_t p_cfg_sv [DIM]; alpha_t p_cfg_alpha;
  logic p_cfg_neg; logic p_cfg_class; logic p_bias_we; logic p_bias_class;
  acc_t p_bias_val; logic p_in_valid; data_t p_in_x [DIM]; logic p_out_valid;
  logic p_out_class; acc_t p_out_score [2]; logic p_done;
  int p_checks, p_fail, p_neg, p_nl, p_b2b, p_idle, p_rel, p_res; logic [1:0] p_won;

  svm_classifier #(.NUM_SV(6), .NUM_CLASSES(3), .KERNEL(KERNEL_LINEAR)) dut_a (
    .clk, .rst_n, .cfg_we(a_cfg_we), .cfg_addr(a_cfg_addr), .cfg_sv(a_cfg_sv),
    .cfg_alpha(a_cfg_alpha), .cfg_neg(a_cfg_neg), .cfg_class(a_cfg_class),
    .bias_we(a_bias_we), .bias_class(a_bias_class), .bias_val(a_bias_val),
    .in_valid(a_in_valid), .in_x(a_in_x), .out_valid(a_out_valid),
    .out_class(a_out_class), .out_score(a_out_score));

  tb_svm_agent #(.NUM_SV(6), .NUM_CLASSES(3), .POLY(1'b0), .N_VEC(300)) agent_a (
    .clk, .rst_n, .cfg_we(a_cfg_we), .cfg_addr(a_cfg_addr), .cfg_sv(a_cfg_sv),
    .cfg_alpha(a_cfg_alpha), .cfg_neg(a_cfg_neg), .cfg_class(a_cfg_class),
    .bias_we(a_bias_we), .bias_class(a_bias_class), .bias_val(a_bias_val),
    .in_valid(a_in_valid), .in_x(a_in_x), .out_valid(a_out_valid),
    .out_class(a_out_class), .out_score(a_out_score), .done(a_done),
    .checks(a_checks), .failures(a_fail), .n_negdigit(a_neg), .n_neglabel(a_nl),
    .n_b2b(a_b2b), .n_idle(a_idle), .n_reload(a_rel), .n_results(a_res), .won(a_won));

  svm_classifier #(.NUM_SV(4), .NUM_CLASSES(2), .KERNEL(KERNEL_POLY), .POLY_DEG(4)) dut_p (
    .clk, .rst_n, .cfg_we(p_cfg_we), .cfg_addr(p_cfg_addr), .cfg_sv(p_cfg_sv),
    .cfg_alpha(p_cfg_alpha), .cfg_neg(p_cfg_neg), .cfg_class(p_cfg_class),
    .bias_we(p_bias_we), .bias_class(p_bias_class), .bias_val(p_bias_val),
    .in_valid(p_in_valid), .in_x(p_in_x), .out_valid(p_out_valid),
    .out_class(p_out_class), .out_score(p_out_score));

  tb_svm_agent #(.NUM_SV(4), .NUM_CLASSES(2), .POLY(1'b1), .N_VEC(300)) agent_p (
    .clk, .rst_n, .cfg_we(p_cfg_we), .cfg_addr(p_cfg_addr), .cfg_sv(p_cfg_sv),
    .cfg_alpha(p_cfg_alpha), .cfg_neg(p_cfg_neg), .cfg_class(p_cfg_class),
    .bias_we(p_bias_we), .bias_class(p_bias_class), .bias_val(p_bias_val),
    .in_valid(p_in_valid), .in_x(p_in_x), .out_valid(p_out_valid),
    .out_class(p_out_class), .out_score(p_out_score), .done(p_done),
    .checks(p_checks), .failures(p_fail), .n_negdigit(p_neg), .n_neglabel(p_nl),
    .n_b2b(p_b2b), .n_idle(p_idle), .n_reload(p_rel), .n_results(p_res), .won(p_won));

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + p_checks, a_fail + p_fail + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (a_done && p_done);
    checks = a_checks + p_checks;
    failures = a_fail + p_fail;
    need("negative CSD digit", a_neg);
    need("label -1", a_nl + p_nl);
    need("back-to-back input", a_b2b + p_b2b);
    need("idle input cycle", a_idle + p_idle);
    need("parameter reload", a_rel + p_rel);
    need("results (linear)", a_res);
    need("results (polynomial)", p_res);
    for (int c = 0; c < 3; c++) need($sformatf("linear class %0d won", c), int'(a_won[c]));
    for (int c = 0; c < 2; c++) need($sformatf("polynomial class %0d won", c), int'(p_won[c]));
    $display("linear: %0d results, polynomial: %0d results", a_res, p_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
