// tb_svm_top: end-to-end test of svm_top at its default sizes: the 8-PE
// binary linear, the 24-PE binary polynomial and the 74-PE multiclass linear
// classifier run at the same time, each loaded, streamed and checked by its
// own tb_svm_agent, first with the support vectors split over the classes
// as in the reference models (3 + 5, 12 + 12, 12 + 30 + 32), then scattered
// (class scores, winning class, latency NUM_SV + 2, a test
// vector every cycle with occasional idle cycles, reload of all trained
// parameters). At the end it checks that every mechanism happened at least
// once: negative CSD digits, label -1 support vectors, back-to-back and idle
// input, reloads, and every class of every classifier winning.
module tb_svm_top;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks, failures;

  logic lin_cfg_we; logic [2:0] lin_cfg_addr; data_t lin_cfg_sv [DIM]; alpha_t lin_cfg_alpha;
  logic lin_cfg_neg; logic lin_cfg_class; logic lin_bias_we; logic lin_bias_class;
  acc_t lin_bias_val; logic lin_in_valid; data_t lin_in_x [DIM]; logic lin_out_valid;
  logic lin_out_class; acc_t lin_out_score [2]; logic lin_done;
  int lin_checks, lin_fail, lin_neg, lin_nl, lin_b2b, lin_idle, lin_rel, lin_res; logic [1:0] lin_won;

  logic nl_cfg_we; logic [4:0] nl_cfg_addr; data_t nl_cfg_sv [DIM]; alpha_t nl_cfg_alpha;
  logic nl_cfg_neg; logic nl_cfg_class; logic nl_bias_we; logic nl_bias_class;
  acc_t nl_bias_val; logic nl_in_valid; data_t nl_in_x [DIM]; logic nl_out_valid;
  logic nl_out_class; acc_t nl_out_score [2]; logic nl_done;
  int nl_checks, nl_fail, nl_neg, nl_nl, nl_b2b, nl_idle, nl_rel, nl_res; logic [1:0] nl_won;

  logic mc_cfg_we; logic [6:0] mc_cfg_addr; data_t mc_cfg_sv [DIM]; alpha_t mc_cfg_alpha;
  logic mc_cfg_neg; logic [1:0] mc_cfg_class; logic mc_bias_we; logic [1:0] mc_bias_class;
  acc_t mc_bias_val; logic mc_in_valid; data_t mc_in_x [DIM]; logic mc_out_valid;
  logic [1:0] mc_out_class; acc_t mc_out_score [3]; logic mc_done;
  int mc_checks, mc_fail, mc_neg, mc_nl, mc_b2b, mc_idle, mc_rel, mc_res; logic [2:0] mc_won;

  svm_top dut (
    .clk, .rst_n,
    .lin_cfg_we(lin_cfg_we),
    .lin_cfg_addr(lin_cfg_addr),
    .lin_cfg_sv(lin_cfg_sv),
    .lin_cfg_alpha(lin_cfg_alpha),
    .lin_cfg_neg(lin_cfg_neg),
    .lin_cfg_class(lin_cfg_class),
    .lin_bias_we(lin_bias_we),
    .lin_bias_class(lin_bias_class),
    .lin_bias_val(lin_bias_val),
    .lin_in_valid(lin_in_valid),
    .lin_in_x(lin_in_x),
    .lin_out_valid(lin_out_valid),
    .lin_out_class(lin_out_class),
    .lin_out_score(lin_out_score),
    .nl_cfg_we(nl_cfg_we),
    .nl_cfg_addr(nl_cfg_addr),
    .nl_cfg_sv(nl_cfg_sv),
    .nl_cfg_alpha(nl_cfg_alpha),
    .nl_cfg_neg(nl_cfg_neg),
    .nl_cfg_class(nl_cfg_class),
    .nl_bias_we(nl_bias_we),
    .nl_bias_class(nl_bias_class),
    .nl_bias_val(nl_bias_val),
    .nl_in_valid(nl_in_valid),
    .nl_in_x(nl_in_x),
    .nl_out_valid(nl_out_valid),
    .nl_out_class(nl_out_class),
    .nl_out_score(nl_out_score),
    .mc_cfg_we(mc_cfg_we),
    .mc_cfg_addr(mc_cfg_addr),
    .mc_cfg_sv(mc_cfg_sv),
    .mc_cfg_alpha(mc_cfg_alpha),
    .mc_cfg_neg(mc_cfg_neg),
    .mc_cfg_class(mc_cfg_class),
    .mc_bias_we(mc_bias_we),
    .mc_bias_class(mc_bias_class),
    .mc_bias_val(mc_bias_val),
    .mc_in_valid(mc_in_valid),
    .mc_in_x(mc_in_x),
    .mc_out_valid(mc_out_valid),
    .mc_out_class(mc_out_class),
    .mc_out_score(mc_out_score)
  );

  tb_svm_agent #(.NUM_SV(8), .NUM_CLASSES(2), .POLY(1'b0), .N_VEC(400), .N_CLS0(3), .N_CLS1(5)) agent_lin (
    .clk, .rst_n, .cfg_we(lin_cfg_we), .cfg_addr(lin_cfg_addr), .cfg_sv(lin_cfg_sv),
    .cfg_alpha(lin_cfg_alpha), .cfg_neg(lin_cfg_neg), .cfg_class(lin_cfg_class),
    .bias_we(lin_bias_we), .bias_class(lin_bias_class), .bias_val(lin_bias_val),
    .in_valid(lin_in_valid), .in_x(lin_in_x), .out_valid(lin_out_valid),
    .out_class(lin_out_class), .out_score(lin_out_score), .done(lin_done),
    .checks(lin_checks), .failures(lin_fail), .n_negdigit(lin_neg), .n_neglabel(lin_nl),
    .n_b2b(lin_b2b), .n_idle(lin_idle), .n_reload(lin_rel), .n_results(lin_res), .won(lin_won));

  tb_svm_agent #(.NUM_SV(24), .NUM_CLASSES(2), .POLY(1'b1), .N_VEC(400), .N_CLS0(12), .N_CLS1(12)) agent_nl (
    .clk, .rst_n, .cfg_we(nl_cfg_we), .cfg_addr(nl_cfg_addr), .cfg_sv(nl_cfg_sv),
    .cfg_alpha(nl_cfg_alpha), .cfg_neg(nl_cfg_neg), .cfg_class(nl_cfg_class),
    .bias_we(nl_bias_we), .bias_class(nl_bias_class), .bias_val(nl_bias_val),
    .in_valid(nl_in_valid), .in_x(nl_in_x), .out_valid(nl_out_valid),
    .out_class(nl_out_class), .out_score(nl_out_score), .done(nl_done),
    .checks(nl_checks), .failures(nl_fail), .n_negdigit(nl_neg), .n_neglabel(nl_nl),
    .n_b2b(nl_b2b), .n_idle(nl_idle), .n_reload(nl_rel), .n_results(nl_res), .won(nl_won));

  tb_svm_agent #(.NUM_SV(74), .NUM_CLASSES(3), .POLY(1'b0), .N_VEC(400), .N_CLS0(12), .N_CLS1(30)) agent_mc (
    .clk, .rst_n, .cfg_we(mc_cfg_we), .cfg_addr(mc_cfg_addr), .cfg_sv(mc_cfg_sv),
    .cfg_alpha(mc_cfg_alpha), .cfg_neg(mc_cfg_neg), .cfg_class(mc_cfg_class),
    .bias_we(mc_bias_we), .bias_class(mc_bias_class), .bias_val(mc_bias_val),
    .in_valid(mc_in_valid), .in_x(mc_in_x), .out_valid(mc_out_valid),
    .out_class(mc_out_class), .out_score(mc_out_score), .done(mc_done),
    .checks(mc_checks), .failures(mc_fail), .n_negdigit(mc_neg), .n_neglabel(mc_nl),
    .n_b2b(mc_b2b), .n_idle(mc_idle), .n_reload(mc_rel), .n_results(mc_res), .won(mc_won));

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", lin_checks + nl_checks + mc_checks,
             lin_fail + nl_fail + mc_fail + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (lin_done && nl_done && mc_done);
    checks   = lin_checks + nl_checks + mc_checks;
    failures = lin_fail + nl_fail + mc_fail;
    need("negative CSD digit in a test vector", lin_neg + nl_neg + mc_neg);
    need("label -1 support vector (linear)", lin_nl);
    need("label -1 support vector (polynomial)", nl_nl);
    need("label -1 support vector (multiclass)", mc_nl);
    need("back-to-back test vectors", lin_b2b + nl_b2b + mc_b2b);
    need("idle input cycle", lin_idle + nl_idle + mc_idle);
    need("parameter reload", lin_rel + nl_rel + mc_rel);
    for (int c = 0; c < 2; c++) need($sformatf("binary linear class %0d won", c), int'(lin_won[c]));
    for (int c = 0; c < 2; c++) need($sformatf("binary polynomial class %0d won", c), int'(nl_won[c]));
    for (int c = 0; c < 3; c++) need($sformatf("multiclass class %0d won", c), int'(mc_won[c]));
    $display("results: linear %0d, polynomial %0d, multiclass %0d", lin_res, nl_res, mc_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
