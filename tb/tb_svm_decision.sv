// tb_svm_decision: loads random biases into a 3-class decision unit, feeds
// random class sums (with forced ties now and then) and checks one cycle
// later: scores = sums + biases, class = index of the largest score with ties
// to the lower index, valid delayed by exactly one cycle.
module tb_svm_decision;
  import svm_pkg::*;

  int checks = 0, failures = 0;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       bias_we;
  logic [1:0] bias_class;
  acc_t       bias_val;
  logic       valid_i;
  acc_t       psum_i [3];
  logic       valid_o;
  logic [1:0] class_o;
  acc_t       score_o [3];

  always #5 clk = ~clk;

  svm_decision #(.NUM_CLASSES(3)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint b [3], s [3];
    int best;
    bias_we = 0; bias_class = 0; bias_val = 0; valid_i = 0; psum_i = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      for (int c = 0; c < 3; c++) begin
        b[c] = longint'($signed($urandom)) >>> 8;
        @(negedge clk);
        bias_we = 1; bias_class = 2'(c); bias_val = b[c];
      end
      @(negedge clk);
      bias_we = 0;
      for (int n = 0; n < 200; n++) begin
        for (int c = 0; c < 3; c++) s[c] = longint'($signed($urandom)) >>> 4;
        if (n % 7 == 0) s[2] = s[0] + b[0] - b[2];
        if (n % 11 == 0) s[1] = s[0] + b[0] - b[1];
        for (int c = 0; c < 3; c++) psum_i[c] = s[c];
        valid_i = 1;
        best = 0;
        for (int c = 1; c < 3; c++) if (s[c] + b[c] > s[best] + b[best]) best = c;
        @(negedge clk);
        valid_i = 0;
        checks++;
        if (valid_o !== 1'b1 || class_o !== 2'(best)) begin
          failures++;
          if (failures < 10) $display("FAIL class %0d exp %0d", class_o, best);
        end
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (score_o[c] !== s[c] + b[c]) begin failures++; $display("FAIL score"); end
        end
        @(negedge clk);
        checks++;
        if (valid_o !== 1'b0) begin failures++; $display("FAIL valid stuck"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
