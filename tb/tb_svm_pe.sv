// tb_svm_pe: checks one processing element (3 classes, linear kernel, and a
// second PE with the degree-4 polynomial kernel). Each PE is loaded with a
// random support vector, alpha, label and class, then fed a random test
// vector and random incoming class sums every cycle. One cycle later the
// outputs must carry the same test vector, valid, and the incoming sums with
// alpha*y*K added to the PE's own class only. Idle cycles (valid low) must
// leave the outputs unchanged.
module tb_svm_pe;
  import svm_pkg::*;
  import tb_svm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   cfg_we;
  data_t  cfg_sv [DIM];
  alpha_t cfg_alpha;
  logic   cfg_neg;
  logic [1:0] cfg_class;
  logic   valid_i;
  csd_t   x_i [DIM];
  acc_t   psum_i [3];
  logic   valid_o, valid_o_p;
  csd_t   x_o [DIM], x_o_p [DIM];
  acc_t   psum_o [3], psum_o_p [3];

  always #5 clk = ~clk;

  svm_pe #(.NUM_CLASSES(3), .KERNEL(KERNEL_LINEAR)) dut (
    .clk, .rst_n, .cfg_we, .cfg_sv, .cfg_alpha, .cfg_neg, .cfg_class,
    .valid_i, .x_i, .psum_i, .valid_o, .x_o, .psum_o);

  svm_pe #(.NUM_CLASSES(3), .KERNEL(KERNEL_POLY), .POLY_DEG(4)) dut_p (
    .clk, .rst_n, .cfg_we, .cfg_sv, .cfg_alpha, .cfg_neg, .cfg_class,
    .valid_i, .x_i, .psum_i, .valid_o(valid_o_p), .x_o(x_o_p), .psum_o(psum_o_p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rs, rm;
    longint sv0, sv1, x0, x1, alpha, kl, kp, exp_l, exp_p;
    bit neg;
    int cls;
    acc_t hold [3];
    cfg_we = 0; valid_i = 0;
    cfg_sv = '{default: '0}; cfg_alpha = '0; cfg_neg = 0; cfg_class = '0;
    x_i = '{default: '0}; psum_i = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 40; round++) begin
      // load the PEs
      sv0 = longint'($signed(13'($urandom))) >>> 1;
      sv1 = longint'($signed(13'($urandom))) >>> 1;
      alpha = longint'($urandom_range(0, 32767));
      neg = 1'($urandom);
      cls = $urandom_range(0, 2);
      @(negedge clk);
      cfg_we = 1; cfg_sv[0] = 13'(sv0); cfg_sv[1] = 13'(sv1);
      cfg_alpha = 16'(alpha); cfg_neg = neg; cfg_class = 2'(cls);
      @(negedge clk);
      cfg_we = 0;
      for (int n = 0; n < 50; n++) begin
        x0 = longint'($signed(13'($urandom))) >>> 1;
        x1 = longint'($signed(13'($urandom))) >>> 1;
        naf(x0, 13, rs, rm); x_i[0].s = rs[12:0]; x_i[0].m = rm[12:0];
        naf(x1, 13, rs, rm); x_i[1].s = rs[12:0]; x_i[1].m = rm[12:0];
        for (int c = 0; c < 3; c++) psum_i[c] = {{24{1'b0}}, $urandom, 8'h0} - 64'sd1000000000;
        valid_i = (n % 5 != 4);
        for (int c = 0; c < 3; c++) hold[c] = psum_o[c];
        kl = kernel(x0, x1, sv0, sv1, 1'b0, 4);
        kp = kernel(x0, x1, sv0, sv1, 1'b1, 4);
        @(negedge clk);
        checks++;
        if (valid_o !== valid_i || valid_o_p !== valid_i) begin
          failures++; $display("FAIL valid");
        end
        for (int c = 0; c < 3; c++) begin
          if (valid_i) begin
            exp_l = psum_i[c] + ((c == cls) ? term(alpha, neg, kl) : 0);
            exp_p = psum_i[c] + ((c == cls) ? term(alpha, neg, kp) : 0);
          end else begin
            exp_l = hold[c];
            exp_p = psum_o_p[c];
          end
          checks++;
          if (psum_o[c] !== exp_l || psum_o_p[c] !== exp_p) begin
            failures++;
            if (failures < 10)
              $display("FAIL psum c=%0d lin %0d exp %0d poly %0d exp %0d", c, psum_o[c], exp_l, psum_o_p[c], exp_p);
          end
        end
        if (valid_i) begin
          checks++;
          if (x_o !== x_i || x_o_p !== x_i) begin failures++; $display("FAIL x pass"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
