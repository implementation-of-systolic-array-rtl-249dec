// tb_ml_kernel: random check of the multiplierless kernel, linear and
// polynomial of degree 4, against the reference K = x.sv and (1 + x.sv)^4
// (each step in Q.8, floor). The polynomial case keeps elements below 8 in
// magnitude so that the 64-bit reference cannot overflow.
module tb_ml_kernel;
  import svm_pkg::*;
  import tb_svm_ref_pkg::*;

  int checks = 0, failures = 0;

  csd_t  xc [DIM];
  data_t sv [DIM];
  acc_t  k_lin, k_poly;

  ml_kernel #(.KERNEL(KERNEL_LINEAR))             dut_lin  (.x_csd(xc), .sv(sv), .k(k_lin));
  ml_kernel #(.KERNEL(KERNEL_POLY), .POLY_DEG(4)) dut_poly (.x_csd(xc), .sv(sv), .k(k_poly));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rs, rm;
    longint x [2], s [2];
    longint exp;
    for (int n = 0; n < 20000; n++) begin
      for (int d = 0; d < 2; d++) begin
        x[d] = longint'($signed(13'($urandom)));
        s[d] = longint'($signed(13'($urandom)));
        if (n % 2 == 1) begin
          x[d] = x[d] >>> 1;
          s[d] = s[d] >>> 1;
        end
        naf(x[d], 13, rs, rm);
        xc[d].s = rs[12:0];
        xc[d].m = rm[12:0];
        sv[d]   = 13'(s[d]);
      end
      #1;
      exp = kernel(x[0], x[1], s[0], s[1], 1'b0, 4);
      checks++;
      if (k_lin !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL linear k=%0d exp=%0d", k_lin, exp);
      end
      if (n % 2 == 1) begin
        exp = kernel(x[0], x[1], s[0], s[1], 1'b1, 4);
        checks++;
        if (k_poly !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL poly k=%0d exp=%0d", k_poly, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
