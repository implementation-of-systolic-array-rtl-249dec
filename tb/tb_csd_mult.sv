// tb_csd_mult: random check of the CSD shift-and-add multiplier in its two
// uses: 13-digit test-vector element times 13-bit support-vector element,
// and 16-digit alpha times a 64-bit kernel value, both with the 8 fraction
// bits dropped. The CSD operand is encoded by the reference, the expected
// product is an ordinary multiplication.
module tb_csd_mult;
  import tb_svm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [12:0]        as1, am1;
  logic signed [12:0] b1;
  logic signed [63:0] p1;
  logic [15:0]        as2, am2;
  logic signed [63:0] b2;
  logic signed [63:0] p2;

  csd_mult #(.A_W(13), .B_W(13), .P_W(64), .SHIFT(8)) dut1 (.a_s(as1), .a_m(am1), .b(b1), .p(p1));
  csd_mult #(.A_W(16), .B_W(64), .P_W(64), .SHIFT(8)) dut2 (.a_s(as2), .a_m(am2), .b(b2), .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] rs, rm;
    longint a, b, exp;
    for (int n = 0; n < 20000; n++) begin
      a = longint'($signed(13'($urandom)));
      b = longint'($signed(13'($urandom)));
      if (n == 0) begin a = -4096; b = -4096; end
      if (n == 1) begin a = 4095;  b = -4096; end
      naf(a, 13, rs, rm);
      as1 = rs[12:0]; am1 = rm[12:0]; b1 = 13'(b);
      #1;
      exp = mulq(a, b);
      checks++;
      if (p1 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL 13x13 a=%0d b=%0d p=%0d exp=%0d", a, b, p1, exp);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a = longint'($signed(16'($urandom)));
      b = {$urandom, $urandom};
      b = b >>> 22;  // keep |a*b| below 2^63
      naf(a, 16, rs, rm);
      as2 = rs[15:0]; am2 = rm[15:0]; b2 = b;
      #1;
      exp = mulq(a, b);
      checks++;
      if (p2 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL 16x64 a=%0d b=%0d p=%0d exp=%0d", a, b, p2, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
