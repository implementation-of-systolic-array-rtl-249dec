// tb_csd_encoder: exhaustive check of the CSD encoder at 13 bits (test
// vector words) and 16 bits (alpha words) against an independent
// non-adjacent-form reference, plus the conversion examples 4.2, 4.5, 5, 5.5,
// 6 and 3 in Q5.8. Also checks that no two adjacent digits are non-zero and
// that the digits add up to the input.
module tb_csd_encoder;
  import tb_svm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [12:0] x13, s13, m13;
  logic [15:0] x16, s16, m16;

  csd_encoder #(.W(13)) dut13 (.x(x13), .xis(s13), .xim(m13));
  csd_encoder #(.W(16)) dut16 (.x(x16), .xis(s16), .xim(m16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check13(input logic [12:0] v);
    logic [63:0] rs, rm;
    x13 = v;
    #1;
    naf(longint'($signed(v)), 13, rs, rm);
    checks++;
    if (s13 !== rs[12:0] || m13 !== rm[12:0] || (m13 & (m13 >> 1)) != 0 ||
        csd_value({51'b0, s13}, {51'b0, m13}, 13) != longint'($signed(v)) ||
        (s13 & ~m13) != 0) begin
      failures++;
      if (failures < 10)
        $display("FAIL W13 x=%0d s=%b m=%b exp s=%b m=%b", $signed(v), s13, m13, rs[12:0], rm[12:0]);
    end
  endtask

  task automatic table_row(input real val, input logic [12:0] es, input logic [12:0] em);
    x13 = 13'($rtoi(val * 256.0));
    #1;
    checks++;
    if (s13 !== es || m13 !== em) begin
      failures++;
      $display("FAIL example %f: s=%b m=%b exp s=%b m=%b", val, s13, m13, es, em);
    end
  endtask

  initial begin
    for (int v = 0; v < 8192; v++) check13(13'(v));
    for (int v = 0; v < 65536; v++) begin
      logic [63:0] rs, rm;
      x16 = 16'(v);
      #1;
      naf(longint'($signed(x16)), 16, rs, rm);
      checks++;
      if (s16 !== rs[15:0] || m16 !== rm[15:0] ||
          csd_value({48'b0, s16}, {48'b0, m16}, 16) != longint'($signed(x16))) begin
        failures++;
        if (failures < 10) $display("FAIL W16 x=%0d", $signed(x16));
      end
    end
    // Conversion examples (Q5.8, digit 8 is the units digit).
    table_row(4.2, 13'b0000000010001, 13'b0010001010101);
    table_row(4.5, 13'b0000000000000, 13'b0010010000000);
    table_row(5.0, 13'b0000000000000, 13'b0010100000000);
    table_row(5.5, 13'b0001010000000, 13'b0101010000000);
    table_row(6.0, 13'b0001000000000, 13'b0101000000000);
    table_row(3.0, 13'b0000100000000, 13'b0010100000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
