// tb_rns_mod_adder -- exhaustive check of the modulo-m adder.
//
// For the n = 3 set (7, 8, 9) and the n = 4 set (15, 16, 17), every pair
// of residues a, b < m is applied to the three channel instances and the
// output is compared with (a + b) mod m computed with integer arithmetic.
module tb_rns_mod_adder;

  logic [3:0] a3, b3;
  logic [4:0] a4, b4;
  logic [3:0] y3 [3];
  logic [4:0] y4 [3];
  int checks = 0;
  int failures = 0;

  for (genvar c = 0; c < 3; c++) begin : g_dut
    rns_mod_adder #(.N(3), .CH(c)) u3 (.a(a3), .b(b3), .s(y3[c]));
    rns_mod_adder #(.N(4), .CH(c)) u4 (.a(a4), .b(b4), .s(y4[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m3[3] = '{7, 8, 9};
    int m4[3] = '{15, 16, 17};
    for (int c = 0; c < 3; c++) begin
      for (int a = 0; a < m3[c]; a++)
        for (int b = 0; b < m3[c]; b++) begin
          a3 = 4'(a); b3 = 4'(b);
          #1;
          checks++;
          if (int'(y3[c]) != (a + b) % m3[c]) begin
            failures++;
            if (failures < 10) $display("FAIL n=3 ch%0d %0d + %0d -> %0d", c, a, b, y3[c]);
          end
        end
      for (int a = 0; a < m4[c]; a++)
        for (int b = 0; b < m4[c]; b++) begin
          a4 = 5'(a); b4 = 5'(b);
          #1;
          checks++;
          if (int'(y4[c]) != (a + b) % m4[c]) begin
            failures++;
            if (failures < 10) $display("FAIL n=4 ch%0d %0d + %0d -> %0d", c, a, b, y4[c]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
