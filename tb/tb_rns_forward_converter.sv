// tb_rns_forward_converter -- exhaustive and random check of signed binary to residue conversion.
//
// Instantiates the converter for all three channels of the n = 3 set
// (7, 8, 9) with 8-bit inputs, and of the n = 5 set (31, 32, 33) with
// 16-bit inputs. Every 8-bit value and 4000 random 16-bit values are
// applied; the expected residue is the mathematical x mod m in [0, m),
// computed here with integer arithmetic.
module tb_rns_forward_converter;

  logic signed [7:0]  x8;
  logic signed [15:0] x16;
  logic [3:0] r8  [3];
  logic [5:0] r16 [3];
  int checks = 0;
  int failures = 0;

  for (genvar c = 0; c < 3; c++) begin : g_dut
    rns_forward_converter #(.N(3), .CH(c), .DATA_W(8))  u8  (.x(x8),  .r(r8[c]));
    rns_forward_converter #(.N(5), .CH(c), .DATA_W(16)) u16 (.x(x16), .r(r16[c]));
  end

  function automatic int ref_mod(int v, int m);
    int t;
    t = v % m;
    if (t < 0) t += m;
    return t;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m8[3]  = '{7, 8, 9};
    int m16[3] = '{31, 32, 33};
    for (int v = -128; v < 128; v++) begin
      x8 = 8'(v);
      #1;
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (int'(r8[c]) != ref_mod(v, m8[c])) begin
          failures++;
          if (failures < 10) $display("FAIL n=3 ch%0d x=%0d r=%0d exp=%0d", c, v, r8[c], ref_mod(v, m8[c]));
        end
      end
    end
    for (int i = 0; i < 4000; i++) begin
      int v;
      v = (i < 4) ? ((i == 0) ? -32768 : (i == 1) ? 32767 : (i == 2) ? 0 : -1)
                  : int'($urandom_range(0, 65535)) - 32768;
      x16 = 16'(v);
      #1;
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (int'(r16[c]) != ref_mod(v, m16[c])) begin
          failures++;
          if (failures < 10) $display("FAIL n=5 ch%0d x=%0d r=%0d exp=%0d", c, v, r16[c], ref_mod(v, m16[c]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
