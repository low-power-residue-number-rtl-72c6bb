// tb_rns_crt_lut -- property check of the decomposed CRT tables.
//
// For n = 3 (M = 504) and n = 5 (M = 32736), every entry of every channel
// table is read. Entry r of channel i must be below M, leave residue r
// modulo m_i and residue 0 modulo the other two moduli: that is what makes
// the sum of the three terms, taken modulo M, the value with the given
// residues. A residue at or above m_i must read zero.
module tb_rns_crt_lut;

  logic [3:0]  r3;
  logic [5:0]  r5;
  logic [8:0]  t3 [3];
  logic [14:0] t5 [3];
  int checks = 0;
  int failures = 0;

  for (genvar c = 0; c < 3; c++) begin : g_dut
    rns_crt_lut #(.N(3), .CH(c)) u3 (.residue(r3), .term(t3[c]));
    rns_crt_lut #(.N(5), .CH(c)) u5 (.residue(r5), .term(t5[c]));
  end

  task automatic check_entry(int t, int r, int c, int mods[3], int big_m);
    checks++;
    if (t >= big_m) failures++;
    for (int j = 0; j < 3; j++) begin
      checks++;
      if ((t % mods[j]) != ((j == c) ? r : 0)) begin
        failures++;
        if (failures < 10) $display("FAIL M=%0d ch%0d r=%0d term=%0d mod %0d", big_m, c, r, t, mods[j]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m3[3] = '{7, 8, 9};
    int m5[3] = '{31, 32, 33};
    for (int r = 0; r < 16; r++) begin
      r3 = 4'(r);
      #1;
      for (int c = 0; c < 3; c++)
        if (r < m3[c]) check_entry(int'(t3[c]), r, c, m3, 504);
        else begin
          checks++;
          if (t3[c] != 0) failures++;
        end
    end
    for (int r = 0; r < 64; r++) begin
      r5 = 6'(r);
      #1;
      for (int c = 0; c < 3; c++)
        if (r < m5[c]) check_entry(int'(t5[c]), r, c, m5, 32736);
        else begin
          checks++;
          if (t5[c] != 0) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
