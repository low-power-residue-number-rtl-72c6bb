// tb_rns_fir_channel -- checks the three residue channels of an 8-tap filter.
//
// The three channels of the n = 3 set (moduli 7, 8, 9) share one stream of
// random signed 8-bit samples and one random coefficient set, which is
// reloaded half-way. A model in this testbench keeps the exact integer
// history; in the cycle after each shift the channel output must equal the
// exact convolution sum reduced modulo that channel's modulus. Samples
// are not shifted on every cycle, so holding the delay line is checked too.
module tb_rns_fir_channel;

  localparam int TAPS = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic shift_en;
  logic signed [7:0] sample;
  logic coef_we;
  logic [2:0] coef_addr;
  logic signed [7:0] coef;
  logic [3:0] y_res [3];
  int checks = 0;
  int failures = 0;
  int hist [TAPS];
  int h [TAPS];
  int mods [3] = '{7, 8, 9};

  always #5 clk = ~clk;

  for (genvar c = 0; c < 3; c++) begin : g_dut
    rns_fir_channel #(.N(3), .CH(c), .DATA_W(8), .TAPS(TAPS)) u_ch (
      .clk, .rst_n, .shift_en, .sample, .coef_we, .coef_addr, .coef,
      .y_res(y_res[c])
    );
  end

  function automatic int ref_mod(int v, int m);
    int t;
    t = v % m;
    if (t < 0) t += m;
    return t;
  endfunction

  task automatic load_coefs();
    for (int k = 0; k < TAPS; k++) begin
      h[k] = int'($urandom_range(0, 255)) - 128;
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 3'(k); coef = 8'(h[k]);
      @(posedge clk);
      #1 coef_we = 1'b0;
    end
  endtask

  task automatic check_outputs(string what);
    int acc;
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += h[k] * hist[k];
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (int'(y_res[c]) != ref_mod(acc, mods[c])) begin
        failures++;
        if (failures < 10) $display("FAIL %s ch%0d got %0d exp %0d (sum %0d)", what, c, y_res[c], ref_mod(acc, mods[c]), acc);
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; shift_en = 1'b0; coef_we = 1'b0; coef_addr = '0; coef = '0; sample = '0;
    for (int k = 0; k < TAPS; k++) begin hist[k] = 0; h[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check_outputs("reset");
    load_coefs();
    #1 check_outputs("coef");
    for (int i = 0; i < 400; i++) begin
      int v;
      if (i == 200) load_coefs();
      @(negedge clk);
      v = int'($urandom_range(0, 255)) - 128;
      sample = 8'(v);
      shift_en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (shift_en) begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = v;
      end
      #1 shift_en = 1'b0;
      check_outputs("stream");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
