// tb_rns_fir_top -- end-to-end test of the RNS FIR filter at its default size.
//
// Drives rns_fir_top with no parameter overrides (n = 3, moduli 7/8/9,
// M = 504, 8-bit data, 8 taps). An exact integer model of the FIR runs
// alongside: each accepted sample yields an expected output, the exact
// convolution sum folded into the signed range [-252, 251] (equal to the
// exact sum whenever that sum is in range). Every output is compared with
// the model and must arrive on the 4th clock edge after the edge that took
// its sample.
//
// Phases: random in_valid with small data (results in range), continuous
// in_valid (the filter then takes one sample per 3 clocks), and large data
// whose sums leave the dynamic range. Coefficients are reloaded several
// times while samples stream. Counted mechanisms, each of which must occur:
// input stalls, coefficient reloads during streaming, negative and
// positive results, results outside the dynamic range, and back-to-back
// acceptance at the full rate.
module tb_rns_fir_top;

  localparam int TAPS   = 8;
  localparam int BIG_M  = 504;
  localparam int NSAMP  = 3000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic in_ready;
  logic signed [7:0] in_sample;
  logic coef_we;
  logic [2:0] coef_addr;
  logic signed [7:0] coef;
  logic out_valid;
  logic signed [8:0] out_y;

  int checks = 0;
  int failures = 0;
  int hist [TAPS];
  int h [TAPS];
  int exp_q [$];
  int cyc_q [$];
  int n_stall = 0, n_reload = 0, n_neg = 0, n_pos = 0, n_overflow = 0, n_b2b = 0;

  always #5 clk = ~clk;

  rns_fir_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sample,
    .coef_we, .coef_addr, .coef, .out_valid, .out_y
  );

  function automatic int wrap(int v);
    int t;
    t = v % BIG_M;
    if (t < 0) t += BIG_M;
    if (t >= BIG_M / 2) t -= BIG_M;
    return t;
  endfunction

  initial begin
    repeat (NSAMP * 6 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycle, accepted, last_acc, reload_k, amp_x, amp_h;
    bit reloading;
    rst_n = 1'b0; in_valid = 1'b0; in_sample = '0; coef_we = 1'b0; coef_addr = '0; coef = '0;
    for (int k = 0; k < TAPS; k++) begin hist[k] = 0; h[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cycle = 0; accepted = 0; last_acc = -100; reload_k = 0; reloading = 1'b1;
    while (accepted < NSAMP) begin
      // phase selection
      amp_x = (accepted < 2000) ? 7 : 127;
      amp_h = (accepted < 2000) ? 4 : 127;
      // drive this cycle's inputs
      if (accepted < 1000)      in_valid = ($urandom_range(0, 3) != 0);
      else                      in_valid = 1'b1;
      in_sample = 8'(int'($urandom_range(0, 2 * amp_x)) - amp_x);
      if (!reloading && accepted > 0 && accepted % 400 == 0 && cycle % 4 == 0) begin
        reloading = 1'b1; reload_k = 0;
      end
      coef_we = reloading;
      if (reloading) begin
        coef_addr = 3'(reload_k);
        coef = 8'(int'($urandom_range(0, 2 * amp_h)) - amp_h);
      end
      #1;
      // model the edge that follows
      if (in_valid && !in_ready) n_stall++;
      if (coef_we) begin
        h[reload_k] = int'(coef);
        reload_k++;
        if (reload_k == TAPS) begin
          reloading = 1'b0;
          if (accepted > 0) n_reload++;
        end
      end
      if (in_valid && in_ready) begin
        int exact;
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(in_sample);
        exact = 0;
        for (int k = 0; k < TAPS; k++) exact += h[k] * hist[k];
        if (exact != wrap(exact)) n_overflow++;
        exp_q.push_back(wrap(exact));
        cyc_q.push_back(cycle + 1);
        if (cycle - last_acc == 3) n_b2b++;
        last_acc = cycle;
        accepted++;
      end
      @(posedge clk);
      cycle++;
      #1;
      if (out_valid) begin
        int e, c;
        checks += 2;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %0d", out_y);
        end else begin
          e = exp_q.pop_front();
          c = cyc_q.pop_front();
          if (int'(out_y) != e) begin
            failures++;
            if (failures < 10) $display("FAIL out %0d exp %0d", out_y, e);
          end
          if (cycle - c != 4) begin
            failures++;
            if (failures < 10) $display("FAIL latency %0d", cycle - c);
          end
          if (e < 0) n_neg++;
          if (e > 0) n_pos++;
        end
      end
    end
    in_valid = 1'b0;
    repeat (6) begin
      @(posedge clk);
      #1;
      cycle++;
      if (out_valid) begin
        int e, c;
        checks += 2;
        e = exp_q.pop_front();
        c = cyc_q.pop_front();
        if (int'(out_y) != e) failures++;
        if (cycle - c != 4) failures++;
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("mechanisms: stalls=%0d reloads=%0d negative=%0d positive=%0d overflow=%0d back_to_back=%0d",
             n_stall, n_reload, n_neg, n_pos, n_overflow, n_b2b);
    checks += 6;
    if (n_stall == 0)    failures++;
    if (n_reload == 0)   failures++;
    if (n_neg == 0)      failures++;
    if (n_pos == 0)      failures++;
    if (n_overflow == 0) failures++;
    if (n_b2b == 0)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
