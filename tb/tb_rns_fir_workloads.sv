// tb_rns_fir_workloads -- the filter configurations of the published evaluation.
//
// Runs the filter in the sizes it was evaluated at, each through
// tb_rns_fir_harness with random data sized to stay mostly inside the
// dynamic range M:
//   n = 3 (moduli 7, 8, 9), 8-bit words:   4-tap filter on 8-tap hardware,
//                                          4-tap and 16-tap hardware
//   n = 5 (moduli 31, 32, 33), 16-bit words: 8-tap and 16-tap hardware
// and prints one summary line over all of them.
module tb_rns_fir_workloads;

  localparam int NCFG = 5;

  logic clk = 1'b0;
  logic [NCFG-1:0] done;
  int c_checks [NCFG];
  int c_fail   [NCFG];
  int c_range  [NCFG];

  always #5 clk = ~clk;

  tb_rns_fir_harness #(.N(3), .DATA_W(8),  .TAPS(8),  .ACTIVE_TAPS(4),  .NSAMP(600), .AMP_X(9),  .AMP_H(6))
    u_w0 (.clk, .done(done[0]), .checks(c_checks[0]), .failures(c_fail[0]), .in_range(c_range[0]));
  tb_rns_fir_harness #(.N(3), .DATA_W(8),  .TAPS(4),  .ACTIVE_TAPS(4),  .NSAMP(600), .AMP_X(9),  .AMP_H(6))
    u_w1 (.clk, .done(done[1]), .checks(c_checks[1]), .failures(c_fail[1]), .in_range(c_range[1]));
  tb_rns_fir_harness #(.N(3), .DATA_W(8),  .TAPS(16), .ACTIVE_TAPS(16), .NSAMP(600), .AMP_X(5),  .AMP_H(3))
    u_w2 (.clk, .done(done[2]), .checks(c_checks[2]), .failures(c_fail[2]), .in_range(c_range[2]));
  tb_rns_fir_harness #(.N(5), .DATA_W(16), .TAPS(8),  .ACTIVE_TAPS(8),  .NSAMP(600), .AMP_X(60), .AMP_H(30))
    u_w3 (.clk, .done(done[3]), .checks(c_checks[3]), .failures(c_fail[3]), .in_range(c_range[3]));
  tb_rns_fir_harness #(.N(5), .DATA_W(16), .TAPS(16), .ACTIVE_TAPS(16), .NSAMP(600), .AMP_X(40), .AMP_H(25))
    u_w4 (.clk, .done(done[4]), .checks(c_checks[4]), .failures(c_fail[4]), .in_range(c_range[4]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      $display("config %0d: checks=%0d failures=%0d in_range=%0d", i, c_checks[i], c_fail[i], c_range[i]);
      checks += c_checks[i];
      failures += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
