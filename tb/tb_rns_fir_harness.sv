// tb_rns_fir_harness -- reusable stimulus and checker for one rns_fir_top configuration.
//
// Instantiates rns_fir_top with the given N, DATA_W and TAPS, loads
// ACTIVE_TAPS random coefficients (the rest stay zero, so a shorter filter
// runs on longer hardware), streams NSAMP random samples with random
// in_valid and one coefficient reload half-way, and compares every output
// with an exact integer model folded into [-M/2, M/2 - 1] and with the
// 4-edge latency. Sample and coefficient amplitudes are chosen by the
// caller; in_range counts outputs whose exact sum lies in the dynamic
// range. done rises when all outputs have been checked.
module tb_rns_fir_harness #(
  parameter int unsigned N           = 3,
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned TAPS        = 8,
  parameter int unsigned ACTIVE_TAPS = 8,
  parameter int          NSAMP       = 500,
  parameter longint      AMP_X       = 7,
  parameter longint      AMP_H       = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   in_range
);

  localparam int unsigned   AW    = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int unsigned   MW    = rns_pkg::range_w(N);
  localparam longint        BIG_M = longint'(rns_pkg::dyn_range(N));

  logic rst_n;
  logic in_valid, in_ready;
  logic signed [DATA_W-1:0] in_sample;
  logic coef_we;
  logic [AW-1:0] coef_addr;
  logic signed [DATA_W-1:0] coef;
  logic out_valid;
  logic signed [MW-1:0] out_y;

  longint hist [TAPS];
  longint h [TAPS];
  longint exp_q [$];
  int     cyc_q [$];

  rns_fir_top #(.N(N), .DATA_W(DATA_W), .TAPS(TAPS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sample,
    .coef_we, .coef_addr, .coef, .out_valid, .out_y
  );

  function automatic longint wrap(longint v);
    longint t;
    t = v % BIG_M;
    if (t < 0) t += BIG_M;
    if (t >= BIG_M / 2) t -= BIG_M;
    return t;
  endfunction

  function automatic longint rnd(longint amp);
    return longint'({$urandom, $urandom} % longint'(2 * amp + 1)) - amp;
  endfunction

  task automatic write_coef(int k, longint v);
    coef_we = 1'b1; coef_addr = AW'(k); coef = DATA_W'(v);
    h[k] = v;
    @(posedge clk);
    #1 coef_we = 1'b0;
  endtask

  initial begin
    int cycle, accepted;
    bit reloaded;
    done = 1'b0; checks = 0; failures = 0; in_range = 0;
    rst_n = 1'b0; in_valid = 1'b0; in_sample = '0; coef_we = 1'b0; coef_addr = '0; coef = '0;
    for (int k = 0; k < TAPS; k++) begin hist[k] = 0; h[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < ACTIVE_TAPS; k++) write_coef(k, rnd(AMP_H));
    cycle = 0; accepted = 0; reloaded = 1'b0;
    while (accepted < NSAMP || exp_q.size() != 0) begin
      // half-way: let the pipeline drain, then load a new coefficient set
      if (accepted == NSAMP / 2 && !reloaded && exp_q.size() == 0) begin
        for (int k = 0; k < ACTIVE_TAPS; k++) write_coef(k, rnd(AMP_H));
        reloaded = 1'b1;
      end
      in_valid  = (accepted < NSAMP) && ($urandom_range(0, 3) != 0)
                  && !(accepted == NSAMP / 2 && !reloaded);
      in_sample = DATA_W'(rnd(AMP_X));
      #1;
      if (in_valid && in_ready) begin
        longint exact;
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = longint'(in_sample);
        exact = 0;
        for (int k = 0; k < TAPS; k++) exact += h[k] * hist[k];
        if (exact == wrap(exact)) in_range++;
        exp_q.push_back(wrap(exact));
        cyc_q.push_back(cycle + 1);
        accepted++;
      end
      @(posedge clk);
      cycle++;
      #1;
      in_valid = 1'b0;
      if (out_valid) begin
        checks += 2;
        if (exp_q.size() == 0) failures++;
        else begin
          longint e;
          int c;
          e = exp_q.pop_front();
          c = cyc_q.pop_front();
          if (longint'(out_y) != e) begin
            failures++;
            if (failures < 5) $display("FAIL N=%0d TAPS=%0d out %0d exp %0d", N, TAPS, out_y, e);
          end
          if (cycle - c != 4) failures++;
        end
      end
    end
    checks++;
    if (in_range == 0) failures++;
    done = 1'b1;
  end

endmodule
