// tb_rns_reverse_converter -- checks FSM reverse conversion, signed mapping and timing.
//
// For n = 3 (M = 504) and n = 5 (M = 32736) the testbench picks signed
// values X in [-M/2, M/2 - 1] (both ends included), computes the three
// residues itself and presents start at random whenever ready is high,
// so conversions run both back to back (restart from the last channel
// state) and after idle gaps. Every result must equal X and arrive
// exactly three clock edges after the edge that took its start; ready must
// be low one and two edges after a start, and ready_next must predict
// ready. The residue inputs are scrambled when no start is presented, to
// show they are captured.
module tb_rns_reverse_converter;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  logic [2:0][3:0] res3;
  logic [2:0][5:0] res5;
  logic ready3, ready5, rn3, rn5, v3, v5;
  logic signed [8:0]  y3;
  logic signed [14:0] y5;
  int checks = 0;
  int failures = 0;
  int q3 [$];
  int q5 [$];
  int qc [$];
  int n_b2b = 0;

  always #5 clk = ~clk;

  rns_reverse_converter #(.N(3)) u3 (.clk, .rst_n, .start, .res(res3),
                                     .ready(ready3), .ready_next(rn3), .y_valid(v3), .y(y3));
  rns_reverse_converter #(.N(5)) u5 (.clk, .rst_n, .start, .res(res5),
                                     .ready(ready5), .ready_next(rn5), .y_valid(v5), .y(y5));

  function automatic int ref_mod(int v, int m);
    int t;
    t = v % m;
    if (t < 0) t += m;
    return t;
  endfunction

  function automatic int pick(int half, int i);
    if (i == 0) return -half;
    if (i == 1) return half - 1;
    if (i == 2) return 0;
    if (i == 3) return -1;
    return int'($urandom_range(0, 2 * half - 1)) - half;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycle, sent, last_start;
    bit pred;
    rst_n = 1'b0; start = 1'b0; res3 = '0; res5 = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cycle = 0; sent = 0; last_start = -100;
    pred = 1'b1;
    while (sent < 1000 || q3.size() != 0) begin
      checks += 2;
      if (ready3 != ready5) failures++;
      if (pred != ready3) begin failures++; $display("FAIL ready_next prediction"); end
      if (sent < 1000 && ready3 && $urandom_range(0, 3) != 0) begin
        int x3, x5;
        x3 = pick(252, sent);
        x5 = pick(16368, sent);
        res3 = {4'(ref_mod(x3, 9)), 4'(ref_mod(x3, 8)), 4'(ref_mod(x3, 7))};
        res5 = {6'(ref_mod(x5, 33)), 6'(ref_mod(x5, 32)), 6'(ref_mod(x5, 31))};
        start = 1'b1;
        q3.push_back(x3); q5.push_back(x5); qc.push_back(cycle + 1);
        if (cycle - last_start == 3) n_b2b++;
        last_start = cycle;
        sent++;
      end else begin
        start = 1'b0;
        res3 = 12'($urandom); res5 = 18'($urandom);
      end
      #1;
      pred = start ? 1'b0 : rn3;
      @(posedge clk);
      cycle++;
      #1;
      if (v3 || v5) begin
        int e3, e5, c;
        checks += 4;
        if (!(v3 && v5) || q3.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          e3 = q3.pop_front(); e5 = q5.pop_front(); c = qc.pop_front();
          if (cycle - c != 3) begin failures++; $display("FAIL latency %0d", cycle - c); end
          if (int'(y3) != e3) begin failures++; if (failures < 10) $display("FAIL n=3 x=%0d y=%0d", e3, y3); end
          if (int'(y5) != e5) begin failures++; if (failures < 10) $display("FAIL n=5 x=%0d y=%0d", e5, y5); end
        end
      end
    end
    $display("back-to-back conversions: %0d", n_b2b);
    checks++;
    if (n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
