// rns_mod_adder -- modulo-m adder for one residue channel.
//
// s = |a + b|_m for residues a, b < m, with m = 2^n-1, 2^n or 2^n+1
// chosen by CH. The binary sum (N+2 bits) is compared with m and m is
// subtracted once when it is reached; for m = 2^n this is simply the low
// n bits. The reference design shows the adders of the filter but not
// their inside; this compare-and-subtract form is this design's choice.
//
// Interface: a, b in, s out, all N+1 bits. Combinational.
module rns_mod_adder
  import rns_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned CH = 0
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s
);

  localparam longint unsigned MOD = modulus(N, CH);

  logic [N+1:0] sum;
  logic [N:0]   diff;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = (N+1)'(sum - (N+2)'(MOD));
    s    = (sum >= (N+2)'(MOD)) ? diff : sum[N:0];
  end

endmodule
