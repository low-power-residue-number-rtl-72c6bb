// rns_forward_converter -- signed binary to residue conversion for one channel.
//
// Computes r = |x|_m, the non-negative residue of the signed two's
// complement value x modulo the channel modulus m (2^n-1, 2^n or 2^n+1,
// chosen by CH). Negative values become m - (|x| mod m), so a signed
// value is held in the usual "upper half is negative" RNS form.
//
// How: x is biased to the unsigned value u = x + 2^(DATA_W-1) (the sign
// bit flipped), u is reduced modulo m, and the constant |2^(DATA_W-1)|_m
// is taken away again with one conditional correction. The reference
// design names the conversion block and the need to handle negative
// samples and coefficients; the biasing scheme is this design's choice.
//
// Interface: x in, r out (N+1 bits, always below m). Purely
// combinational, no clock.
module rns_forward_converter
  import rns_pkg::*;
#(
  parameter int unsigned N      = 3,
  parameter int unsigned CH     = 0,
  parameter int unsigned DATA_W = 8
) (
  input  logic signed [DATA_W-1:0] x,
  output logic        [N:0]        r
);

  localparam longint unsigned MOD  = modulus(N, CH);
  localparam longint unsigned BIAS = (longint'(1) << (DATA_W - 1)) % MOD;
  localparam int unsigned     SW   = N + 2;
  localparam int unsigned     UW   = (DATA_W > SW) ? DATA_W : SW;

  logic [UW-1:0]     u;
  logic [SW-1:0]     u_mod;
  logic [SW-1:0]     sum;

  always_comb begin
    u     = UW'({~x[DATA_W-1], x[DATA_W-2:0]});
    u_mod = SW'(u % UW'(MOD));
    // u_mod - BIAS (mod m), done as u_mod + (m - BIAS) with one correction
    sum   = u_mod + SW'((MOD - BIAS) % MOD);
    if (sum >= SW'(MOD)) sum = sum - SW'(MOD);
    r     = sum[N:0];
  end

endmodule
