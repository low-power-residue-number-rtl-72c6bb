// rns_mod_multiplier -- modulo-m multiplier for one residue channel.
//
// p = |a * b|_m for residues a, b < m. The full product (2N+2 bits) is
// split at bit n into a high part H and a low part L, P = H*2^n + L, and
// reduced using the special form of each modulus:
//   m = 2^n   : p = L
//   m = 2^n-1 : 2^n = 1 (mod m), so p = |L + H|_m  (one or two subtractions)
//   m = 2^n+1 : 2^n = -1 (mod m), so p = |L - H|_m (add m when negative)
// These end-around folds replace a general divider. The reference design
// describes the modulo multiplier only by its function; the folding is
// this design's choice.
//
// Interface: a, b in, p out, all N+1 bits. Combinational.
module rns_mod_multiplier
  import rns_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned CH = 0
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] p
);

  localparam longint unsigned MOD = modulus(N, CH);
  localparam int unsigned     PW  = 2 * N + 2;

  logic [PW-1:0] prod;
  logic [N-1:0]  lo;
  logic [N+1:0]  hi;
  logic [N+2:0]  acc;   // wide enough for L + H and for L - H as signed

  always_comb begin
    prod = {{(N+1){1'b0}}, a} * {{(N+1){1'b0}}, b};
    lo   = prod[N-1:0];
    hi   = prod[PW-1:N];
    acc  = '0;
    case (CH)
      1: p = {1'b0, lo};
      0: begin
        acc = {3'b000, lo} + {1'b0, hi};
        if (acc >= (N+3)'(MOD)) acc = acc - (N+3)'(MOD);
        if (acc >= (N+3)'(MOD)) acc = acc - (N+3)'(MOD);
        p = acc[N:0];
      end
      default: begin
        acc = {3'b000, lo} - {1'b0, hi};
        if (acc[N+2]) acc = acc + (N+3)'(MOD);
        p = acc[N:0];
      end
    endcase
  end

endmodule
