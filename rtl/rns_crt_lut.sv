// rns_crt_lut -- decomposed reverse-conversion table of one residue channel.
//
// By the Chinese remainder theorem a value X < M with residues r_0..r_2 is
//     X = | sum_i  W_i * r_i |_M ,   W_i = |M_i * |M_i^-1|_m_i|_M ,
// M_i = M / m_i. Instead of one table addressed by all three residues
// (m_0*m_1*m_2 entries), each channel owns a table of only m_i entries
// holding the term |W_i * r_i|_M; the caller adds the three terms modulo M.
// The table contents are computed at elaboration from that formula, so no
// data file is needed and every N gives a correct table.
//
// Interface: residue in (N+1 bits, below m_i), term out (range_w(N) bits,
// below M). Combinational read; a residue at or above m_i reads zero.
// Splitting the table per modulus is the reference design's main idea;
// the contents are the standard CRT terms.
module rns_crt_lut
  import rns_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned CH = 0,
  localparam int unsigned MW = range_w(N)
) (
  input  logic [N:0]    residue,
  output logic [MW-1:0] term
);

  localparam longint unsigned MOD    = modulus(N, CH);
  localparam longint unsigned BIG_M  = dyn_range(N);
  localparam longint unsigned WEIGHT = crt_weight(N, CH);
  localparam int unsigned     DEPTH  = int'(MOD);

  typedef logic [DEPTH-1:0][MW-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned r = 0; r < DEPTH; r++)
      t[r] = MW'((longint'(r) * WEIGHT) % BIG_M);
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  // The table arithmetic above is done in 64 bits.
  if (N < 2 || N > 12) begin : g_bad_n
    $error("rns_crt_lut: N must lie in 2..12");
  end

  always_comb begin
    if (32'(residue) < DEPTH) term = TABLE[residue];
    else                      term = '0;
  end

endmodule
