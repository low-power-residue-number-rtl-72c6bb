// rns_fir_channel -- one residue channel of the RNS FIR filter.
//
// Holds the direct-form FIR structure for one modulus m (chosen by CH):
// a delay line of TAPS sample residues, TAPS programmable coefficient
// residues, one modulo multiplier per tap and a chain of modulo adders,
// so that
//     y_res = | sum_k h_k * x[n-k] |_m .
// Samples and coefficients arrive as signed binary words and pass through
// this channel's own forward converter, so the three channels of the
// filter run side by side with no carries between them.
//
// Interface and timing:
//   shift_en  : on a rising clk edge, the converted sample enters tap 0 and
//               the delay line moves one place.
//   coef_we   : on a rising clk edge, coefficient slot coef_addr takes the
//               residue of coef (tap k multiplies x[n-k]).
//   y_res     : combinational from the registers, so it shows the sum for
//               the newest sample in the cycle after shift_en.
//   rst_n     : active-low synchronous reset, clears samples and
//               coefficients to zero.
// The multiplier/adder structure follows the reference design's FIR
// figure; reset, the write port and the direct form are this design's
// choices.
module rns_fir_channel
  import rns_pkg::*;
#(
  parameter int unsigned N      = 3,
  parameter int unsigned CH     = 0,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TAPS   = 8,
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift_en,
  input  logic signed [DATA_W-1:0] sample,
  input  logic                     coef_we,
  input  logic        [AW-1:0]     coef_addr,
  input  logic signed [DATA_W-1:0] coef,
  output logic        [N:0]        y_res
);

  logic [N:0] sample_res;
  logic [N:0] coef_res;
  logic [N:0] x_q [TAPS];
  logic [N:0] h_q [TAPS];
  logic [N:0] prod [TAPS];
  logic [N:0] psum [TAPS+1];

  rns_forward_converter #(.N(N), .CH(CH), .DATA_W(DATA_W)) u_fwd_x (
    .x(sample), .r(sample_res)
  );

  rns_forward_converter #(.N(N), .CH(CH), .DATA_W(DATA_W)) u_fwd_h (
    .x(coef), .r(coef_res)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) begin
        x_q[k] <= '0;
        h_q[k] <= '0;
      end
    end else begin
      if (shift_en) begin
        x_q[0] <= sample_res;
        for (int k = 1; k < TAPS; k++) x_q[k] <= x_q[k-1];
      end
      if (coef_we && (32'(coef_addr) < TAPS)) h_q[coef_addr] <= coef_res;
    end
  end

  assign psum[0] = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    rns_mod_multiplier #(.N(N), .CH(CH)) u_mul (
      .a(x_q[k]), .b(h_q[k]), .p(prod[k])
    );
    rns_mod_adder #(.N(N), .CH(CH)) u_add (
      .a(psum[k]), .b(prod[k]), .s(psum[k+1])
    );
  end

  assign y_res = psum[TAPS];

endmodule
