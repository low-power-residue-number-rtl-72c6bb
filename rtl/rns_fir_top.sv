// rns_fir_top -- RNS FIR filter with decomposed-table, FSM-based reverse conversion.
//
// A TAPS-tap FIR filter computed in the residue number system with the
// moduli set {2^N-1, 2^N, 2^N+1}. Each incoming signed sample and each
// coefficient is converted to three residues; three independent channel
// filters (rns_fir_channel) compute the convolution modulo their own
// modulus with no carries between them; the reverse converter
// (rns_reverse_converter) adds the three per-channel table terms modulo M
// under an FSM and returns the signed result
//     out_y = sum_{k=0}^{TAPS-1} h_k * x[n-k] ,
// exact as long as it lies in [-M/2, M/2 - 1] (M = 504 for N = 3); the
// user chooses N for the range the data needs.
//
// Interface and timing (all on the rising edge of clk, rst_n active-low
// synchronous):
//   in_valid/in_ready/in_sample : a sample is taken on a clock edge where
//     both are high. in_ready then stays low for two cycles while the
//     reverse converter works through the channels, so the filter takes
//     at most one sample every 3 clocks.
//   coef_we/coef_addr/coef : loads coefficient h_coef_addr (the weight of
//     x[n-coef_addr]) at any time; coefficients are zero after reset. A
//     load is used for samples accepted on the same edge or later.
//   out_valid/out_y : one-cycle pulse with the filter output, on the 4th
//     clock edge after the edge that took its sample; out_y holds until the
//     next one.
// The structure (forward conversion, parallel residue channels, decomposed
// table reverse conversion under an FSM) follows the reference design;
// widths, handshake and reset are this design's choices.
module rns_fir_top
  import rns_pkg::*;
#(
  parameter int unsigned N      = 3,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TAPS   = 8,
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned MW    = range_w(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_sample,
  input  logic                     coef_we,
  input  logic        [AW-1:0]     coef_addr,
  input  logic signed [DATA_W-1:0] coef,
  output logic                     out_valid,
  output logic signed [MW-1:0]     out_y
);

  logic                   accept;
  logic                   start_q;
  logic                   conv_ready;
  logic                   conv_ready_next;
  logic [NUM_CH-1:0][N:0] y_res;

  assign accept   = in_valid && in_ready;
  // A sample taken now starts the converter one clock later, so ask the
  // converter whether it can take a start then.
  assign in_ready = conv_ready_next && !start_q;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    rns_fir_channel #(.N(N), .CH(c), .DATA_W(DATA_W), .TAPS(TAPS)) u_ch (
      .clk      (clk),
      .rst_n    (rst_n),
      .shift_en (accept),
      .sample   (in_sample),
      .coef_we  (coef_we),
      .coef_addr(coef_addr),
      .coef     (coef),
      .y_res    (y_res[c])
    );
  end

  // The channel sums settle one cycle after the sample enters the delay
  // lines; start the reverse conversion then.
  always_ff @(posedge clk) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= accept;
  end

  rns_reverse_converter #(.N(N)) u_rev (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start_q),
    .res    (y_res),
    .ready  (conv_ready),
    .ready_next(conv_ready_next),
    .y_valid(out_valid),
    .y      (out_y)
  );

  // in_ready looks one cycle ahead; the start it schedules must find the
  // converter ready.
  a_start_accepted: assert property (@(posedge clk) disable iff (!rst_n)
    start_q |-> conv_ready);

endmodule
