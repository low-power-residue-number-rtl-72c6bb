// rns_reverse_converter -- FSM-sequenced reverse conversion, residues to signed binary.
//
// Turns the three channel residues of a filter output back into a signed
// binary number. Each channel has its own small decomposed table
// (rns_crt_lut) giving the CRT term |W_i * r_i|_M. A four-state machine
// orders the post computation one channel per clock through a single
// modulo-M adder:
//   IDLE : wait for start; capture the residues.
//   CH0  : acc = T0(r0)
//   CH1  : acc = |acc + T1(r1)|_M
//   CH2  : X   = |acc + T2(r2)|_M, map to signed, raise y_valid; a start
//          in this state captures new residues and goes straight to CH0.
// The signed mapping reads X in [M/2, M) as the negative value X - M, so
// the output range is [-M/2, M/2 - 1]; results outside it alias, as in any
// RNS whose dynamic range is too small for the data.
//
// Interface and timing: start is accepted on a clock edge where ready is
// high (state IDLE or CH2). ready_next is high when a start presented in
// the next cycle will be accepted, provided no start is presented in this
// one (state is not CH0); it lets a caller that registers its start plan
// ahead. y and y_valid are registered; y_valid pulses for one cycle on the
// third clock edge after the edge that accepted start, and y holds until
// the next result. Back-to-back conversions run one every three clocks.
// rst_n is an active-low synchronous reset.
// Per-channel tables and FSM-ordered post accumulation follow the
// reference design; the one-channel-per-state order, the shared adder and
// the handshake are this design's choices.
module rns_reverse_converter
  import rns_pkg::*;
#(
  parameter int unsigned N  = 3,
  localparam int unsigned MW = range_w(N)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NUM_CH-1:0][N:0]        res,
  output logic                          ready,
  output logic                          ready_next,
  output logic                          y_valid,
  output logic signed [MW-1:0]          y
);

  localparam longint unsigned BIG_M = dyn_range(N);
  localparam longint unsigned HALF  = BIG_M / 2;

  typedef enum logic [1:0] {S_IDLE, S_CH0, S_CH1, S_CH2} state_t;

  state_t                   state;
  logic [NUM_CH-1:0][N:0]   res_q;
  logic [MW-1:0]            acc;
  logic [NUM_CH-1:0][MW-1:0] term;
  logic [MW-1:0]            sel_term;
  logic [MW-1:0]            acc_in;
  logic [MW:0]              sum_raw;
  logic [MW-1:0]            sum_mod;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_lut
    rns_crt_lut #(.N(N), .CH(c)) u_lut (
      .residue(res_q[c]), .term(term[c])
    );
  end

  // Channel ordering: the state picks which table feeds the adder.
  always_comb begin
    unique case (state)
      S_CH0:   begin sel_term = term[0]; acc_in = '0;  end
      S_CH1:   begin sel_term = term[1]; acc_in = acc; end
      S_CH2:   begin sel_term = term[2]; acc_in = acc; end
      default: begin sel_term = '0;      acc_in = '0;  end
    endcase
    sum_raw = {1'b0, acc_in} + {1'b0, sel_term};
    if (sum_raw >= (MW+1)'(BIG_M)) sum_raw = sum_raw - (MW+1)'(BIG_M);
    sum_mod = sum_raw[MW-1:0];
  end

  assign ready      = (state == S_IDLE) || (state == S_CH2);
  assign ready_next = (state != S_CH0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      res_q   <= '0;
      acc     <= '0;
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          res_q <= res;
          state <= S_CH0;
        end
        S_CH0: begin
          acc   <= sum_mod;
          state <= S_CH1;
        end
        S_CH1: begin
          acc   <= sum_mod;
          state <= S_CH2;
        end
        default: begin
          acc     <= sum_mod;
          y       <= (sum_mod >= MW'(HALF)) ? signed'(sum_mod - MW'(BIG_M))
                                            : signed'(sum_mod);
          y_valid <= 1'b1;
          if (start) begin
            res_q <= res;
            state <= S_CH0;
          end else begin
            state <= S_IDLE;
          end
        end
      endcase
    end
  end

  // A start while the converter is busy would be lost.
  a_start_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready);

endmodule
