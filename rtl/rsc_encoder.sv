// rsc_encoder: bit-serial 8-state recursive systematic convolutional encoder.
//
// Three memory cells m1 -> m2 -> m3.  The input bit is added (XOR) to the
// feedback m2 ^ m3 (feedback polynomial 1 + D^2 + D^3); the parity bit is
// that sum XORed with m1 and m3 (feedforward polynomial 1 + D + D^3).  The
// structure and both polynomials follow the design; the systematic output
// is the input bit itself and is not repeated here.
//
// Interface: `clear` returns the encoder to state 000 (highest priority);
// while `en` is high one input bit `d` is consumed per clock.  `parity` is
// combinational from the current state and `d`, so it belongs to the bit
// presented in the same cycle.  Trellis termination (tail bits) is not
// generated: every frame starts in state 000 and ends where the data leave
// it.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic       clear,   // start a new frame in state 000
  input  logic       en,      // consume `d` this cycle
  input  logic       d,       // message bit
  output logic       parity,  // parity bit for `d`
  output logic [2:0] state    // {m1, m2, m3}
);

  logic [2:0] state_q;

  assign parity = rsc_par(state_q, d);
  assign state  = state_q;

  always_ff @(posedge clk) begin
    if (rst || clear) state_q <= 3'b000;
    else if (en)      state_q <= rsc_next(state_q, d);
  end

endmodule
