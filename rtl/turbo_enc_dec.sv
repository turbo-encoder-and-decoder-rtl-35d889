// turbo_enc_dec: integrated turbo encoder and decoder for 32-bit messages.
//
// Transmit side: a 32-bit message is turbo encoded into the systematic word
// and two parity words (rate 1/3).  The systematic word leaves the chip on
// `turbo_enc_data_out`, passes through the channel outside the chip and
// comes back on `turbo_enc_data_in` (the two directions of the design's
// bidirectional channel pin, split into an output and an input).  The parity
// words go straight to the decoder inside the chip.  Receive side: every
// received bit becomes a channel LLR of magnitude HARD_LLR_MAG and the
// parallel max-log-MAP decoder rebuilds the message on
// `turbo_rx_data_out_decoder`.  `error` is high when the received word
// differed from the decoded one, i.e. the channel corrupted the message and
// the decoder corrected it.
//
// The pin set follows the design (clock, active-high reset, 32-bit message
// in, channel word, decoded word, error).  The start/done handshake
// (`tx_start`, `rx_done`, `busy`), the hard-bit to LLR mapping and keeping
// the parity words on chip are this design's choices.
//
// Timing: `tx_start` (ignored while `busy`) latches the message.  The
// channel word is valid on `turbo_enc_data_out` N+1 cycles later; the
// decoder samples `turbo_enc_data_in` one cycle after that, and `rx_done`
// pulses when the decoded word and `error` are valid:
// N + 2 + W + 2*N_ITER*(2W+1) + 2 cycles after `tx_start` (248 at the
// default N = 32, N_SISO = 4, N_ITER = 6).  The outputs hold until the next
// frame is decoded.
module turbo_enc_dec
  import turbo_pkg::*;
#(
  parameter int unsigned N     = N_BITS,
  parameter int unsigned P     = N_SISO,
  parameter int unsigned ITERS = N_ITER
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         tx_start,
  input  logic [N-1:0] turbo_tx_data_in_encoder,
  output logic [N-1:0] turbo_enc_data_out,
  input  logic [N-1:0] turbo_enc_data_in,
  output logic [N-1:0] turbo_rx_data_out_decoder,
  output logic         error,
  output logic         rx_done,
  output logic         busy
);

  logic         enc_busy, enc_done, dec_busy, dec_start_q;
  logic [N-1:0] sys_w, par1_w, par2_w;

  turbo_encoder #(.N(N)) u_enc (
    .clk(clk), .rst(reset), .start(tx_start && !busy),
    .data_in(turbo_tx_data_in_encoder),
    .busy(enc_busy), .done(enc_done),
    .sys_out(sys_w), .par1_out(par1_w), .par2_out(par2_w)
  );

  assign turbo_enc_data_out = sys_w;

  // One cycle for the channel between the encoder output and decoder input
  always_ff @(posedge clk) begin
    if (reset) dec_start_q <= 1'b0;
    else       dec_start_q <= enc_done;
  end

  // Hard channel bits -> LLRs (+MAG for 1, -MAG for 0)
  localparam logic signed [LLR_W-1:0] MAG = LLR_W'(HARD_LLR_MAG);
  logic signed [LLR_W-1:0] sys_llr  [N];
  logic signed [LLR_W-1:0] par1_llr [N];
  logic signed [LLR_W-1:0] par2_llr [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      sys_llr[i]  = turbo_enc_data_in[i] ? MAG : -MAG;
      par1_llr[i] = par1_w[i] ? MAG : -MAG;
      par2_llr[i] = par2_w[i] ? MAG : -MAG;
    end
  end

  turbo_decoder #(.N(N), .P(P), .ITERS(ITERS)) u_dec (
    .clk(clk), .rst(reset), .start(dec_start_q),
    .sys_llr(sys_llr), .par1_llr(par1_llr), .par2_llr(par2_llr),
    .busy(dec_busy), .done(rx_done),
    .dec_bits(turbo_rx_data_out_decoder), .error(error)
  );

  assign busy = enc_busy || enc_done || dec_start_q || dec_busy;

endmodule
