// turbo_encoder: rate-1/3 parallel-concatenated turbo encoder, one 32-bit
// message per frame.
//
// Two identical RSC encoders run side by side: encoder 1 reads the message
// in natural order, encoder 2 reads it through the interleaver, bit pi(i) at
// step i.  The codeword is the systematic word plus one parity word per
// encoder, 3N bits in all, as in the design.  The bit-serial schedule, the
// LSB-first bit order and the start/done handshake are this
// implementation's choices.
//
// Timing: a `start` pulse latches `data_in`; the encoders then take one bit
// per clock, so `done` pulses N+1 cycles after `start`, in the cycle where
// `sys_out`, `par1_out` and `par2_out` become valid.  The outputs hold until
// the next frame completes.  `busy` is high while a frame is encoded; a
// `start` during that time is ignored.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned N   = N_BITS,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [N-1:0] data_in,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] sys_out,
  output logic [N-1:0] par1_out,
  output logic [N-1:0] par2_out
);

  logic [N-1:0]  msg_q, p1_q, p2_q;
  logic [AW-1:0] step_q;
  logic          busy_q;
  logic [AW-1:0] pi_idx;
  logic          p1_bit, p2_bit;
  logic          clear;

  qpp_interleaver #(.N(N), .N_BANK(1)) u_pi (
    .idx_in (step_q),
    .idx_out(pi_idx),
    .bank   (),
    .offset ()
  );

  assign clear = start && !busy_q;

  rsc_encoder u_rsc1 (
    .clk(clk), .rst(rst), .clear(clear), .en(busy_q),
    .d(msg_q[step_q]), .parity(p1_bit), .state()
  );

  rsc_encoder u_rsc2 (
    .clk(clk), .rst(rst), .clear(clear), .en(busy_q),
    .d(msg_q[pi_idx]), .parity(p2_bit), .state()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      msg_q    <= '0;
      p1_q     <= '0;
      p2_q     <= '0;
      step_q   <= '0;
      busy_q   <= 1'b0;
      done     <= 1'b0;
      sys_out  <= '0;
      par1_out <= '0;
      par2_out <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        msg_q  <= data_in;
        step_q <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        p1_q[step_q] <= p1_bit;
        p2_q[step_q] <= p2_bit;
        if (step_q == AW'(N - 1)) begin
          busy_q   <= 1'b0;
          done     <= 1'b1;
          sys_out  <= msg_q;
          par1_out <= {p1_bit, p1_q[N-2:0]};
          par2_out <= {p2_bit, p2_q[N-2:0]};
        end else begin
          step_q <= step_q + 1'b1;
        end
      end
    end
  end

  assign busy = busy_q;

endmodule
