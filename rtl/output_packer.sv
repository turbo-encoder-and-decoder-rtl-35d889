// output_packer: output buffer and bit packing of the decoder, with the
// error indication.
//
// In the last half-iteration each SISO unit delivers one hard decision per
// clock together with the natural-order position of that bit (the
// deinterleaved address).  The packer writes the N_SISO bits of a cycle into
// an N-bit assembly word.  On `commit` the word is copied to the output
// buffer `dec_word`, and `error` is set when the decoded word differs from
// the hard decision of the received systematic bits, i.e. when the decoder
// had to correct the received message.  The design names a "CRC bit
// packing" block; no CRC polynomial or CRC field is given, so only the
// packing is built and the error flag is the comparison above.
module output_packer
  import turbo_pkg::*;
#(
  parameter int unsigned N = N_BITS,
  parameter int unsigned P = N_SISO,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] pos  [P],
  input  logic          bits [P],
  input  logic          commit,
  input  logic [N-1:0]  sys_hard,
  output logic [N-1:0]  dec_word,
  output logic          error
);

  logic [N-1:0] asm_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      asm_q    <= '0;
      dec_word <= '0;
      error    <= 1'b0;
    end else begin
      if (we) begin
        for (int p = 0; p < P; p++) asm_q[pos[p]] <= bits[p];
      end
      if (commit) begin
        dec_word <= asm_q;
        error    <= (asm_q != sys_hard);
      end
    end
  end

endmodule
