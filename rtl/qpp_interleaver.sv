// qpp_interleaver: combinational interleaver address generator.
//
// Maps a natural-order bit index to its interleaved position with the
// quadratic permutation polynomial pi(i) = (F1*i + F2*i^2) mod N, computed
// with shifts and adds only (N is a power of two, so "mod N" is a bit
// slice).  The design calls for a pseudo-random reordering of the block; the
// QPP law is this implementation's choice because it is contention free for
// the parallel decoder: for any window length W dividing N, the indices
// pi(p*W + t), p = 0..N/W-1, fall into N/W different windows, and
// pi(i) mod W depends only on i mod W.
//
// Also returns the split of the address into bank (window) and offset for
// a memory made of N_BANK banks of N/N_BANK words.
module qpp_interleaver
  import turbo_pkg::*;
#(
  parameter int unsigned N      = N_BITS,
  parameter int unsigned N_BANK = N_SISO,
  parameter int unsigned F1     = QPP_F1,
  parameter int unsigned F2     = QPP_F2,
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned BW    = (N_BANK > 1) ? $clog2(N_BANK) : 1,
  localparam int unsigned OW    = AW - $clog2(N_BANK)
) (
  input  logic [AW-1:0] idx_in,    // natural-order index
  output logic [AW-1:0] idx_out,   // interleaved index pi(idx_in)
  output logic [BW-1:0] bank,      // idx_out / (N / N_BANK)
  output logic [OW-1:0] offset     // idx_out mod (N / N_BANK)
);

  logic [AW-1:0] sq;
  logic [AW-1:0] f1_term, f2_term;

  // All arithmetic is modulo 2^AW = N, so AW-bit wrap-around is exact.
  assign sq      = AW'(idx_in * idx_in);
  assign f1_term = AW'(AW'(F1) * idx_in);
  assign f2_term = AW'(AW'(F2) * sq);
  assign idx_out = f1_term + f2_term;

  if (N_BANK > 1) begin : g_bank
    assign bank = idx_out[AW-1 -: $clog2(N_BANK)];
  end else begin : g_nobank
    assign bank = '0;
  end
  assign offset = idx_out[OW-1:0];

  initial begin
    assert ((1 << AW) == N) else $error("qpp_interleaver: N must be a power of two");
    assert (F1 % 2 == 1 && F2 % 2 == 0) else $error("qpp_interleaver: need F1 odd, F2 even");
  end

endmodule
