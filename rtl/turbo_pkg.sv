// turbo_pkg: constants, types and trellis helpers shared by the turbo
// encoder and the parallel max-log-MAP turbo decoder.
//
// The constituent code is the 8-state recursive systematic convolutional
// code of the design: feedback polynomial 1 + D^2 + D^3 and feedforward
// polynomial 1 + D + D^3.  A state is written {m1, m2, m3}, m1 being the
// most recent register, so state S4 = 3'b100 (the numbering of the trellis
// figure).  The block length (32 bits) follows the design.  The interleaver
// is a quadratic permutation polynomial (QPP) pi(i) = (F1*i + F2*i*i) mod N,
// a choice of this implementation: the source design only calls for a
// pseudo-random reordering.  QPP is contention free for any window length
// that divides N, which the parallel decoder relies on.  The fixed-point
// widths, iteration count and extrinsic scaling are also this design's
// choices.
package turbo_pkg;

  // Frame and parallelism
  parameter int unsigned N_BITS   = 32;  // message bits per frame
  parameter int unsigned N_SISO   = 4;   // parallel SISO units
  parameter int unsigned N_STATES = 8;   // trellis states (3 memory cells)
  parameter int unsigned N_ITER   = 6;   // full decoding iterations

  // QPP interleaver coefficients: F1 odd, F2 even (valid for N a power of 2)
  parameter int unsigned QPP_F1 = 7;
  parameter int unsigned QPP_F2 = 12;

  // Fixed-point widths
  parameter int unsigned LLR_W = 6;   // channel LLR
  parameter int unsigned EXT_W = 8;   // extrinsic / a-priori LLR
  parameter int unsigned MET_W = 14;  // state metrics and a-posteriori LLR

  // Magnitude given to a hard channel bit when mapped to an LLR
  parameter int unsigned HARD_LLR_MAG = 8;

  // Decoder schedule phases (address generator and control unit)
  typedef enum logic [2:0] {
    PH_IDLE,  // waiting for a frame
    PH_LOAD,  // copy systematic LLRs into the banks, clear extrinsic
    PH_INIT,  // load window-start/-end metrics into the SISO units
    PH_FWD,   // forward recursion, t = 0..W-1
    PH_BWD,   // backward recursion and LLR output, t = W-1..0
    PH_FIN    // publish decoded word
  } dec_phase_t;

  typedef logic signed [MET_W-1:0] metric_t;
  typedef metric_t [N_STATES-1:0]  metric_vec_t;

  // Very unlikely state metric, used for "unknown start state = no" entries
  localparam metric_t METRIC_NEG = metric_t'(-(1 << (MET_W - 3)));

  // Feedback bit a = d ^ m2 ^ m3 (feedback 1 + D^2 + D^3)
  function automatic logic rsc_fb(input logic [2:0] s, input logic d);
    return d ^ s[1] ^ s[0];
  endfunction

  // Next state {a, m1, m2}
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic d);
    return {rsc_fb(s, d), s[2], s[1]};
  endfunction

  // Parity bit p = a ^ m1 ^ m3 (feedforward 1 + D + D^3)
  function automatic logic rsc_par(input logic [2:0] s, input logic d);
    return rsc_fb(s, d) ^ s[2] ^ s[0];
  endfunction

  // QPP interleaver address for a block of n bits (n a power of 2, n <= 2^16)
  function automatic int unsigned qpp(input int unsigned i, input int unsigned n);
    longint unsigned v;
    v = (longint'(QPP_F1) * i + longint'(QPP_F2) * i * i) % longint'(n);
    return int'(v);
  endfunction

  // Saturate a wide signed value to w bits (w <= 32)
  function automatic logic signed [31:0] sat(input logic signed [31:0] x, input int unsigned w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (w - 1));
    if (x > hi) return hi;
    if (x < lo) return lo;
    return x;
  endfunction

endpackage
