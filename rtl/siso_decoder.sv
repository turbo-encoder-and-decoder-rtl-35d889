// siso_decoder: soft-in soft-out max-log-MAP decoder for one window of the
// 8-state trellis.
//
// The unit follows the max-log-MAP equations of the design.  For each
// trellis step k with systematic LLR Ls, parity LLR Lp and a-priori LLR La:
//   branch metric  gamma(d, p) = d*(Ls + La) + p*Lp     (d, p in {0,1})
//   forward        alpha_k+1(s') = max over (s,d) -> s' of alpha_k(s) + gamma
//   backward       beta_k(s)     = max over d of gamma + beta_k+1(next(s,d))
//   a posteriori   L = max_{d=1}(alpha + gamma + beta) - max_{d=0}(...)
//   extrinsic      Le = 3/4 * (L - Ls - La), saturated to EXT_W bits.
// The branch metric differs from the symmetric form +-0.5(La+Ls) +-0.5 Lp
// by a constant that is common to all branches of a step, so L is the same.
// LLRs are positive for bit 1.  The scaling factor mu = 3/4 (the design asks
// only for mu < 1), the fixed-point widths and the normalisation (every new
// metric vector is shifted so that state 0 holds 0) are this design's
// choices.
//
// Schedule, driven by the address generator and control unit:
//   init     load alpha (window start) and beta (window end) metrics
//   fwd_en   one step per clock, k = 0..W-1: push alpha_k and the step's
//            inputs into the two stack buffers, update alpha
//   bwd_en   one step per clock, k = W-1..0: pop alpha_k and the inputs,
//            produce llr/le/hard for step k combinationally in that cycle,
//            update beta
// `alpha_q` holds the window-end metrics after the forward pass and
// `beta_nxt` the window-start metrics during the last backward step; the
// controller saves both for the neighbouring windows' next iteration.
module siso_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned W = N_BITS / N_SISO   // trellis steps per window
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    init,
  input  metric_vec_t             alpha_init,
  input  metric_vec_t             beta_init,
  input  logic                    fwd_en,
  input  logic                    bwd_en,
  input  logic signed [LLR_W-1:0] ls,
  input  logic signed [LLR_W-1:0] lp,
  input  logic signed [EXT_W-1:0] la,
  output logic signed [MET_W-1:0] llr,
  output logic signed [EXT_W-1:0] le,
  output logic                    hard,
  output metric_vec_t             alpha_q,
  output metric_vec_t             beta_nxt
);

  localparam int unsigned IN_W = 2 * LLR_W + EXT_W;

  metric_vec_t beta_q;
  metric_vec_t alpha_nxt;
  metric_vec_t alpha_pop;
  logic [IN_W-1:0] in_pop;

  logic signed [LLR_W-1:0] b_ls, b_lp;
  logic signed [EXT_W-1:0] b_la;

  // ---- stack buffers ("FIFO" blocks) ---------------------------------
  siso_buffer #(.WIDTH(N_STATES * MET_W), .DEPTH(W)) u_alpha_buf (
    .clk(clk), .rst(rst), .clear(init),
    .push(fwd_en), .wdata(alpha_q),
    .pop(bwd_en), .rdata(alpha_pop), .level()
  );

  siso_buffer #(.WIDTH(IN_W), .DEPTH(W)) u_in_buf (
    .clk(clk), .rst(rst), .clear(init),
    .push(fwd_en), .wdata({ls, lp, la}),
    .pop(bwd_en), .rdata(in_pop), .level()
  );

  assign {b_ls, b_lp, b_la} = in_pop;

  // Branch metric for input bit d and parity bit p
  function automatic metric_t gamma(input logic d, input logic p,
                                    input logic signed [LLR_W-1:0] s_llr,
                                    input logic signed [LLR_W-1:0] p_llr,
                                    input logic signed [EXT_W-1:0] a_llr);
    metric_t g;
    g = '0;
    if (d) g = g + metric_t'(s_llr) + metric_t'(a_llr);
    if (p) g = g + metric_t'(p_llr);
    return g;
  endfunction

  // ---- forward recursion ---------------------------------------------
  always_comb begin
    metric_vec_t m;
    for (int s = 0; s < N_STATES; s++) m[s] = METRIC_NEG - metric_t'(1 << (MET_W - 3));
    for (int s = 0; s < N_STATES; s++) begin
      for (int d = 0; d < 2; d++) begin
        logic [2:0] ns;
        metric_t    cand;
        ns   = rsc_next(3'(s), 1'(d));
        cand = alpha_q[s] + gamma(1'(d), rsc_par(3'(s), 1'(d)), ls, lp, la);
        if (cand > m[ns]) m[ns] = cand;
      end
    end
    for (int s = 0; s < N_STATES; s++) alpha_nxt[s] = m[s] - m[0];
  end

  // ---- backward recursion and LLR ------------------------------------
  always_comb begin
    metric_vec_t b;
    metric_t     best [2];
    logic signed [MET_W+1:0] raw;
    logic signed [MET_W+3:0] scaled;
    for (int s = 0; s < N_STATES; s++) b[s] = METRIC_NEG - metric_t'(1 << (MET_W - 3));
    best[0] = METRIC_NEG - metric_t'(1 << (MET_W - 3));
    best[1] = best[0];
    for (int s = 0; s < N_STATES; s++) begin
      for (int d = 0; d < 2; d++) begin
        logic [2:0] ns;
        metric_t    gb, cand;
        ns   = rsc_next(3'(s), 1'(d));
        gb   = gamma(1'(d), rsc_par(3'(s), 1'(d)), b_ls, b_lp, b_la) + beta_q[ns];
        if (gb > b[s]) b[s] = gb;
        cand = alpha_pop[s] + gb;
        if (cand > best[d]) best[d] = cand;
      end
    end
    for (int s = 0; s < N_STATES; s++) beta_nxt[s] = b[s] - b[0];
    llr    = best[1] - best[0];
    hard   = (llr > 0);
    raw    = (MET_W+2)'(llr) - (MET_W+2)'(b_ls) - (MET_W+2)'(b_la);
    scaled = ((MET_W+4)'(raw) * 3) >>> 2;
    le     = EXT_W'(sat(32'(scaled), EXT_W));
  end

  // ---- metric registers ----------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      alpha_q <= '0;
      beta_q  <= '0;
    end else if (init) begin
      alpha_q <= alpha_init;
      beta_q  <= beta_init;
    end else begin
      if (fwd_en) alpha_q <= alpha_nxt;
      if (bwd_en) beta_q  <= beta_nxt;
    end
  end

endmodule
