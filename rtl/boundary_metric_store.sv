// boundary_metric_store: window-boundary state metrics kept between
// iterations ("parallel extrinsic information" alpha/beta of the design).
//
// The frame is cut into N_SISO windows that are decoded at the same time,
// so a window cannot wait for the forward metrics of the window on its left
// or the backward metrics of the window on its right.  Instead each SISO
// starts from the metrics its neighbours reached at the same boundary in
// the previous iteration of the same component decoder.  This store keeps,
// for both component decoders (half = 0, 1), the end-of-window alpha and
// start-of-window beta of every unit.
//
// Window 0 always starts from the known encoder state 000; the last window
// ends in an unknown state (no trellis termination) and gets equal beta
// metrics.  Before the first iteration every inner boundary is equal
// metrics.  Those two outputs are therefore constants by design.  `clear`
// starts a new frame; `wr` stores the metrics of all units
// for component decoder `half` at the end of its backward pass.  The reads
// (`alpha_init`, `beta_init`) are combinational for the selected `half`.
module boundary_metric_store
  import turbo_pkg::*;
#(
  parameter int unsigned P = N_SISO
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        half,
  input  logic        wr,
  input  metric_vec_t alpha_end   [P],
  input  metric_vec_t beta_start  [P],
  output metric_vec_t alpha_init  [P],
  output metric_vec_t beta_init   [P]
);

  metric_vec_t a_q [2][P];
  metric_vec_t b_q [2][P];

  function automatic metric_vec_t known_start();
    metric_vec_t v;
    for (int s = 0; s < N_STATES; s++) v[s] = (s == 0) ? metric_t'(0) : METRIC_NEG;
    return v;
  endfunction

  always_comb begin
    for (int p = 0; p < P; p++) begin
      alpha_init[p] = (p == 0)     ? known_start() : a_q[half][(p + P - 1) % P];
      beta_init[p]  = (p == P - 1) ? '0            : b_q[half][(p + 1) % P];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int h = 0; h < 2; h++)
        for (int p = 0; p < P; p++) begin
          a_q[h][p] <= '0;
          b_q[h][p] <= '0;
        end
    end else if (wr) begin
      for (int p = 0; p < P; p++) begin
        a_q[half][p] <= alpha_end[p];
        b_q[half][p] <= beta_start[p];
      end
    end
  end

endmodule
