// agu_ctrl: address generator and control unit of the parallel turbo
// decoder, including the natural/interleaved address multiplexer.
//
// A frame is decoded in N_ITER iterations of two half-iterations: half 0
// runs component decoder 1 on the natural-order sequence, half 1 runs
// component decoder 2 on the interleaved sequence.  All P SISO units work
// at once, unit p on window p (steps p*W .. p*W+W-1 of its sequence,
// W = N/P).  Schedule after `start`:
//   LOAD  W cycles: bank p, word t <- systematic LLR of bit p*W + t,
//         extrinsic cleared
//   per half-iteration: INIT 1 cycle, FWD W cycles (t = 0..W-1),
//         BWD W cycles (t = W-1..0)
//   FIN   1 cycle: commit the decoded word; `done` follows one cycle later.
// So `done` rises W + 2*N_ITER*(2W+1) + 2 cycles after the `start` edge.
//
// For step t every unit p needs sequence element j = p*W + t.  In half 0
// that is message bit j; in half 1 it is message bit pi(j), produced by one
// interleaver address generator per unit.  The multiplexer picks the one for
// the current half.  The bit position is split into bank (= window) and word
// address; the interleaver is contention free, so the P banks selected in a
// cycle are all different.  The design names this unit and its read/write
// controls; the schedule and the interfaces are this design's choices.
module agu_ctrl
  import turbo_pkg::*;
#(
  parameter int unsigned N      = N_BITS,
  parameter int unsigned P      = N_SISO,
  parameter int unsigned ITERS  = N_ITER,
  localparam int unsigned W     = N / P,
  localparam int unsigned AW    = $clog2(N),
  localparam int unsigned TW    = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned SW    = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned IW    = (ITERS > 1) ? $clog2(ITERS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output dec_phase_t    phase,
  output logic [TW-1:0] t,
  output logic          half,
  output logic [IW-1:0] iter,
  // controls
  output logic          load_en,
  output logic          siso_init,
  output logic          fwd_en,
  output logic          bwd_en,
  output logic          bnd_wr,
  output logic          out_we,
  output logic          commit,
  // addresses, one set per SISO unit
  output logic [SW-1:0] sel  [P],
  output logic [TW-1:0] addr [P],
  output logic [AW-1:0] pos  [P]
);

  dec_phase_t    ph_q;
  logic [TW-1:0] t_q;
  logic          half_q;
  logic [IW-1:0] iter_q;
  logic          last_half;

  assign last_half = half_q && (iter_q == IW'(ITERS - 1));

  // ---- schedule FSM --------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q   <= PH_IDLE;
      t_q    <= '0;
      half_q <= 1'b0;
      iter_q <= '0;
      done   <= 1'b0;
    end else begin
      done <= (ph_q == PH_FIN);
      unique case (ph_q)
        PH_IDLE: if (start) begin
          ph_q   <= PH_LOAD;
          t_q    <= '0;
          half_q <= 1'b0;
          iter_q <= '0;
        end
        PH_LOAD: begin
          if (t_q == TW'(W - 1)) ph_q <= PH_INIT;
          else                   t_q  <= t_q + 1'b1;
        end
        PH_INIT: begin
          ph_q <= PH_FWD;
          t_q  <= '0;
        end
        PH_FWD: begin
          if (t_q == TW'(W - 1)) ph_q <= PH_BWD;
          else                   t_q  <= t_q + 1'b1;
        end
        PH_BWD: begin
          if (t_q == '0) begin
            if (last_half) begin
              ph_q <= PH_FIN;
            end else begin
              ph_q   <= PH_INIT;
              half_q <= !half_q;
              if (half_q) iter_q <= iter_q + 1'b1;
            end
          end else begin
            t_q <= t_q - 1'b1;
          end
        end
        PH_FIN:  ph_q <= PH_IDLE;
        default: ph_q <= PH_IDLE;
      endcase
    end
  end

  assign phase     = ph_q;
  assign t         = t_q;
  assign half      = half_q;
  assign iter      = iter_q;
  assign busy      = (ph_q != PH_IDLE);
  assign load_en   = (ph_q == PH_LOAD);
  assign siso_init = (ph_q == PH_INIT);
  assign fwd_en    = (ph_q == PH_FWD);
  assign bwd_en    = (ph_q == PH_BWD);
  assign bnd_wr    = (ph_q == PH_BWD) && (t_q == '0);
  assign out_we    = (ph_q == PH_BWD) && last_half;
  assign commit    = (ph_q == PH_FIN);

  // ---- address generation --------------------------------------------
  for (genvar p = 0; p < P; p++) begin : g_agu
    logic [AW-1:0] nat_idx, il_idx;
    logic [SW-1:0] il_bank;
    logic [AW-SW-1:0] il_off;

    assign nat_idx = AW'(p * W) + AW'(t_q);

    qpp_interleaver #(.N(N), .N_BANK(P)) u_pi (
      .idx_in (nat_idx),
      .idx_out(il_idx),
      .bank   (il_bank),
      .offset (il_off)
    );

    // Multiplexer: natural order for LOAD and half 0, interleaved for half 1
    always_comb begin
      if (half_q && ph_q != PH_LOAD) begin
        pos[p]  = il_idx;
        sel[p]  = il_bank;
        addr[p] = TW'(il_off);
      end else begin
        pos[p]  = nat_idx;
        sel[p]  = SW'(p);
        addr[p] = t_q;
      end
    end
  end

endmodule
