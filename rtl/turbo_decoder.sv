// turbo_decoder: iterative parallel max-log-MAP turbo decoder.
//
// Decodes one N-bit frame from soft channel values: systematic LLRs and the
// parity LLRs of both constituent encoders (positive = bit 1).  Two
// component decoders exchange extrinsic information: decoder 1 works on the
// natural order with parity 1 and the de-interleaved extrinsic of decoder
// 2 as a-priori input; decoder 2 works on the interleaved order with parity
// 2 and the interleaved extrinsic of decoder 1.  Both are time-shared on the
// same P SISO units; each half-iteration splits the frame into P windows
// decoded in parallel.
//
// Datapath (the blocks of the parallel decoder architecture):
//   input_buffer           channel LLRs of the frame, parity per SISO unit
//   2*P llr_bank_ram       P banks of systematic LLRs, P banks of extrinsic
//   switch_matrix          routes bank word sel[p] to/from SISO unit p
//   agu_ctrl               schedule, interleaver address generators, mux
//   P siso_decoder         max-log-MAP units with stack buffers
//   boundary_metric_store  window-boundary alpha/beta between iterations
//   output_packer          hard decisions into the output word, error flag
// The extrinsic memory is updated in place: a SISO unit reads the a-priori
// value of a bit in its forward pass and overwrites it with its own
// extrinsic output in the backward pass, at the same address, because each
// half-iteration reads and writes the same permutation of the bits.
//
// Interface: pulse `start` with the LLR vectors valid; they are captured on
// that edge.  `done` pulses W + 2*ITERS*(2W+1) + 2 cycles later, with
// `dec_bits` and `error` valid from then until the next frame is done.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N     = N_BITS,
  parameter int unsigned P     = N_SISO,
  parameter int unsigned ITERS = N_ITER,
  localparam int unsigned W    = N / P,
  localparam int unsigned AW   = $clog2(N),
  localparam int unsigned TW   = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned SW   = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned DW   = LLR_W + EXT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic signed [LLR_W-1:0] sys_llr  [N],
  input  logic signed [LLR_W-1:0] par1_llr [N],
  input  logic signed [LLR_W-1:0] par2_llr [N],
  output logic                    busy,
  output logic                    done,
  output logic [N-1:0]            dec_bits,
  output logic                    error
);

  // ---- control -------------------------------------------------------
  dec_phase_t    phase;
  logic [TW-1:0] t;
  logic          half;
  logic          load_en, siso_init, fwd_en, bwd_en, bnd_wr, out_we, commit;
  logic [SW-1:0] sel  [P];
  logic [TW-1:0] addr [P];
  logic [AW-1:0] pos  [P];
  logic          start_ok;

  assign start_ok = start && !busy;

  agu_ctrl #(.N(N), .P(P), .ITERS(ITERS)) u_ctrl (
    .clk(clk), .rst(rst), .start(start_ok), .busy(busy), .done(done),
    .phase(phase), .t(t), .half(half), .iter(),
    .load_en(load_en), .siso_init(siso_init), .fwd_en(fwd_en), .bwd_en(bwd_en),
    .bnd_wr(bnd_wr), .out_we(out_we), .commit(commit),
    .sel(sel), .addr(addr), .pos(pos)
  );

  // ---- input buffer --------------------------------------------------
  logic signed [LLR_W-1:0] lp      [P];
  logic signed [LLR_W-1:0] ls_load [P];
  logic [N-1:0]            sys_hard;

  input_buffer #(.N(N), .P(P)) u_inbuf (
    .clk(clk), .rst(rst), .load(start_ok),
    .sys_in(sys_llr), .par1_in(par1_llr), .par2_in(par2_llr),
    .half(half), .t(t), .lp(lp), .ls_load(ls_load), .sys_hard(sys_hard)
  );

  // ---- memory banks and switch matrix ---------------------------------
  // Bank word = {systematic LLR, extrinsic LLR}; the two halves live in
  // separate RAMs (P systematic + P extrinsic banks).
  logic [TW-1:0] siso_addr  [P];
  logic          siso_we    [P];
  logic [DW-1:0] siso_wdata [P];
  logic [DW-1:0] siso_rdata [P];
  logic [TW-1:0] bank_addr  [P];
  logic          bank_we    [P];
  logic [DW-1:0] bank_wdata [P];
  logic [DW-1:0] bank_rdata [P];

  logic signed [EXT_W-1:0] le   [P];
  logic                    hard [P];

  always_comb begin
    for (int p = 0; p < P; p++) begin
      siso_addr[p]  = addr[p];
      siso_we[p]    = load_en || bwd_en;
      siso_wdata[p] = load_en ? {ls_load[p], EXT_W'(0)} : {LLR_W'(0), le[p]};
    end
  end

  switch_matrix #(.P(P), .AW(TW), .DW(DW)) u_switch (
    .clk(clk), .check(busy), .sel(sel),
    .siso_addr(siso_addr), .siso_we(siso_we), .siso_wdata(siso_wdata),
    .siso_rdata(siso_rdata),
    .bank_addr(bank_addr), .bank_we(bank_we), .bank_wdata(bank_wdata),
    .bank_rdata(bank_rdata)
  );

  for (genvar b = 0; b < P; b++) begin : g_bank
    llr_bank_ram #(.WIDTH(LLR_W), .DEPTH(W)) u_sys_ram (
      .clk(clk), .we(bank_we[b] && load_en), .waddr(bank_addr[b]),
      .wdata(bank_wdata[b][DW-1:EXT_W]),
      .raddr(bank_addr[b]), .rdata(bank_rdata[b][DW-1:EXT_W])
    );
    llr_bank_ram #(.WIDTH(EXT_W), .DEPTH(W)) u_ext_ram (
      .clk(clk), .we(bank_we[b]), .waddr(bank_addr[b]),
      .wdata(bank_wdata[b][EXT_W-1:0]),
      .raddr(bank_addr[b]), .rdata(bank_rdata[b][EXT_W-1:0])
    );
  end

  // ---- SISO units and boundary metrics --------------------------------
  metric_vec_t alpha_init [P];
  metric_vec_t beta_init  [P];
  metric_vec_t alpha_end  [P];
  metric_vec_t beta_start [P];

  boundary_metric_store #(.P(P)) u_bnd (
    .clk(clk), .rst(rst), .clear(start_ok), .half(half), .wr(bnd_wr),
    .alpha_end(alpha_end), .beta_start(beta_start),
    .alpha_init(alpha_init), .beta_init(beta_init)
  );

  for (genvar p = 0; p < P; p++) begin : g_siso
    siso_decoder #(.W(W)) u_siso (
      .clk(clk), .rst(rst),
      .init(siso_init), .alpha_init(alpha_init[p]), .beta_init(beta_init[p]),
      .fwd_en(fwd_en), .bwd_en(bwd_en),
      .ls(siso_rdata[p][DW-1:EXT_W]), .lp(lp[p]), .la(siso_rdata[p][EXT_W-1:0]),
      .llr(), .le(le[p]), .hard(hard[p]),
      .alpha_q(alpha_end[p]), .beta_nxt(beta_start[p])
    );
  end

  // ---- output buffer and bit packing ---------------------------------
  output_packer #(.N(N), .P(P)) u_out (
    .clk(clk), .rst(rst), .we(out_we), .pos(pos), .bits(hard),
    .commit(commit), .sys_hard(sys_hard),
    .dec_word(dec_bits), .error(error)
  );

  a_phase_known : assert property (@(posedge clk) disable iff (rst)
    phase inside {PH_IDLE, PH_LOAD, PH_INIT, PH_FWD, PH_BWD, PH_FIN});

endmodule
