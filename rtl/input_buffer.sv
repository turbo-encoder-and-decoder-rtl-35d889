// input_buffer: holds the channel LLRs of one received frame.
//
// On `load` it captures the systematic and both parity LLR vectors.  It
// then serves, for every SISO unit p and trellis step t, the parity LLR of
// bit p*W + t of the component decoder in use (`half` = 0: parity 1,
// `half` = 1: parity 2; parity words are always read in their own natural
// order).  During the decoder's load phase it also presents the systematic
// LLR of bit p*W + t so that it can be written into bank p of the
// systematic memory.  `sys_hard` is the hard decision of the received
// systematic bits, used for the error indication.  The design shows an input
// buffer feeding all SISO units; its exact contents are this design's
// choice.
module input_buffer
  import turbo_pkg::*;
#(
  parameter int unsigned N = N_BITS,
  parameter int unsigned P = N_SISO,
  localparam int unsigned W  = N / P,
  localparam int unsigned TW = (W > 1) ? $clog2(W) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic signed [LLR_W-1:0] sys_in  [N],
  input  logic signed [LLR_W-1:0] par1_in [N],
  input  logic signed [LLR_W-1:0] par2_in [N],
  input  logic                    half,
  input  logic [TW-1:0]           t,
  output logic signed [LLR_W-1:0] lp      [P],
  output logic signed [LLR_W-1:0] ls_load [P],
  output logic [N-1:0]            sys_hard
);

  logic signed [LLR_W-1:0] sys_q [N];
  logic signed [LLR_W-1:0] p1_q  [N];
  logic signed [LLR_W-1:0] p2_q  [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) begin
        sys_q[i] <= '0;
        p1_q[i]  <= '0;
        p2_q[i]  <= '0;
      end
    end else if (load) begin
      sys_q <= sys_in;
      p1_q  <= par1_in;
      p2_q  <= par2_in;
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      lp[p]      = half ? p2_q[p * W + int'(t)] : p1_q[p * W + int'(t)];
      ls_load[p] = sys_q[p * W + int'(t)];
    end
    for (int i = 0; i < N; i++) sys_hard[i] = (sys_q[i] > 0);
  end

endmodule
