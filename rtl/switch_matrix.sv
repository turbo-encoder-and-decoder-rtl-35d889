// switch_matrix: full crossbar between the SISO units and the memory banks.
//
// SISO unit p works on bank sel[p] this cycle.  Read data of bank sel[p] is
// steered to SISO p; SISO p's address, write enable and write data are
// steered to bank sel[p].  In natural order sel[p] = p; in interleaved order
// sel[] is the permutation produced by the interleaver address generators.
// The design places a switch matrix between the RAMs and the SISO units
// without giving its insides; a one-level multiplexer crossbar is used here.
//
// The selects must be a permutation (no two SISO units on one bank, the
// contention-free property of the interleaver); an assertion checks it.
// Purely combinational.
module switch_matrix #(
  parameter int unsigned P  = 4,   // SISO units = banks
  parameter int unsigned AW = 3,   // bank address width
  parameter int unsigned DW = 14,  // data width
  localparam int unsigned SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,                 // only for the assertion
  input  logic          check,               // selects are in use
  input  logic [SW-1:0] sel        [P],
  // SISO side
  input  logic [AW-1:0] siso_addr  [P],
  input  logic          siso_we    [P],
  input  logic [DW-1:0] siso_wdata [P],
  output logic [DW-1:0] siso_rdata [P],
  // bank side
  output logic [AW-1:0] bank_addr  [P],
  output logic          bank_we    [P],
  output logic [DW-1:0] bank_wdata [P],
  input  logic [DW-1:0] bank_rdata [P]
);

  always_comb begin
    for (int p = 0; p < P; p++) begin
      siso_rdata[p] = bank_rdata[sel[p]];
    end
    for (int b = 0; b < P; b++) begin
      bank_addr[b]  = '0;
      bank_we[b]    = 1'b0;
      bank_wdata[b] = '0;
      for (int p = 0; p < P; p++) begin
        if (int'(sel[p]) == b) begin
          bank_addr[b]  = siso_addr[p];
          bank_we[b]    = siso_we[p];
          bank_wdata[b] = siso_wdata[p];
        end
      end
    end
  end

  // Contention free: every bank is claimed by exactly one SISO unit.
  logic [P-1:0] claimed;
  always_comb begin
    claimed = '0;
    for (int p = 0; p < P; p++) claimed[sel[p]] = 1'b1;
  end

  a_contention_free : assert property (@(posedge clk) check |-> (&claimed));

endmodule
