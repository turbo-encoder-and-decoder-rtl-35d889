// llr_bank_ram: one bank of the decoder's LLR memory.
//
// A small random access memory with one synchronous write port and one
// combinational read port (distributed RAM).  The decoder keeps the
// systematic channel LLRs and the extrinsic LLRs of a frame in N_SISO banks
// each, one bank per window of N/N_SISO bits, so that all SISO units can
// read or write in the same cycle.  The design names these RAMs; their size,
// port arrangement and read timing are this implementation's choices.
module llr_bank_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
