// siso_buffer: last-in first-out store that sits beside each SISO unit.
//
// During the forward pass the SISO pushes one word per trellis step (the
// state metrics entering the step, or the branch inputs of the step); during
// the backward pass it pops them in reverse order.  The design shows these
// buffers attached to every SISO without giving their organisation; a stack
// with a single pointer is the simplest structure that returns the words in
// the order the backward recursion needs them.
//
// Interface: `clear` empties the stack.  `push` writes `wdata` at the top.
// `rdata` is the word on top, combinational, and `pop` removes it at the
// clock edge.  Push and pop are not used in the same cycle; an assertion
// checks that the stack neither overflows nor underflows.
module siso_buffer #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic [PW-1:0]    level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr_q;
  logic [PW-1:0]    top;

  assign top   = ptr_q - 1'b1;
  assign rdata = mem[top[$clog2(DEPTH)-1:0]];
  assign level = ptr_q;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ptr_q <= '0;
    end else if (push) begin
      ptr_q <= ptr_q + 1'b1;
    end else if (pop) begin
      ptr_q <= ptr_q - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !(rst || clear)) mem[ptr_q[$clog2(DEPTH)-1:0]] <= wdata;
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (rst || clear)
    push |-> (ptr_q < PW'(DEPTH)));
  a_no_underflow : assert property (@(posedge clk) disable iff (rst || clear)
    pop |-> (ptr_q != '0));
  a_not_both : assert property (@(posedge clk) disable iff (rst)
    !(push && pop));

endmodule
