// tb_turbo_encoder: encodes random and fixed messages and compares the
// systematic and both parity words with a sequence-level reference (parity
// 2 is computed on the interleaved message, pi(i) = (7i + 12i^2) mod 32).
// Also checks that `done` comes N+1 cycles after `start`.
module tb_turbo_encoder;
  localparam int N = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N-1:0] data_in, sys_out, par1_out, par2_out;
  logic busy, done;
  int checks = 0, failures = 0;

  turbo_encoder dut (.clk(clk), .rst(rst), .start(start), .data_in(data_in),
                     .busy(busy), .done(done), .sys_out(sys_out),
                     .par1_out(par1_out), .par2_out(par2_out));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] rsc_seq(input logic [N-1:0] d);
    logic a1, a2, a3, a0;
    logic [N-1:0] p;
    a1 = 0; a2 = 0; a3 = 0;
    for (int k = 0; k < N; k++) begin
      a0 = d[k] ^ a2 ^ a3;
      p[k] = a0 ^ a1 ^ a3;
      a3 = a2; a2 = a1; a1 = a0;
    end
    return p;
  endfunction

  function automatic logic [N-1:0] interleave(input logic [N-1:0] d);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = d[(7 * i + 12 * i * i) % N];
    return r;
  endfunction

  initial begin
    logic [N-1:0] msg;
    int cyc;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < 40; f++) begin
      case (f)
        0: msg = 32'h0000CC00;
        1: msg = 32'h0000AF00;
        2: msg = 32'h0000F200;
        3: msg = 32'h00003F00;
        default: msg = $urandom();
      endcase
      @(negedge clk); data_in = msg; start = 1'b1;
      @(negedge clk); start = 1'b0; data_in = ~msg;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == N + 1, $sformatf("latency %0d", cyc));
      check(sys_out == msg, "systematic word");
      check(par1_out == rsc_seq(msg), $sformatf("parity 1 of %h", msg));
      check(par2_out == rsc_seq(interleave(msg)), $sformatf("parity 2 of %h", msg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
