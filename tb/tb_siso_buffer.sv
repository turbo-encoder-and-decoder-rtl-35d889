// tb_siso_buffer: pushes random words and checks that they come back in
// reverse order, with the fill level tracking each push and pop.
module tb_siso_buffer;
  localparam int WD = 20, D = 8;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, push = 1'b0, pop = 1'b0;
  logic [WD-1:0] wdata, rdata;
  logic [3:0] level;
  int checks = 0, failures = 0;

  siso_buffer #(.WIDTH(WD), .DEPTH(D)) dut (.clk(clk), .rst(rst), .clear(clear),
    .push(push), .wdata(wdata), .pop(pop), .rdata(rdata), .level(level));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [WD-1:0] ref_q [D];
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int r = 0; r < 10; r++) begin
      int n;
      n = $urandom_range(1, D);
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      check(level == 0, "cleared");
      for (int i = 0; i < n; i++) begin
        ref_q[i] = WD'($urandom());
        wdata = ref_q[i]; push = 1'b1;
        @(negedge clk);
        check(int'(level) == i + 1, "level after push");
      end
      push = 1'b0;
      for (int i = n - 1; i >= 0; i--) begin
        check(rdata == ref_q[i], $sformatf("pop order %0d", i));
        pop = 1'b1;
        @(negedge clk);
        pop = 1'b0;
        check(int'(level) == i, "level after pop");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
