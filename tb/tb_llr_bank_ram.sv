// tb_llr_bank_ram: random writes into a shadow array, then reads of every
// word compared with the shadow.
module tb_llr_bank_ram;
  localparam int WD = 8, D = 8;
  logic clk = 1'b0, we = 1'b0;
  logic [2:0] waddr, raddr;
  logic [WD-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  llr_bank_ram #(.WIDTH(WD), .DEPTH(D)) dut (.clk(clk), .we(we), .waddr(waddr),
    .wdata(wdata), .raddr(raddr), .rdata(rdata));
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
    logic [WD-1:0] shadow [D];
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1'b1; waddr = 3'(i); wdata = WD'($urandom()); shadow[i] = wdata;
    end
    for (int r = 0; r < 100; r++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); waddr = 3'($urandom()); wdata = WD'($urandom());
      raddr = 3'($urandom());
      #1 check(rdata == shadow[raddr], "read before write edge");
      if (we) shadow[waddr] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < D; i++) begin
      raddr = 3'(i); #1 check(rdata == shadow[i], $sformatf("final word %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
