// tb_switch_matrix: drives random bank permutations and checks that every
// SISO port sees the read data of its bank and that every bank receives the
// address, write enable and data of the SISO port that selected it.
module tb_switch_matrix;
  localparam int P = 4, AW = 3, DW = 14;
  logic clk = 1'b0, check_en = 1'b0;
  logic [1:0]    sel        [P];
  logic [AW-1:0] siso_addr  [P];
  logic          siso_we    [P];
  logic [DW-1:0] siso_wdata [P];
  logic [DW-1:0] siso_rdata [P];
  logic [AW-1:0] bank_addr  [P];
  logic          bank_we    [P];
  logic [DW-1:0] bank_wdata [P];
  logic [DW-1:0] bank_rdata [P];
  int checks = 0, failures = 0;

  switch_matrix #(.P(P), .AW(AW), .DW(DW)) dut (.clk(clk), .check(check_en), .sel(sel),
    .siso_addr(siso_addr), .siso_we(siso_we), .siso_wdata(siso_wdata), .siso_rdata(siso_rdata),
    .bank_addr(bank_addr), .bank_we(bank_we), .bank_wdata(bank_wdata), .bank_rdata(bank_rdata));
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
    int perm [P];
    for (int r = 0; r < 200; r++) begin
      @(negedge clk);
      for (int i = 0; i < P; i++) perm[i] = i;
      for (int i = P - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      for (int p = 0; p < P; p++) begin
        sel[p]        = 2'(perm[p]);
        siso_addr[p]  = AW'($urandom());
        siso_we[p]    = 1'($urandom());
        siso_wdata[p] = DW'($urandom());
        bank_rdata[p] = DW'($urandom());
      end
      check_en = 1'b1;
      #1;
      for (int p = 0; p < P; p++) begin
        check(siso_rdata[p] == bank_rdata[perm[p]], "read routing");
        check(bank_addr[perm[p]] == siso_addr[p], "address routing");
        check(bank_we[perm[p]] == siso_we[p], "write enable routing");
        check(bank_wdata[perm[p]] == siso_wdata[p], "write data routing");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
