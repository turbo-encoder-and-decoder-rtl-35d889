// tb_output_packer: writes the bits of random words at permuted positions,
// P per cycle, commits, and checks the packed word and the error flag
// against the reference systematic word.
module tb_output_packer;
  localparam int N = 32, P = 4;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0, commit = 1'b0;
  logic [4:0] pos [P];
  logic bits [P];
  logic [N-1:0] sys_hard, dec_word;
  logic error;
  int checks = 0, failures = 0;

  output_packer #(.N(N), .P(P)) dut (.clk(clk), .rst(rst), .we(we), .pos(pos), .bits(bits),
    .commit(commit), .sys_hard(sys_hard), .dec_word(dec_word), .error(error));
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
    logic [N-1:0] word, prev;
    int perm [N];
    repeat (2) @(posedge clk);
    rst = 1'b0;
    prev = '0;
    for (int f = 0; f < 20; f++) begin
      word = $urandom();
      for (int i = 0; i < N; i++) perm[i] = (7 * i + 12 * i * i) % N;
      for (int c = 0; c < N / P; c++) begin
        @(negedge clk);
        we = 1'b1;
        for (int p = 0; p < P; p++) begin
          pos[p]  = 5'(perm[c * P + p]);
          bits[p] = word[perm[c * P + p]];
        end
      end
      @(negedge clk); we = 1'b0;
      check(dec_word == prev, "output holds until commit");
      sys_hard = (f % 2 == 0) ? word : word ^ (32'h1 << (f % 32));
      commit = 1'b1;
      @(negedge clk); commit = 1'b0;
      check(dec_word == word, "packed word");
      check(error == (f % 2 == 1), "error flag");
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
