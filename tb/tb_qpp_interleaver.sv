// tb_qpp_interleaver: checks the interleaver address generator against
// integer arithmetic, checks that it is a permutation, and checks the
// contention-free property used by the parallel decoder (for every step t
// the P windows land in P different banks, all at the same offset).
module tb_qpp_interleaver;
  localparam int N = 32, P = 4, W = N / P;
  logic [4:0] idx_in, idx_out;
  logic [1:0] bank;
  logic [2:0] offset;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  qpp_interleaver #(.N(N), .N_BANK(P)) dut (.idx_in(idx_in), .idx_out(idx_out),
                                            .bank(bank), .offset(offset));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int perm [N];
    bit seen [N];
    for (int i = 0; i < N; i++) begin
      idx_in = 5'(i); #1;
      check(int'(idx_out) == (7 * i + 12 * i * i) % N, $sformatf("pi(%0d)", i));
      check(int'(bank) == int'(idx_out) / W && int'(offset) == int'(idx_out) % W, "bank/offset");
      perm[i] = int'(idx_out);
    end
    for (int i = 0; i < N; i++) seen[i] = 0;
    for (int i = 0; i < N; i++) seen[perm[i]] = 1;
    for (int i = 0; i < N; i++) check(seen[i], $sformatf("position %0d covered", i));
    for (int t = 0; t < W; t++) begin
      bit used [P];
      for (int b = 0; b < P; b++) used[b] = 0;
      for (int p = 0; p < P; p++) begin
        check(!used[perm[p * W + t] / W], $sformatf("contention t=%0d p=%0d", t, p));
        used[perm[p * W + t] / W] = 1;
        check(perm[p * W + t] % W == perm[t] % W, "common offset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
