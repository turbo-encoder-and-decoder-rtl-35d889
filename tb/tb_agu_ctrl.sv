// tb_agu_ctrl: runs the decoder schedule for two frames and checks, cycle
// by cycle, the phase sequence (LOAD W, then per half-iteration INIT 1,
// FWD W with t rising, BWD W with t falling, then FIN), the half-iteration
// alternation, the control strobes, the natural/interleaved addresses of
// every SISO unit, and the start-to-done latency W + 2*ITERS*(2W+1) + 2.
module tb_agu_ctrl;
  import turbo_pkg::*;
  localparam int N = 32, P = 4, IT = 3, W = N / P;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done, half;
  dec_phase_t phase;
  logic [2:0] t;
  logic [1:0] iter;
  logic load_en, siso_init, fwd_en, bwd_en, bnd_wr, out_we, commit;
  logic [1:0] sel [P];
  logic [2:0] addr [P];
  logic [4:0] pos [P];
  int checks = 0, failures = 0;

  agu_ctrl #(.N(N), .P(P), .ITERS(IT)) dut (.clk(clk), .rst(rst), .start(start), .busy(busy),
    .done(done), .phase(phase), .t(t), .half(half), .iter(iter), .load_en(load_en),
    .siso_init(siso_init), .fwd_en(fwd_en), .bwd_en(bwd_en), .bnd_wr(bnd_wr),
    .out_we(out_we), .commit(commit), .sel(sel), .addr(addr), .pos(pos));
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

  task automatic check_addr(input int tt, input bit il);
    for (int p = 0; p < P; p++) begin
      int exp_pos;
      exp_pos = il ? (7 * (p * W + tt) + 12 * (p * W + tt) * (p * W + tt)) % N : p * W + tt;
      check(int'(pos[p]) == exp_pos, $sformatf("pos p=%0d t=%0d il=%0d", p, tt, il));
      check(int'(sel[p]) == exp_pos / W && int'(addr[p]) == exp_pos % W, "bank/address split");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      // LOAD
      for (int tt = 0; tt < W; tt++) begin
        check(phase == PH_LOAD && load_en && int'(t) == tt, "load phase");
        check_addr(tt, 0);
        @(negedge clk);
      end
      for (int h = 0; h < 2 * IT; h++) begin
        check(phase == PH_INIT && siso_init, "init phase");
        check(half == 1'(h % 2) && int'(iter) == h / 2, "half/iteration count");
        @(negedge clk);
        for (int tt = 0; tt < W; tt++) begin
          check(phase == PH_FWD && fwd_en && int'(t) == tt, "forward phase");
          check_addr(tt, h % 2 == 1);
          @(negedge clk);
        end
        for (int tt = W - 1; tt >= 0; tt--) begin
          check(phase == PH_BWD && bwd_en && int'(t) == tt, "backward phase");
          check(bnd_wr == (tt == 0), "boundary write strobe");
          check(out_we == (h == 2 * IT - 1), "output write strobe");
          check_addr(tt, h % 2 == 1);
          @(negedge clk);
        end
      end
      check(phase == PH_FIN && commit && !done, "finish phase");
      @(negedge clk);
      check(done && phase == PH_IDLE && !busy, "done after finish");
      @(negedge clk);
      check(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
