// tb_siso_decoder: drives one SISO unit through random windows (random
// start/end metrics, random channel and a-priori LLRs) and compares every
// a-posteriori LLR, extrinsic LLR, hard decision and the window-end metrics
// with a reference max-log-MAP written here with plain integers and no
// normalisation: max-log LLRs do not change when a metric vector is
// shifted, so the two must agree exactly.
module tb_siso_decoder;
  import turbo_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, init = 1'b0, fwd_en = 1'b0, bwd_en = 1'b0;
  metric_vec_t alpha_init, beta_init, alpha_q, beta_nxt;
  logic signed [LLR_W-1:0] ls, lp;
  logic signed [EXT_W-1:0] la;
  logic signed [MET_W-1:0] llr;
  logic signed [EXT_W-1:0] le;
  logic hard;
  int checks = 0, failures = 0;

  siso_decoder #(.W(W)) dut (.clk(clk), .rst(rst), .init(init), .alpha_init(alpha_init),
    .beta_init(beta_init), .fwd_en(fwd_en), .bwd_en(bwd_en), .ls(ls), .lp(lp), .la(la),
    .llr(llr), .le(le), .hard(hard), .alpha_q(alpha_q), .beta_nxt(beta_nxt));
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

  // Trellis written from the shift-register description: registers r1 r2 r3
  function automatic int nstate(int s, int d);
    int r1, r2, r3, a;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    a = d ^ r2 ^ r3;
    return (a << 2) | (r1 << 1) | r2;
  endfunction
  function automatic int pbit(int s, int d);
    int r1, r2, r3, a;
    r1 = (s >> 2) & 1; r2 = (s >> 1) & 1; r3 = s & 1;
    a = d ^ r2 ^ r3;
    return a ^ r1 ^ r3;
  endfunction

  initial begin
    int A [W+1][8], B [W+1][8];
    int vls [W], vlp [W], vla [W];
    int lref, leref, g, best0, best1;
    localparam int NEGI = -100000;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int r = 0; r < 60; r++) begin
      // window inputs
      for (int s = 0; s < 8; s++) begin
        A[0][s] = (r % 3 == 0) ? ((s == 0) ? 0 : int'(METRIC_NEG)) : $urandom_range(0, 60) - 30;
        B[W][s] = (r % 2 == 0) ? 0 : $urandom_range(0, 60) - 30;
        alpha_init[s] = metric_t'(A[0][s]);
        beta_init[s]  = metric_t'(B[W][s]);
      end
      for (int k = 0; k < W; k++) begin
        vls[k] = $urandom_range(0, 63) - 32;
        vlp[k] = $urandom_range(0, 63) - 32;
        vla[k] = (r < 5) ? 0 : $urandom_range(0, 255) - 128;
      end
      // reference recursions
      for (int k = 0; k < W; k++)
        for (int s = 0; s < 8; s++) A[k+1][s] = NEGI;
      for (int k = 0; k < W; k++)
        for (int s = 0; s < 8; s++)
          for (int d = 0; d < 2; d++) begin
            g = d * (vls[k] + vla[k]) + pbit(s, d) * vlp[k];
            if (A[k][s] + g > A[k+1][nstate(s, d)]) A[k+1][nstate(s, d)] = A[k][s] + g;
          end
      for (int k = W - 1; k >= 0; k--)
        for (int s = 0; s < 8; s++) begin
          B[k][s] = NEGI;
          for (int d = 0; d < 2; d++) begin
            g = d * (vls[k] + vla[k]) + pbit(s, d) * vlp[k];
            if (g + B[k+1][nstate(s, d)] > B[k][s]) B[k][s] = g + B[k+1][nstate(s, d)];
          end
        end
      // drive the unit
      @(negedge clk); init = 1'b1; @(negedge clk); init = 1'b0;
      for (int k = 0; k < W; k++) begin
        fwd_en = 1'b1;
        ls = LLR_W'(vls[k]); lp = LLR_W'(vlp[k]); la = EXT_W'(vla[k]);
        @(negedge clk);
      end
      fwd_en = 1'b0;
      for (int s = 0; s < 8; s++)
        check(int'(alpha_q[s]) == A[W][s] - A[W][0], "window-end alpha");
      ls = '0; lp = '0; la = '0;
      for (int k = W - 1; k >= 0; k--) begin
        bwd_en = 1'b1;
        best0 = NEGI; best1 = NEGI;
        for (int s = 0; s < 8; s++)
          for (int d = 0; d < 2; d++) begin
            g = A[k][s] + d * (vls[k] + vla[k]) + pbit(s, d) * vlp[k] + B[k+1][nstate(s, d)];
            if (d == 1 && g > best1) best1 = g;
            if (d == 0 && g > best0) best0 = g;
          end
        lref  = best1 - best0;
        leref = ((lref - vls[k] - vla[k]) * 3) >>> 2;
        if (leref > 127) leref = 127;
        if (leref < -128) leref = -128;
        #1;
        check(int'(llr) == lref, $sformatf("LLR r=%0d k=%0d got %0d exp %0d", r, k, llr, lref));
        check(int'(le) == leref, $sformatf("extrinsic r=%0d k=%0d got %0d exp %0d", r, k, le, leref));
        check(hard == (lref > 0), "hard decision");
        if (k == 0)
          for (int s = 0; s < 8; s++)
            check(int'(beta_nxt[s]) == B[0][s] - B[0][0], "window-start beta");
        @(negedge clk);
      end
      bwd_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
