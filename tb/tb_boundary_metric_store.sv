// tb_boundary_metric_store: checks the initial metrics after a clear
// (window 0 starts in state 0, all other boundaries equal), and that metrics
// written for one component decoder reach the neighbouring windows of the
// same component decoder only.
module tb_boundary_metric_store;
  import turbo_pkg::*;
  localparam int P = 4;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, half = 1'b0, wr = 1'b0;
  metric_vec_t alpha_end [P], beta_start [P], alpha_init [P], beta_init [P];
  int checks = 0, failures = 0;

  boundary_metric_store #(.P(P)) dut (.clk(clk), .rst(rst), .clear(clear), .half(half),
    .wr(wr), .alpha_end(alpha_end), .beta_start(beta_start),
    .alpha_init(alpha_init), .beta_init(beta_init));
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

  function automatic metric_vec_t rnd();
    metric_vec_t v;
    for (int s = 0; s < N_STATES; s++) v[s] = metric_t'($urandom_range(0, 2000)) - metric_t'(1000);
    return v;
  endfunction

  initial begin
    metric_vec_t a_ref [2][P], b_ref [2][P];
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int h = 0; h < 2; h++) begin
      half = 1'(h); #1;
      check(alpha_init[0][0] == 0, "window 0 state 0");
      for (int s = 1; s < N_STATES; s++) check(alpha_init[0][s] == METRIC_NEG, "window 0 other states");
      for (int p = 1; p < P; p++) check(alpha_init[p] == '0, "equal alpha after clear");
      for (int p = 0; p < P; p++) check(beta_init[p] == '0, "equal beta after clear");
    end
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      half = 1'($urandom_range(0, 1));
      for (int p = 0; p < P; p++) begin
        alpha_end[p] = rnd(); beta_start[p] = rnd();
        a_ref[half][p] = alpha_end[p]; b_ref[half][p] = beta_start[p];
      end
      wr = 1'b1;
      @(negedge clk); wr = 1'b0;
      for (int p = 0; p < P; p++) begin alpha_end[p] = rnd(); beta_start[p] = rnd(); end
      #1;
      for (int p = 1; p < P; p++) check(alpha_init[p] == a_ref[half][p-1], "alpha from left neighbour");
      for (int p = 0; p < P - 1; p++) check(beta_init[p] == b_ref[half][p+1], "beta from right neighbour");
      check(beta_init[P-1] == '0, "last window equal beta");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
