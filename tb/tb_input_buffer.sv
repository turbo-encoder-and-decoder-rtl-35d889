// tb_input_buffer: loads random LLR frames and checks the parity LLR served
// to each SISO unit for each step and half, the systematic LLRs served for
// the bank load, and the hard decisions of the systematic bits.
module tb_input_buffer;
  import turbo_pkg::*;
  localparam int N = 32, P = 4, W = N / P;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, half = 1'b0;
  logic [2:0] t;
  logic signed [LLR_W-1:0] sys_in [N], par1_in [N], par2_in [N];
  logic signed [LLR_W-1:0] lp [P], ls_load [P];
  logic [N-1:0] sys_hard;
  int checks = 0, failures = 0;

  input_buffer #(.N(N), .P(P)) dut (.clk(clk), .rst(rst), .load(load), .sys_in(sys_in),
    .par1_in(par1_in), .par2_in(par2_in), .half(half), .t(t), .lp(lp),
    .ls_load(ls_load), .sys_hard(sys_hard));
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
    logic signed [LLR_W-1:0] s_ref [N], p1_ref [N], p2_ref [N];
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < 5; f++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        s_ref[i] = LLR_W'($urandom()); p1_ref[i] = LLR_W'($urandom()); p2_ref[i] = LLR_W'($urandom());
        sys_in[i] = s_ref[i]; par1_in[i] = p1_ref[i]; par2_in[i] = p2_ref[i];
      end
      load = 1'b1;
      @(negedge clk); load = 1'b0;
      for (int i = 0; i < N; i++) begin sys_in[i] = '0; par1_in[i] = '0; par2_in[i] = '0; end
      for (int h = 0; h < 2; h++)
        for (int tt = 0; tt < W; tt++) begin
          half = 1'(h); t = 3'(tt); #1;
          for (int p = 0; p < P; p++) begin
            check(lp[p] == (h ? p2_ref[p * W + tt] : p1_ref[p * W + tt]), "parity LLR");
            check(ls_load[p] == s_ref[p * W + tt], "systematic LLR");
          end
        end
      for (int i = 0; i < N; i++) check(sys_hard[i] == (s_ref[i] > 0), "hard decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
