// tb_rsc_encoder: self-checking test of the RSC constituent encoder.
// The reference computes the parity as a sequence, p(D) = d(D)*(1+D+D^3) /
// (1+D^2+D^3): a_k = d_k ^ a_k-2 ^ a_k-3, p_k = a_k ^ a_k-1 ^ a_k-3.  It also
// checks the trellis numbering: from S0 an input 1 leads to S4 (100).
module tb_rsc_encoder;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, en = 1'b0, d = 1'b0;
  logic parity;
  logic [2:0] state;
  int checks = 0, failures = 0;

  rsc_encoder dut (.clk(clk), .rst(rst), .clear(clear), .en(en), .d(d),
                   .parity(parity), .state(state));

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
    logic a1, a2, a3, a0, pref;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // trellis numbering
    @(negedge clk); d = 1'b1; en = 1'b1;
    @(negedge clk); en = 1'b0;
    check(state == 3'b100, "S0 --1--> S4");
    for (int frame = 0; frame < 20; frame++) begin
      @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
      check(state == 3'b000, "clear to S0");
      a1 = 0; a2 = 0; a3 = 0;
      for (int k = 0; k < 64; k++) begin
        d  = 1'($urandom_range(0, 1));
        en = 1'b1;
        a0   = d ^ a2 ^ a3;
        pref = a0 ^ a1 ^ a3;
        #1;
        check(parity == pref, $sformatf("parity frame %0d step %0d", frame, k));
        @(negedge clk);
        a3 = a2; a2 = a1; a1 = a0;
        check(state == {a1, a2, a3}, "state");
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
