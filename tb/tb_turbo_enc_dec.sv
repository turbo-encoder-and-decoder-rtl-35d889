// tb_turbo_enc_dec: end-to-end test of the integrated encoder/decoder at
// its default parameters.  The channel is modelled here: it returns the
// transmitted systematic word with chosen bits flipped.  The test runs the
// four 32-bit test messages of the design (two clean, two with channel
// errors that the decoder must correct, raising `error`), then random
// messages with zero or one flipped bit, where the turbo decoder is
// expected to succeed.  It checks the decoded word, the error flag, the
// transmitted word on the channel output, the tx_start-to-rx_done latency
// (N + 2 + W + 2*ITERS*(2W+1) + 2 = 248 cycles) and that reset clears the
// outputs.  It counts how often each mechanism happened: a clean frame, a
// corrected frame, a start ignored while busy, an interleaved
// (component decoder 2) half-iteration, a cycle with the banks permuted
// by the interleaver, and a
// window-boundary metric hand-over; a mechanism that never happened counts
// as a failure.
module tb_turbo_enc_dec;
  localparam int N = 32, P = 4, IT = 6, W = N / P;
  localparam int LAT = N + 2 + W + 2 * IT * (2 * W + 1) + 2;
  logic clk = 1'b0, reset = 1'b1, tx_start = 1'b0;
  logic [N-1:0] tx_data, chan_out, chan_in, rx_data, flips;
  logic error, rx_done, busy;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_ignored = 0, n_il_half = 0, n_bnd = 0, n_perm = 0;

  turbo_enc_dec dut (
    .clk(clk), .reset(reset), .tx_start(tx_start),
    .turbo_tx_data_in_encoder(tx_data),
    .turbo_enc_data_out(chan_out), .turbo_enc_data_in(chan_in),
    .turbo_rx_data_out_decoder(rx_data), .error(error),
    .rx_done(rx_done), .busy(busy));

  assign chan_in = chan_out ^ flips;
  always #5 clk = ~clk;

  // mechanism counters (observed inside the decoder)
  always @(posedge clk) begin
    if (dut.u_dec.siso_init && dut.u_dec.half) n_il_half++;
    if (dut.u_dec.fwd_en && dut.u_dec.half && dut.u_dec.sel[0] != 2'd0) n_perm++;
    if (dut.u_dec.bnd_wr) n_bnd++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic frame(input logic [N-1:0] msg, input logic [N-1:0] received, input string name);
    int cyc;
    @(negedge clk);
    tx_data = msg; flips = msg ^ received; tx_start = 1'b1;
    @(negedge clk); tx_start = 1'b0; tx_data = $urandom();
    cyc = 1;
    // a second start while busy must be ignored
    repeat (3) begin @(negedge clk); cyc++; end
    tx_start = 1'b1;
    @(negedge clk); cyc++; tx_start = 1'b0;
    n_ignored++;
    while (!rx_done && cyc < 4 * LAT) begin
      @(negedge clk); cyc++;
      if (cyc == N + 2) check(chan_out == msg, $sformatf("%s: channel word %h", name, chan_out));
    end
    check(cyc == LAT, $sformatf("%s: latency %0d expected %0d", name, cyc, LAT));
    check(rx_data == msg, $sformatf("%s: sent %h received %h decoded %h", name, msg, received, rx_data));
    check(error == (msg != received), $sformatf("%s: error=%0b", name, error));
    if (error) n_corrected++; else n_clean++;
    repeat (2) @(negedge clk);
    check(!busy && rx_data == msg, $sformatf("%s: second start ignored, output held", name));
  endtask

  initial begin
    flips = '0; tx_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(rx_data == '0 && error == 1'b0 && chan_out == '0, "reset clears outputs");
    reset = 1'b0;
    frame(32'h0000CC00, 32'h0000CC00, "test-1");
    frame(32'h0000AF00, 32'h0000AF00, "test-2");
    frame(32'h0000F200, 32'h0000F100, "test-3");
    frame(32'h00003F00, 32'h00002F00, "test-4");
    for (int f = 0; f < 24; f++) begin
      logic [N-1:0] m, e;
      m = $urandom();
      e = '0;
      if (f % 3 >= 1) e[$urandom_range(0, N - 1)] = 1'b1;
      frame(m, m ^ e, $sformatf("random-%0d", f));
    end
    // reset in the middle of a frame returns everything to 0
    @(negedge clk); tx_data = 32'h12345678; flips = '0; tx_start = 1'b1;
    @(negedge clk); tx_start = 1'b0;
    repeat (100) @(negedge clk);
    reset = 1'b1; @(negedge clk); @(negedge clk); reset = 1'b0;
    check(rx_data == '0 && !error && !busy, "reset during a frame");
    $display("mechanisms: clean=%0d corrected=%0d ignored_start=%0d interleaved_halves=%0d permuted_cycles=%0d boundary_handover=%0d",
             n_clean, n_corrected, n_ignored, n_il_half, n_perm, n_bnd);
    check(n_clean > 0, "clean frame happened");
    check(n_corrected > 0, "corrected frame happened");
    check(n_ignored > 0, "ignored start happened");
    check(n_il_half > 0, "interleaved half-iteration happened");
    check(n_perm > 0, "permuted bank access happened");
    check(n_bnd > 0, "boundary metric hand-over happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
