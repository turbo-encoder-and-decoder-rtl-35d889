// tb_turbo_decoder: end-to-end test of the parallel turbo decoder at its
// default size (32-bit frame, 4 SISO units, 6 iterations).  Frames are
// encoded here by a sequence-level reference encoder, mapped to LLRs and
// corrupted, then decoded.  Cases:
//   - the four 32-bit test messages of the design (0000CC00, 0000AF00 clean;
//     0000F200 received as 0000F100, 00003F00 received as 00002F00);
//   - random messages with one flipped systematic bit (hard LLRs);
//   - random messages with soft noise on every LLR plus one flipped bit.
// Every frame must decode to the sent message, `error` must flag exactly
// the frames whose received systematic word was wrong, and `done` must come
// W + 2*ITERS*(2W+1) + 2 = 214 cycles after `start`.
module tb_turbo_decoder;
  import turbo_pkg::*;
  localparam int N = 32, P = 4, IT = 6, W = N / P;
  localparam int LAT = W + 2 * IT * (2 * W + 1) + 2;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic signed [LLR_W-1:0] sys_llr [N], par1_llr [N], par2_llr [N];
  logic busy, done, error;
  logic [N-1:0] dec_bits;
  int checks = 0, failures = 0;
  int n_corrected = 0, n_clean = 0;

  turbo_decoder dut (.clk(clk), .rst(rst), .start(start), .sys_llr(sys_llr),
    .par1_llr(par1_llr), .par2_llr(par2_llr), .busy(busy), .done(done),
    .dec_bits(dec_bits), .error(error));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] rsc_seq(input logic [N-1:0] d);
    logic a1, a2, a3, a0;
    logic [N-1:0] p;
    a1 = 0; a2 = 0; a3 = 0;
    for (int k = 0; k < N; k++) begin
      a0 = d[k] ^ a2 ^ a3;
      p[k] = a0 ^ a1 ^ a3;
      a3 = a2; a2 = a1; a1 = a0;
    end
    return p;
  endfunction

  function automatic logic [N-1:0] interleave(input logic [N-1:0] d);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = d[(7 * i + 12 * i * i) % N];
    return r;
  endfunction

  function automatic logic signed [LLR_W-1:0] to_llr(input logic b, input int noise);
    int v;
    v = (b ? 8 : -8) + noise;
    if (v > 31) v = 31;
    if (v < -32) v = -32;
    return LLR_W'(v);
  endfunction

  task automatic run_frame(input logic [N-1:0] msg, input logic [N-1:0] flips,
                           input int noise_amp, input string name);
    logic [N-1:0] p1, p2, rx;
    int cyc, nz;
    p1 = rsc_seq(msg);
    p2 = rsc_seq(interleave(msg));
    rx = msg ^ flips;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      nz = (noise_amp == 0) ? 0 : $urandom_range(0, 2 * noise_amp) - noise_amp;
      // noise never pushes an LLR across zero: only `flips` change signs
      if (nz < 0 && nz <= -8) nz = -7;
      sys_llr[i]  = to_llr(rx[i], rx[i] ? nz : -nz);
      nz = (noise_amp == 0) ? 0 : $urandom_range(0, noise_amp);
      par1_llr[i] = to_llr(p1[i], p1[i] ? -nz : nz);
      nz = (noise_amp == 0) ? 0 : $urandom_range(0, noise_amp);
      par2_llr[i] = to_llr(p2[i], p2[i] ? -nz : nz);
    end
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int i = 0; i < N; i++) begin sys_llr[i] = '0; par1_llr[i] = '0; par2_llr[i] = '0; end
    cyc = 1;
    while (!done && cyc < 10 * LAT) begin @(negedge clk); cyc++; end
    check(cyc == LAT, $sformatf("%s: latency %0d, expected %0d", name, cyc, LAT));
    check(dec_bits == msg, $sformatf("%s: sent %h received %h decoded %h", name, msg, rx, dec_bits));
    check(error == (flips != 0), $sformatf("%s: error flag %0b", name, error));
    if (error) n_corrected++; else n_clean++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Test messages of the design
    run_frame(32'h0000CC00, 32'h0, 0, "test-1");
    run_frame(32'h0000AF00, 32'h0, 0, "test-2");
    run_frame(32'h0000F200, 32'h0000F200 ^ 32'h0000F100, 0, "test-3");
    run_frame(32'h00003F00, 32'h00003F00 ^ 32'h00002F00, 0, "test-4");
    // Random single systematic errors, hard LLRs
    for (int f = 0; f < 30; f++)
      run_frame($urandom(), 32'h1 << $urandom_range(0, N - 1), 0, $sformatf("hard-%0d", f));
    // Soft noise plus one flipped bit
    for (int f = 0; f < 20; f++)
      run_frame($urandom(), (f % 4 == 0) ? 32'h0 : 32'h1 << $urandom_range(0, N - 1), 4,
                $sformatf("soft-%0d", f));
    check(n_corrected > 0, "some frame needed correction");
    check(n_clean > 0, "some frame arrived clean");
    $display("frames corrected=%0d clean=%0d", n_corrected, n_clean);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
