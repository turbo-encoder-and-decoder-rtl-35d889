// tb_awgn_workload: the decoder on an additive white Gaussian noise
// channel.  Random 32-bit messages are encoded by a reference encoder, sent
// as BPSK (+1 for bit 1) with Gaussian noise at Eb/N0 = 3 dB for the rate-1/3
// code, and the received values are quantised to 6-bit LLRs (8 per unit of
// amplitude, saturated to +-31).  The noise is the sum of twelve uniform
// variables (mean 0, variance 1).  The test counts bit errors of the raw
// hard decisions of the systematic bits and of the decoder output.  It
// expects the decoder to leave at most a third of the raw errors; each
// frame must also finish in 214 cycles.  It prints both error rates.
module tb_awgn_workload;
  import turbo_pkg::*;
  localparam int N = 32, P = 4, IT = 6, W = N / P;
  localparam int LAT = W + 2 * IT * (2 * W + 1) + 2;
  localparam int FRAMES = 400;
  localparam real EBN0_DB = 3.0;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic signed [LLR_W-1:0] sys_llr [N], par1_llr [N], par2_llr [N];
  logic busy, done, error;
  logic [N-1:0] dec_bits;
  int checks = 0, failures = 0;

  turbo_decoder dut (.clk(clk), .rst(rst), .start(start), .sys_llr(sys_llr),
    .par1_llr(par1_llr), .par2_llr(par2_llr), .busy(busy), .done(done),
    .dec_bits(dec_bits), .error(error));
  always #5 clk = ~clk;

  initial begin
    repeat (FRAMES * (LAT + 10) + 1000) @(posedge clk);
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

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  function automatic logic signed [LLR_W-1:0] channel(input logic b, input real sigma);
    real y;
    int q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    q = $rtoi(y * 8.0 + (y >= 0.0 ? 0.5 : -0.5));
    if (q > 31) q = 31;
    if (q < -31) q = -31;
    return LLR_W'(q);
  endfunction

  initial begin
    real sigma, ebn0;
    int raw_err, dec_err, frame_err, cyc;
    logic [N-1:0] msg, p1, p2, raw;
    ebn0  = 10.0 ** (EBN0_DB / 10.0);
    sigma = $sqrt(1.0 / (2.0 * ebn0 / 3.0));
    raw_err = 0; dec_err = 0; frame_err = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int f = 0; f < FRAMES; f++) begin
      msg = $urandom();
      p1 = rsc_seq(msg);
      p2 = rsc_seq(interleave(msg));
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        sys_llr[i]  = channel(msg[i], sigma);
        par1_llr[i] = channel(p1[i], sigma);
        par2_llr[i] = channel(p2[i], sigma);
        raw[i] = (sys_llr[i] > 0);
      end
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done && cyc < 10 * LAT) begin @(negedge clk); cyc++; end
      check(cyc == LAT, $sformatf("frame %0d latency %0d", f, cyc));
      raw_err += $countones(raw ^ msg);
      dec_err += $countones(dec_bits ^ msg);
      if (dec_bits != msg) frame_err++;
    end
    $display("Eb/N0 = %0.1f dB, %0d frames of %0d bits: raw BER %0.4f, decoded BER %0.4f, FER %0.3f",
             EBN0_DB, FRAMES, N, real'(raw_err) / (FRAMES * N), real'(dec_err) / (FRAMES * N),
             real'(frame_err) / FRAMES);
    check(raw_err > 0, "the channel produced errors");
    check(dec_err * 3 <= raw_err, $sformatf("decoding gain: %0d decoded vs %0d raw bit errors", dec_err, raw_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
