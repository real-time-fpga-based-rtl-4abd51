// tb_fft_r22sdf: self-checking test of the streaming radix-2^2 SDF FFT.
//
// Two instances are tested: 128 points (odd log2: three radix-4 stages and a
// final radix-2 stage, the same structure as the 8192-point range FFT) and
// 256 points (four radix-4 stages, the Doppler FFT). Each receives several
// blocks of random complex samples back to back, with random idle cycles,
// followed by one block of flush steps. Every output bin is compared with a
// direct DFT divided by N computed here in floating point. The test also
// checks the number of outputs, that bins arrive in bit-reversed order, and
// the latency of N - 1 held steps from the first input to the first output.
module tb_fft_r22sdf;
  localparam int DW = 16;
  localparam int NBLK = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // ---------------------------------------------------------------- DUTs
  logic                 v7, f7, v8, f8;
  logic signed [DW-1:0] ir7, ii7, ir8, ii8;
  logic                 ov7, ov8;
  logic signed [DW-1:0] or7, oi7, or8, oi8;
  logic [6:0]           ox7;
  logic [7:0]           ox8;

  fft_r22sdf #(.LOG2N(7), .DW(DW), .TW(16)) u7 (.clk, .rst_n, .in_valid(v7), .flush(f7),
    .in_re(ir7), .in_im(ii7), .out_valid(ov7), .out_re(or7), .out_im(oi7), .out_idx(ox7));
  fft_r22sdf #(.LOG2N(8), .DW(DW), .TW(16)) u8 (.clk, .rst_n, .in_valid(v8), .flush(f8),
    .in_re(ir8), .in_im(ii8), .out_valid(ov8), .out_re(or8), .out_im(oi8), .out_idx(ox8));

  // Stimulus memories (block-major) and reference results.
  int xr [2][NBLK*256];
  int xi [2][NBLK*256];
  int nout [2];
  int steps_to_first [2];
  int stepcnt [2];

  function automatic int bitrev(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if (v & (1 << i)) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  task automatic check_out(input int which, input int log2n, input int re, input int im,
                           input int idx);
    int n = 1 << log2n;
    int blk = nout[which] / n;
    int k   = nout[which] % n;
    real ar = 0.0, ai = 0.0;
    for (int t = 0; t < n; t++) begin
      real ph = -6.283185307179586 * real'(k * t) / real'(n);
      ar += real'(xr[which][blk*n+t]) * $cos(ph) - real'(xi[which][blk*n+t]) * $sin(ph);
      ai += real'(xr[which][blk*n+t]) * $sin(ph) + real'(xi[which][blk*n+t]) * $cos(ph);
    end
    ar /= real'(n); ai /= real'(n);
    checks++;
    if (idx != bitrev(k, log2n) ) begin
      failures++;
      $display("FAIL N=%0d out %0d: idx %0d expected %0d", n, nout[which], idx, bitrev(k, log2n));
    end
    // The pipeline emits bin bitrev(k) at position k.
    begin
      int kb = bitrev(k, log2n);
      ar = 0.0; ai = 0.0;
      for (int t = 0; t < n; t++) begin
        real ph = -6.283185307179586 * real'(kb * t) / real'(n);
        ar += real'(xr[which][blk*n+t]) * $cos(ph) - real'(xi[which][blk*n+t]) * $sin(ph);
        ai += real'(xr[which][blk*n+t]) * $sin(ph) + real'(xi[which][blk*n+t]) * $cos(ph);
      end
      ar /= real'(n); ai /= real'(n);
    end
    checks++;
    if ((real'(re) - ar) > 8.0 || (ar - real'(re)) > 8.0 ||
        (real'(im) - ai) > 8.0 || (ai - real'(im)) > 8.0) begin
      failures++;
      if (failures < 20)
        $display("FAIL N=%0d blk %0d bin %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                 n, blk, bitrev(k, log2n), re, im, ar, ai);
    end
    nout[which]++;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (v7 | f7) stepcnt[0]++;
      if (v8 | f8) stepcnt[1]++;
      if (ov7) begin
        if (nout[0] == 0) steps_to_first[0] = stepcnt[0];
        check_out(0, 7, int'(or7), int'(oi7), int'(ox7));
      end
      if (ov8) begin
        if (nout[1] == 0) steps_to_first[1] = stepcnt[1];
        check_out(1, 8, int'(or8), int'(oi8), int'(ox8));
      end
    end
  end

  task automatic drive(input int which, input int log2n);
    int n = 1 << log2n;
    // Data blocks with random gaps, then one block of flush steps.
    for (int s = 0; s < (NBLK + 1) * n; s++) begin
      while ($urandom_range(3) == 0) begin
        if (which == 0) begin v7 <= 0; f7 <= 0; end else begin v8 <= 0; f8 <= 0; end
        @(posedge clk);
      end
      if (which == 0) begin
        v7 <= (s < NBLK*n); f7 <= (s >= NBLK*n);
        ir7 <= (s < NBLK*n) ? DW'(xr[0][s]) : DW'($urandom);
        ii7 <= (s < NBLK*n) ? DW'(xi[0][s]) : DW'($urandom);
      end else begin
        v8 <= (s < NBLK*n); f8 <= (s >= NBLK*n);
        ir8 <= (s < NBLK*n) ? DW'(xr[1][s]) : DW'($urandom);
        ii8 <= (s < NBLK*n) ? DW'(xi[1][s]) : DW'($urandom);
      end
      @(posedge clk);
    end
    if (which == 0) begin v7 <= 0; f7 <= 0; end else begin v8 <= 0; f8 <= 0; end
  endtask

  initial begin
    v7 = 0; f7 = 0; v8 = 0; f8 = 0; ir7 = 0; ii7 = 0; ir8 = 0; ii8 = 0;
    nout = '{0, 0}; stepcnt = '{0, 0}; steps_to_first = '{0, 0};
    for (int w = 0; w < 2; w++)
      for (int i = 0; i < NBLK*256; i++) begin
        // Block 0: full-scale random; block 1: a single tone; block 2: small random.
        int blk = i / ((w == 0) ? 128 : 256);
        int t   = i % ((w == 0) ? 128 : 256);
        if (blk == 1) begin
          xr[w][i] = int'($rtoi(20000.0 * $cos(6.283185307179586 * 5.0 * real'(t) / ((w == 0) ? 128.0 : 256.0))));
          xi[w][i] = int'($rtoi(20000.0 * $sin(6.283185307179586 * 5.0 * real'(t) / ((w == 0) ? 128.0 : 256.0))));
        end else if (blk == 0) begin
          xr[w][i] = $signed($urandom_range(60000)) - 30000;
          xi[w][i] = $signed($urandom_range(60000)) - 30000;
        end else begin
          xr[w][i] = $signed($urandom_range(400)) - 200;
          xi[w][i] = $signed($urandom_range(400)) - 200;
        end
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      drive(0, 7);
      drive(1, 8);
    join
    repeat (100) @(posedge clk);
    checks++;
    if (nout[0] != NBLK*128) begin failures++; $display("FAIL N=128 outputs %0d", nout[0]); end
    checks++;
    if (nout[1] != NBLK*256) begin failures++; $display("FAIL N=256 outputs %0d", nout[1]); end
    // The first output needs N input steps (N - 1 held samples) plus at most
    // 1.5 * LOG2N + 1 register stages, during which more steps may enter.
    checks++;
    if (steps_to_first[0] < 128 || steps_to_first[0] > 128 + 11) begin failures++; $display("FAIL N=128 latency %0d steps", steps_to_first[0]); end
    checks++;
    if (steps_to_first[1] < 256 || steps_to_first[1] > 256 + 13) begin failures++; $display("FAIL N=256 latency %0d steps", steps_to_first[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
