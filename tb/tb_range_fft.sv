// tb_range_fft: the four range-FFT lanes at 64 points. Each channel gets a
// real tone at its own bin and phase plus random noise; three ramps are sent
// back to back and pushed out with one block of flush steps. Each output
// (12-bit real and imaginary part per channel) is compared with the DFT of
// the 12-bit input times 4 / N, saturated to 12 bits, to within 2 LSB, and the bin numbering and
// the number of outputs are checked. The lanes run at their default width
// with an output gain of 2^2; in one ramp one channel's tone is large
// enough to make the 12-bit outputs saturate.
module tb_range_fft;
  localparam int LOG2N = 6, N = 64, NBLK = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               in_valid, flush, out_valid;
  logic signed [11:0] in_samp [4];
  logic [LOG2N-1:0]   out_bin;
  logic signed [11:0] out_re [4], out_im [4];

  range_fft #(.LOG2N(LOG2N), .GAIN(2)) dut (.clk, .rst_n, .in_valid, .flush, .in_samp,
                                  .out_valid, .out_bin, .out_re, .out_im);

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int x [NBLK][4][N];
  int nout = 0;
  bit seen [NBLK][N];

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int blk = nout / N;
    automatic int k = int'(out_bin);
    if (blk < NBLK) begin
      checks++;
      if (seen[blk][k]) begin failures++; $display("FAIL bin %0d twice", k); end
      seen[blk][k] = 1;
      for (int c = 0; c < 4; c++) begin
        automatic real ar = 0.0, ai = 0.0;
        for (int t = 0; t < N; t++) begin
          ar += real'(x[blk][c][t]) * $cos(6.283185307179586 * real'(k * t) / real'(N));
          ai -= real'(x[blk][c][t]) * $sin(6.283185307179586 * real'(k * t) / real'(N));
        end
        ar = ar * 4.0 / real'(N); ai = ai * 4.0 / real'(N);
        if (ar > 2047.0) ar = 2047.0;
        if (ar < -2048.0) ar = -2048.0;
        if (ai > 2047.0) ai = 2047.0;
        if (ai < -2048.0) ai = -2048.0;
        checks++;
        if (rabs(real'(out_re[c]) - ar) > 2.0 || rabs(real'(out_im[c]) - ai) > 2.0) begin
          failures++;
          if (failures < 10) $display("FAIL blk %0d ch %0d bin %0d: (%0d,%0d) vs (%0.1f,%0.1f)",
                                      blk, c, k, out_re[c], out_im[c], ar, ai);
        end
      end
    end
    nout++;
  end

  initial begin
    in_valid = 0; flush = 0;
    for (int c = 0; c < 4; c++) in_samp[c] = 0;
    for (int b = 0; b < NBLK; b++)
      for (int c = 0; c < 4; c++)
        for (int t = 0; t < N; t++)
          x[b][c][t] = $rtoi(((b == 2 && c == 0) ? 1900.0 : 300.0) *
                             $cos(6.283185307179586 * real'((3 + 5 * c + b) * t) / real'(N)
                                  + 0.7 * real'(c))) + $signed($urandom_range(50)) - 25;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < (NBLK + 1) * N; s++) begin
      @(negedge clk);
      in_valid = (s < NBLK * N);
      flush    = !in_valid;
      for (int c = 0; c < 4; c++) in_samp[c] = in_valid ? 12'(x[s / N][c][s % N]) : 12'($urandom);
    end
    @(negedge clk); in_valid = 0; flush = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (nout != NBLK * N) begin failures++; $display("FAIL %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
