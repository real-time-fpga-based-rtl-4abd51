// tb_ramp_ctrl: ramp timing and FFT framing with small sizes (32-point
// blocks, 20 samples per ramp, 4 ramps per frame, 200-clock ramp period).
// Samples arrive one clock in five. Checked: every block has the 20 samples
// in order followed by 12 zeros, the flush of 32 steps after the last ramp
// of a frame only, the ramp period of exactly 200 clocks (padding and
// flushing fit inside it here), frame_start on ramp 0 only, and no samples framed
// while disabled.
module tb_ramp_ctrl;
  localparam int LOG2NFFT = 5, NFFT = 32, NSAMP = 20, LOG2NRAMP = 2, NRAMP = 4, PER = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               enable, in_valid;
  logic signed [11:0] in_samp [4];
  logic               ramp_trig, frame_start, fft_valid, fft_flush, busy;
  logic [1:0]         ramp_idx;
  logic signed [11:0] fft_samp [4];

  ramp_ctrl #(.LOG2NFFT(LOG2NFFT), .NSAMP(NSAMP), .LOG2NRAMP(LOG2NRAMP), .RAMP_PERIOD(PER)) dut (
    .clk, .rst_n, .enable, .in_valid, .in_samp, .ramp_trig, .frame_start, .ramp_idx,
    .fft_valid, .fft_flush, .fft_samp, .busy);

  initial begin
    #1_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Sample generator: value counts up, one sample every 5 clocks.
  int sval = 0, tick = 0;
  always @(posedge clk) begin
    tick <= (tick == 4) ? 0 : tick + 1;
    in_valid <= (tick == 4);
    if (tick == 4) begin
      sval <= sval + 1;
      for (int c = 0; c < 4; c++) in_samp[c] <= 12'((sval + 100 * c) % 2000);
    end
  end

  // Checker.
  int ntrig = 0, nstart = 0, last_trig = -1, cyc = 0;
  int blkpos = 0, nflush = 0, flushes_seen = 0, first_val = 0;
  int last_input [4];
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid) for (int c = 0; c < 4; c++) last_input[c] = in_samp[c];
      if (ramp_trig) begin
        if (last_trig >= 0) begin
          checks++;
          if (cyc - last_trig != PER) begin failures++; $display("FAIL ramp period %0d", cyc - last_trig); end
        end
        last_trig = cyc;
        ntrig++;
        checks++;
        if (blkpos != 0) begin failures++; $display("FAIL trigger inside a block"); end
      end
      if (frame_start) begin
        nstart++;
        checks++;
        if (!ramp_trig || ntrig % NRAMP != 1) begin failures++; $display("FAIL frame_start at ramp %0d", ntrig); end
      end
      if (fft_valid) begin
        checks++;
        if (nflush != 0) begin failures++; $display("FAIL sample inside flush"); end
        if (blkpos < NSAMP) begin
          // consecutive samples of the generator
          if (blkpos == 0) first_val = fft_samp[0];
          else if (int'(fft_samp[0]) != (first_val + blkpos) % 2000) begin
            failures++; $display("FAIL sample %0d of block: %0d", blkpos, fft_samp[0]);
          end
          checks++;
          if (int'(fft_samp[3]) != (int'(fft_samp[0]) + 300) % 2000) begin
            failures++; $display("FAIL channel 3 sample");
          end
        end else begin
          for (int c = 0; c < 4; c++) if (fft_samp[c] != 0) begin failures++; $display("FAIL padding not zero"); end
        end
        blkpos = (blkpos + 1) % NFFT;
      end
      if (fft_flush) begin
        checks++;
        if (blkpos != 0 || (ntrig % NRAMP) != 0) begin failures++; $display("FAIL flush out of place"); end
        nflush++;
        if (nflush == NFFT) begin nflush = 0; flushes_seen++; end
      end
    end
  end

  initial begin
    enable = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (300) @(posedge clk);
    checks++;
    if (ntrig != 0) begin failures++; $display("FAIL ramp while disabled"); end
    enable <= 1;
    wait (ntrig == 2 * NRAMP);
    enable <= 0;
    repeat (2000) @(posedge clk);
    checks++;
    if (ntrig != 2 * NRAMP) begin failures++; $display("FAIL %0d ramps", ntrig); end
    checks++;
    if (nstart != 2) begin failures++; $display("FAIL %0d frame starts", nstart); end
    checks++;
    if (flushes_seen != 2) begin failures++; $display("FAIL %0d flushes", flushes_seen); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
