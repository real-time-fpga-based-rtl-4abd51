// tb_doppler_fft: the four Doppler lanes at 16 points with 16 range columns.
// Two frames of five columns each (starting at columns 5 and 9) are sent as
// the corner turn does: frame_start with the first cell, columns back to
// back, 16 flush steps at the end. Each channel's column is a complex tone
// (a target moving between ramps) at a bin depending on column and channel,
// plus noise. Checked: every output's column and bin numbering, the values
// against a DFT divided by N (within 8 LSB of the 16-bit result), and the
// number of outputs.
module tb_doppler_fft;
  localparam int LOG2N = 4, N = 16, LOG2C = 4, NCOL = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               frame_start, in_valid, flush, out_valid;
  logic [LOG2C-1:0]   col_base, out_col;
  logic signed [11:0] in_re [4], in_im [4];
  logic [LOG2N-1:0]   out_bin;
  logic signed [15:0] out_re [4], out_im [4];

  doppler_fft #(.LOG2N(LOG2N), .LOG2C(LOG2C), .DW(16), .TW(16)) dut (
    .clk, .rst_n, .frame_start, .col_base, .in_valid, .flush, .in_re, .in_im,
    .out_valid, .out_bin, .out_col, .out_re, .out_im);

  initial begin
    #1_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // x[col][ch][ramp], real and imaginary parts in 12-bit units
  int xr [16][4][N];
  int xi [16][4][N];
  int nout = 0;
  int cnt_col [16];

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int col = int'(out_col);
    automatic int k = int'(out_bin);
    cnt_col[col]++;
    for (int c = 0; c < 4; c++) begin
      automatic real ar = 0.0, ai = 0.0;
      for (int t = 0; t < N; t++) begin
        automatic real ph = -6.283185307179586 * real'(k * t) / real'(N);
        ar += real'(xr[col][c][t]) * $cos(ph) - real'(xi[col][c][t]) * $sin(ph);
        ai += real'(xr[col][c][t]) * $sin(ph) + real'(xi[col][c][t]) * $cos(ph);
      end
      ar = ar * 16.0 / real'(N); ai = ai * 16.0 / real'(N);
      checks++;
      if (rabs(real'(out_re[c]) - ar) > 8.0 || rabs(real'(out_im[c]) - ai) > 8.0) begin
        failures++;
        if (failures < 10) $display("FAIL col %0d ch %0d bin %0d: (%0d,%0d) vs (%0.1f,%0.1f)",
                                    col, c, k, out_re[c], out_im[c], ar, ai);
      end
    end
    nout++;
  end

  task automatic send_frame(input int first);
    for (int col = first; col < first + NCOL; col++)
      for (int t = 0; t < N; t++) begin
        @(negedge clk);
        frame_start = (col == first && t == 0);
        col_base = LOG2C'(first);
        in_valid = 1; flush = 0;
        for (int c = 0; c < 4; c++) begin in_re[c] = 12'(xr[col][c][t]); in_im[c] = 12'(xi[col][c][t]); end
      end
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      frame_start = 0; in_valid = 0; flush = 1;
      for (int c = 0; c < 4; c++) begin in_re[c] = 12'($urandom); in_im[c] = 12'($urandom); end
    end
    @(negedge clk); flush = 0;
    repeat (30) @(posedge clk);
  endtask

  initial begin
    frame_start = 0; in_valid = 0; flush = 0; col_base = 0;
    for (int c = 0; c < 4; c++) begin in_re[c] = 0; in_im[c] = 0; end
    for (int col = 0; col < 16; col++) begin
      cnt_col[col] = 0;
      for (int c = 0; c < 4; c++)
        for (int t = 0; t < N; t++) begin
          automatic real ph = 6.283185307179586 * real'(((col + 3 * c) % N) * t) / real'(N) + real'(c);
          xr[col][c][t] = $rtoi(1200.0 * $cos(ph)) + $signed($urandom_range(100)) - 50;
          xi[col][c][t] = $rtoi(1200.0 * $sin(ph)) + $signed($urandom_range(100)) - 50;
        end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send_frame(5);
    send_frame(9);
    checks++;
    if (nout != 2 * NCOL * N) begin failures++; $display("FAIL %0d outputs", nout); end
    for (int col = 0; col < 16; col++) begin
      checks++;
      if (cnt_col[col] != (((col >= 5 && col < 14)) ? ((col == 9) ? 2 * N : N) : 0)) begin
        failures++; $display("FAIL column %0d has %0d outputs", col, cnt_col[col]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
