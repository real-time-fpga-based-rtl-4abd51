// tb_corner_turn: transpose memory with 16 range bins x 8 ramps.
// Frames are written row by row (bins in bit-reversed order, as the range
// FFT delivers them); every cell carries its frame, ramp, bin and channel.
// Checked: the reader returns exactly the columns of the region of interest,
// each column's ramps in order with the right data of every channel, then 8
// flush steps and frame_done; a frame that completes while the reader is
// busy raises overrun and is dropped, and the next frame is read correctly.
module tb_corner_turn;
  localparam int LOG2C = 4, LOG2R = 3, NC = 16, NR = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               wr_valid;
  logic [LOG2C-1:0]   wr_bin, roi_first, roi_last;
  logic signed [11:0] wr_re [4], wr_im [4], rd_re [4], rd_im [4];
  logic               rd_valid, rd_flush, frame_start, frame_done, overrun, rd_busy;
  logic [LOG2R-1:0]   rd_row;
  logic [LOG2C-1:0]   rd_col, col_base;

  corner_turn #(.LOG2C(LOG2C), .LOG2R(LOG2R)) dut (
    .clk, .rst_n, .wr_valid, .wr_bin, .wr_re, .wr_im, .roi_first, .roi_last,
    .rd_valid, .rd_flush, .rd_row, .rd_col, .rd_re, .rd_im, .frame_start, .col_base,
    .frame_done, .overrun, .rd_busy);

  initial begin
    #1_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int enc_re(input int f, input int r, input int col, input int c);
    return (f * 128 + r * 16 + col) % 2048 - c;
  endfunction
  function automatic int enc_im(input int f, input int c);
    return -(f * 10 + c);
  endfunction

  // Reader checker.
  int cur_frame = -1, exp_col = 0, exp_row = 0, nflush = 0, ndone = 0, nover = 0;
  int first_q [$], last_q [$], frame_q [$];
  int ncells = 0;
  always @(posedge clk) if (rst_n) begin
    if (frame_start) begin
      checks++;
      if (frame_q.size() == 0) begin failures++; $display("FAIL unexpected frame"); end
      else begin
        cur_frame = frame_q.pop_front();
        exp_col = first_q.pop_front();
        if (int'(col_base) != exp_col) begin failures++; $display("FAIL col_base"); end
        void'(last_q.pop_front());
      end
      exp_row = 0; nflush = 0;
    end
    if (rd_valid) begin
      checks++;
      if (int'(rd_col) != exp_col || int'(rd_row) != exp_row) begin
        failures++; $display("FAIL order: got col %0d row %0d expected %0d %0d", rd_col, rd_row, exp_col, exp_row);
      end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(rd_re[c]) != enc_re(cur_frame, exp_row, exp_col, c) || int'(rd_im[c]) != enc_im(cur_frame, c)) begin
          failures++;
          if (failures < 10) $display("FAIL data frame %0d col %0d row %0d ch %0d: %0d %0d", cur_frame,
                                      exp_col, exp_row, c, rd_re[c], rd_im[c]);
        end
      end
      ncells++;
      exp_row++;
      if (exp_row == NR) begin exp_row = 0; exp_col++; end
    end
    if (rd_flush) nflush++;
    if (overrun) nover++;
    if (frame_done) begin
      ndone++;
      checks++;
      if (nflush != NR) begin failures++; $display("FAIL %0d flush steps", nflush); end
    end
  end

  task automatic write_frame(input int f);
    for (int r = 0; r < NR; r++)
      for (int i = 0; i < NC; i++) begin
        automatic int b = {i[0], i[1], i[2], i[3]};
        @(negedge clk);
        wr_valid = 1; wr_bin = LOG2C'(b);
        for (int c = 0; c < 4; c++) begin
          wr_re[c] = 12'(enc_re(f, r, b, c)); wr_im[c] = 12'(enc_im(f, c));
        end
      end
    @(negedge clk); wr_valid = 0;
  endtask

  task automatic expect_frame(input int f, input int first, input int last);
    frame_q.push_back(f); first_q.push_back(first); last_q.push_back(last);
  endtask

  initial begin
    wr_valid = 0; wr_bin = 0; roi_first = 3; roi_last = 10;
    for (int c = 0; c < 4; c++) begin wr_re[c] = 0; wr_im[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Frame 0: ROI 3..10.
    expect_frame(0, 3, 10);
    write_frame(0);
    wait (ndone == 1);
    checks++;
    if (ncells != 8 * NR) begin failures++; $display("FAIL %0d cells in ROI frame", ncells); end
    // Frame 1: whole range.
    roi_first = 0; roi_last = 15;
    expect_frame(1, 0, 15);
    write_frame(1);
    wait (ndone == 2);
    // Frames 2 and 3 back to back: 3 completes while 2 is read and is dropped.
    expect_frame(2, 0, 15);
    write_frame(2);
    write_frame(3);
    wait (ndone == 3);
    checks++;
    if (nover != 1) begin failures++; $display("FAIL overrun count %0d", nover); end
    // Frame 4 after the drop: a single-column ROI.
    roi_first = 7; roi_last = 7;
    expect_frame(4, 7, 7);
    write_frame(4);
    wait (ndone == 4);
    repeat (5) @(posedge clk);
    checks++;
    if (ncells != 8 * NR + 2 * NC * NR + NR) begin failures++; $display("FAIL total cells %0d", ncells); end
    checks++;
    if (rd_busy || frame_q.size() != 0) begin failures++; $display("FAIL frames left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
