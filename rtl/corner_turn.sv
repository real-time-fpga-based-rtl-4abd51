// corner_turn: ping-pong transpose memory between the range and Doppler FFTs.
//
// The range FFT produces one row per ramp (NC = 2**LOG2C range bins of all
// channels); the Doppler FFT needs, for each range bin, the column of its
// NR = 2**LOG2R values over the ramps of a frame. This block writes the rows
// of a frame into one bank of a two-bank memory while the previous frame is
// read out of the other bank column by column. Each memory word holds all
// NCH channels of one (ramp, range bin) cell, SW bits per real and imaginary
// part (24-bit complex words as in the original design).
//
// Region of interest: only the columns roi_first..roi_last (range bins,
// latched when a frame starts to be read) are read, which skips the range
// cells of no interest and saves Doppler processing time. After the last
// column the reader issues NR flush steps so that the Doppler FFT pipeline
// delivers the frame at once, waits DRAIN clocks and pulses frame_done.
//
// The original design keeps these buffers in external SDRAM; here they are
// one on-chip memory array with one write and one registered read port, so
// a DRAM controller with the same addressing can replace it. If a frame is
// complete while the previous one is still being read, the new frame is
// dropped (its bank is overwritten by the next frame) and overrun pulses.
//
// Timing: writes are accepted every clock; the reader emits one cell per
// clock, data one clock after the address.
module corner_turn #(
  parameter int unsigned NCH   = xfri_pkg::NCH,
  parameter int unsigned SW    = xfri_pkg::SAMP_W,
  parameter int unsigned LOG2C = xfri_pkg::LOG2_NR,
  parameter int unsigned LOG2R = xfri_pkg::LOG2_ND,
  parameter int unsigned DRAIN = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // row side (from the range FFT)
  input  logic                 wr_valid,
  input  logic [LOG2C-1:0]     wr_bin,
  input  logic signed [SW-1:0] wr_re [NCH],
  input  logic signed [SW-1:0] wr_im [NCH],
  // region of interest, in range bins
  input  logic [LOG2C-1:0]     roi_first,
  input  logic [LOG2C-1:0]     roi_last,
  // column side (to the Doppler FFT)
  output logic                 rd_valid,
  output logic                 rd_flush,
  output logic [LOG2R-1:0]     rd_row,
  output logic [LOG2C-1:0]     rd_col,
  output logic signed [SW-1:0] rd_re [NCH],
  output logic signed [SW-1:0] rd_im [NCH],
  output logic                 frame_start,   // first column of a frame is being read
  output logic [LOG2C-1:0]     col_base,      // first column of the frame being read
  output logic                 frame_done,
  output logic                 overrun,
  output logic                 rd_busy
);
  localparam int unsigned WW = NCH * 2 * SW;
  localparam int unsigned AW = 1 + LOG2R + LOG2C;

  logic [WW-1:0] mem [1 << AW];

  // ------------------------------------------------------------ write side
  logic             wbank;
  logic [LOG2R-1:0] wrow;
  logic [LOG2C-1:0] wcnt;
  logic [WW-1:0]    wword;
  logic             frame_complete;

  always_comb begin
    for (int c = 0; c < int'(NCH); c++)
      wword[c*2*SW +: 2*SW] = {wr_re[c], wr_im[c]};
    frame_complete = wr_valid && (wcnt == '1) && (wrow == '1);
  end

  always_ff @(posedge clk)
    if (wr_valid) mem[{wbank, wrow, wr_bin}] <= wword;

  // ------------------------------------------------------------- read side
  typedef enum logic [1:0] {R_IDLE, R_READ, R_FLUSH, R_DRAIN} rstate_t;
  rstate_t          rstate;
  logic             rbank;
  logic [LOG2R-1:0] rrow;
  logic [LOG2C-1:0] rcol, rlast;
  logic [$clog2(DRAIN+1)-1:0] drain_cnt;
  logic             rd_en;
  logic [WW-1:0]    rword;

  assign rd_en   = (rstate == R_READ);
  assign rd_busy = (rstate != R_IDLE);

  always_ff @(posedge clk)
    if (rd_en) rword <= mem[{rbank, rrow, rcol}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank       <= 1'b0;
      wrow        <= '0;
      wcnt        <= '0;
      overrun     <= 1'b0;
      rstate      <= R_IDLE;
      rbank       <= 1'b0;
      rrow        <= '0;
      rcol        <= '0;
      rlast       <= '0;
      col_base    <= '0;
      drain_cnt   <= '0;
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
      rd_valid    <= 1'b0;
      rd_flush    <= 1'b0;
      rd_row      <= '0;
      rd_col      <= '0;
    end else begin
      overrun     <= 1'b0;
      frame_start <= 1'b0;
      frame_done  <= 1'b0;
      rd_flush    <= 1'b0;
      rd_valid    <= rd_en;
      rd_row      <= rrow;
      rd_col      <= rcol;

      // Row and cell counters of the write side.
      if (wr_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == '1) wrow <= wrow + 1'b1;
      end

      unique case (rstate)
        R_IDLE: ;
        R_READ: begin
          rrow <= rrow + 1'b1;
          if (rrow == '1) begin
            rcol <= rcol + 1'b1;
            if (rcol == rlast) begin
              rstate    <= R_FLUSH;
              drain_cnt <= '0;
            end
          end
        end
        R_FLUSH: begin
          rd_flush <= 1'b1;
          rrow     <= rrow + 1'b1;
          if (rrow == '1) rstate <= R_DRAIN;
        end
        R_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == ($clog2(DRAIN+1))'(DRAIN - 1)) begin
            rstate     <= R_IDLE;
            frame_done <= 1'b1;
          end
        end
        default: rstate <= R_IDLE;
      endcase

      // A complete frame is handed to the reader, or dropped if it is busy.
      if (frame_complete) begin
        if (rstate == R_IDLE) begin
          wbank       <= ~wbank;
          rbank       <= wbank;
          rstate      <= R_READ;
          rrow        <= '0;
          rcol        <= roi_first;
          rlast       <= (roi_last >= roi_first) ? roi_last : roi_first;
          col_base    <= roi_first;
          frame_start <= 1'b1;
        end else begin
          overrun <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < int'(NCH); c++) begin
      rd_re[c] = rword[c*2*SW + SW +: SW];
      rd_im[c] = rword[c*2*SW +: SW];
    end
  end

  // The reader only runs between frame hand-over and frame_done.
  assert property (@(posedge clk) disable iff (!rst_n) rd_valid |-> !rd_flush);
endmodule
