// doppler_fft: the second FFT of the chain, along the ramps of each range bin.
//
// One 256-point pipelined FFT lane (fft_r22sdf, four radix-4 stages) per
// receive channel. Each lane takes a column of the transpose memory, the
// complex range-FFT values of one range bin over the NR ramps of a frame,
// and returns its Doppler spectrum, in which the phase rotation from ramp to
// ramp of a moving target becomes a peak at its radial speed. Bin k < NR/2 is
// a speed of k * v_res, bin k >= NR/2 a speed of (k - NR) * v_res.
//
// Interface: column cells arrive with in_valid (1 cell per clock at most);
// flush steps push the last column out. The 12-bit parts enter the DW-bit
// lanes shifted up by DW - SW bits. Outputs leave in bit-reversed order of
// out_bin with out_col, the range bin of the column: col_base is the first
// column of the frame (frame_start marks that column's first cell) and
// every NR outputs advance the column by one. Latency: NR - 1 steps plus
// about 14 clocks. Lane count and size follow the original design; the
// column bookkeeping is this design's choice.
module doppler_fft #(
  parameter int unsigned NCH   = xfri_pkg::NCH,
  parameter int unsigned SW    = xfri_pkg::SAMP_W,
  parameter int unsigned LOG2N = xfri_pkg::LOG2_ND,
  parameter int unsigned LOG2C = xfri_pkg::LOG2_NR,
  parameter int unsigned DW    = xfri_pkg::DW,
  parameter int unsigned TW    = xfri_pkg::TW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  input  logic [LOG2C-1:0]     col_base,
  input  logic                 in_valid,
  input  logic                 flush,
  input  logic signed [SW-1:0] in_re [NCH],
  input  logic signed [SW-1:0] in_im [NCH],
  output logic                 out_valid,
  output logic [LOG2N-1:0]     out_bin,
  output logic [LOG2C-1:0]     out_col,
  output logic signed [DW-1:0] out_re [NCH],
  output logic signed [DW-1:0] out_im [NCH]
);
  localparam int unsigned SH = DW - SW;

  logic                 l_valid [NCH];
  logic [LOG2N-1:0]     l_idx   [NCH];

  for (genvar c = 0; c < int'(NCH); c++) begin : g_lane
    fft_r22sdf #(.LOG2N(LOG2N), .DW(DW), .TW(TW)) u_fft (
      .clk, .rst_n,
      .in_valid (in_valid),
      .flush    (flush),
      .in_re    ({in_re[c], {SH{1'b0}}}),
      .in_im    ({in_im[c], {SH{1'b0}}}),
      .out_valid(l_valid[c]),
      .out_re   (out_re[c]),
      .out_im   (out_im[c]),
      .out_idx  (l_idx[c])
    );
  end

  // Column of the outputs: col_base at the start of a frame, plus one for
  // every NR outputs. The frame's outputs have all left before the next
  // frame_start because the reader flushes and drains after each frame.
  logic [LOG2N-1:0] ocnt;
  logic [LOG2C-1:0] col;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ocnt <= '0;
      col  <= '0;
    end else if (frame_start) begin
      ocnt <= '0;
      col  <= col_base;
    end else if (l_valid[0]) begin
      ocnt <= ocnt + 1'b1;
      if (ocnt == '1) col <= col + 1'b1;
    end
  end

  always_comb begin
    out_valid = l_valid[0];
    out_bin   = l_idx[0];
    out_col   = col;
  end
endmodule
