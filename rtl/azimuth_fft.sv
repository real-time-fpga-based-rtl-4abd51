// azimuth_fft: 4-point FFT across the four receive channels (the third FFT).
//
// A target off boresight reaches the four receive antennas with a phase
// step from channel to channel; a 4-point DFT over the channels of one
// range-Doppler cell turns that phase step into one of four azimuth bins.
// This is a single radix-4 butterfly with only trivial twiddles (+-1, +-j):
//   X0 = a + b + c + d        X1 = a - jb - c + jd
//   X2 = a - b + c - d        X3 = a + jb - c - jd
// The results are divided by 4 (arithmetic shift) to stay in DW bits. A
// tag (here the range and Doppler bin of the cell) travels alongside.
//
// Timing: fully pipelined, one cell per clock, one register stage. The
// 4-point radix-4 single stage follows the original design; the scaling is
// this design's choice.
module azimuth_fft #(
  parameter int unsigned DW   = xfri_pkg::DW,
  parameter int unsigned TAGW = 21
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TAGW-1:0]      in_tag,
  input  logic signed [DW-1:0] in_re [4],
  input  logic signed [DW-1:0] in_im [4],
  output logic                 out_valid,
  output logic [TAGW-1:0]      out_tag,
  output logic signed [DW-1:0] out_re [4],
  output logic signed [DW-1:0] out_im [4]
);
  logic signed [DW+1:0] ar, ai, br, bi, cr, ci, dr, di;
  logic signed [DW+1:0] xr [4];
  logic signed [DW+1:0] xi [4];

  always_comb begin
    ar = (DW+2)'(in_re[0]); ai = (DW+2)'(in_im[0]);
    br = (DW+2)'(in_re[1]); bi = (DW+2)'(in_im[1]);
    cr = (DW+2)'(in_re[2]); ci = (DW+2)'(in_im[2]);
    dr = (DW+2)'(in_re[3]); di = (DW+2)'(in_im[3]);
    // -j*(x + jy) = y - jx ;  +j*(x + jy) = -y + jx
    xr[0] = ar + br + cr + dr;   xi[0] = ai + bi + ci + di;
    xr[1] = ar + bi - cr - di;   xi[1] = ai - br - ci + dr;
    xr[2] = ar - br + cr - dr;   xi[2] = ai - bi + ci - di;
    xr[3] = ar - bi - cr + di;   xi[3] = ai + br - ci - dr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      for (int k = 0; k < 4; k++) begin out_re[k] <= '0; out_im[k] <= '0; end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_tag <= in_tag;
        for (int k = 0; k < 4; k++) begin
          out_re[k] <= xr[k][DW+1:2];
          out_im[k] <= xi[k][DW+1:2];
        end
      end
    end
  end
endmodule
