// ca_cfar: cell-averaging constant-false-alarm-rate detector.
//
// The noise level around a cell under test (CUT) is estimated as the mean of
// NT training cells on each side, skipping NG guard cells next to the CUT
// (where a target's own energy spreads). The CUT is declared a target when
//   P(CUT) > alpha * mean(training cells),
// alpha being an unsigned fixed-point factor with 4 fraction bits (alpha = 16
// means 1.0, the largest factor is 2^(AW-4)). The detector runs along the Doppler axis: the input is a stream
// of columns of N = 2**LOG2N powers in natural bin order (in_idx), and a
// window of 2*(NT+NG)+1 cells slides along it. Every bin is tested: within
// NT+NG bins of a column edge the training side that would reach past the
// edge is dropped and the other side counts twice, so the threshold keeps
// the same scale. After the last bin of a column the window keeps moving by
// itself for NT+NG clocks, so the column's last cells are tested even when no
// further column follows; cells of different columns never mix. A payload
// (range bin, azimuth bin) travels with every cell.
//
// The original design names CA-CFAR as the peak detector; the axis, the
// window sizes, the threshold format and the edge rule are this design's
// choices. Timing: a detection of CUT bin k is reported one clock after the
// cell k + NT + NG has arrived (or after the drain step that stands for it);
// one cell per clock. Within a column the cells may come with gaps.
module ca_cfar #(
  parameter int unsigned PW    = 2 * xfri_pkg::DW,   // power width
  parameter int unsigned LOG2N = xfri_pkg::LOG2_ND,
  parameter int unsigned NT    = 8,    // training cells per side (power of 2)
  parameter int unsigned NG    = 2,    // guard cells per side
  parameter int unsigned TAGW  = 15,
  parameter int unsigned AW    = xfri_pkg::ALPHA_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    alpha,      // threshold factor, 4 fraction bits
  input  logic             in_valid,
  input  logic [PW-1:0]    in_power,
  input  logic [LOG2N-1:0] in_idx,
  input  logic [TAGW-1:0]  in_tag,
  output logic             det_valid,
  output logic [PW-1:0]    det_power,
  output logic [LOG2N-1:0] det_idx,
  output logic [TAGW-1:0]  det_tag,
  output logic [PW+AW-5:0] det_thresh  // alpha * sum of training cells, /(2*NT*16)
);
  localparam int unsigned HALF = NT + NG;
  localparam int unsigned WIN  = 2 * HALF + 1;
  localparam int unsigned SUMW = PW + $clog2(2 * NT);
  localparam int unsigned LOG2T = $clog2(2 * NT);

  logic [PW-1:0]    w_pow [WIN];   // w_pow[0] is the newest cell
  logic [LOG2N-1:0] w_idx [WIN];
  logic [TAGW-1:0]  w_tag [WIN];
  logic [WIN-1:0]   w_vld;         // window position holds a cell
  logic [$clog2(HALF+1)-1:0] drain;  // empty shifts still owed after a column end
  logic             shift;

  // The window moves on every input cell; after the last bin of a column it
  // also moves by itself (shifting in empty positions) until the column's
  // last cell has been the CUT, unless the next column already arrives.
  assign shift = in_valid || (drain != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_vld <= '0;
      drain <= '0;
      for (int i = 0; i < int'(WIN); i++) begin
        w_pow[i] <= '0; w_idx[i] <= '0; w_tag[i] <= '0;
      end
    end else begin
      if (in_valid) drain <= (in_idx == LOG2N'((1 << LOG2N) - 1)) ? ($clog2(HALF+1))'(HALF) : '0;
      else if (drain != '0) drain <= drain - 1'b1;
      if (shift) begin
        w_vld <= {w_vld[WIN-2:0], in_valid};
        w_pow[0] <= in_valid ? in_power : '0;
        w_idx[0] <= in_idx; w_tag[0] <= in_tag;
        for (int i = 1; i < int'(WIN); i++) begin
          w_pow[i] <= w_pow[i-1]; w_idx[i] <= w_idx[i-1]; w_tag[i] <= w_tag[i-1];
        end
      end
    end
  end

  // Training cells: leading (newer) w[0..NT-1], lagging (older)
  // w[WIN-NT..WIN-1]. A side is usable when all its cells are present and
  // belong to the CUT's column: within a column the bins rise by one per
  // cell, so a leading cell has a larger and a lagging cell a smaller bin
  // than the CUT, while cells of a neighbouring column break that order.
  logic [SUMW-1:0] lead_sum, lag_sum, tsum;
  logic            lead_ok, lag_ok, cut_ok;
  logic [SUMW+AW:0] lhs, rhs;
  always_comb begin
    lead_sum = '0; lag_sum = '0; lead_ok = 1'b1; lag_ok = 1'b1;
    for (int i = 0; i < int'(NT); i++) begin
      lead_sum += SUMW'(w_pow[i]);
      lag_sum  += SUMW'(w_pow[WIN-1-i]);
      lead_ok  &= w_vld[i] && (w_idx[i] > w_idx[HALF]);
      lag_ok   &= w_vld[WIN-1-i] && (w_idx[WIN-1-i] < w_idx[HALF]);
    end
    // Near a column edge the complete side stands in for the cut one.
    if (lead_ok && lag_ok) tsum = lead_sum + lag_sum;
    else if (lag_ok)       tsum = lag_sum << 1;
    else                   tsum = lead_sum << 1;
    cut_ok = w_vld[HALF] && (lead_ok || lag_ok);
    // P > alpha/16 * tsum/(2NT)  <=>  P * 2NT * 16 > alpha * tsum
    lhs = (SUMW+AW+1)'(w_pow[HALF]) << (LOG2T + 4);
    rhs = (SUMW+AW+1)'(tsum) * (SUMW+AW+1)'(alpha);
  end

  // The window has just moved: test the new CUT once.
  logic fresh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fresh <= 1'b0;
    else        fresh <= shift;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_valid  <= 1'b0;
      det_power  <= '0;
      det_idx    <= '0;
      det_tag    <= '0;
      det_thresh <= '0;
    end else begin
      det_valid <= fresh && cut_ok && (lhs > rhs);
      if (fresh) begin
        det_power  <= w_pow[HALF];
        det_idx    <= w_idx[HALF];
        det_tag    <= w_tag[HALF];
        det_thresh <= (PW+AW-4)'(rhs >> (LOG2T + 4));
      end
    end
  end

  initial assert ((1 << LOG2T) == 2 * NT) else $error("NT must be a power of two");
endmodule
