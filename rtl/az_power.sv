// az_power: power of the four azimuth bins of a cell and the strongest one.
//
// For every range-Doppler cell the detector works on one number, the power
// re^2 + im^2 of the strongest azimuth bin, and remembers which bin it was,
// so a detection reports range, speed and direction together. The original
// design names peak detection on the range-Doppler-azimuth cube; reducing the
// azimuth axis by its maximum before the CFAR is this design's choice.
//
// Timing: two register stages (squares, then comparison); one cell per clock.
// A tag travels alongside. Ties go to the lower bin.
module az_power #(
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
  output logic [2*DW-1:0]      out_power,
  output logic [1:0]           out_az
);
  logic [2*DW-1:0] pw_q [4];
  logic            v_q;
  logic [TAGW-1:0] tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= 1'b0;
      tag_q <= '0;
      for (int k = 0; k < 4; k++) pw_q[k] <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        tag_q <= in_tag;
        // |re|, |im| <= 2^(DW-1), so the sum of squares fits 2*DW bits.
        for (int k = 0; k < 4; k++)
          pw_q[k] <= (2*DW)'(in_re[k] * in_re[k]) + (2*DW)'(in_im[k] * in_im[k]);
      end
    end
  end

  logic [2*DW-1:0] best;
  logic [1:0]      best_k;
  always_comb begin
    best   = pw_q[0];
    best_k = 2'd0;
    for (int k = 1; k < 4; k++)
      if (pw_q[k] > best) begin
        best   = pw_q[k];
        best_k = 2'(k);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_power <= '0;
      out_az    <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        out_tag   <= tag_q;
        out_power <= best;
        out_az    <= best_k;
      end
    end
  end
endmodule
