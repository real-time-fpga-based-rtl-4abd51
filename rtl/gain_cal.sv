// gain_cal: per-channel gain and offset calibration of the 12-bit samples.
//
// The receive channels differ in gain and DC offset; before the channels are
// combined by the azimuth FFT they are equalised. Each sample is corrected as
//   y = sat( ((x - offset) * gain + 2^(GF-1)) >> GF )
// with gain an unsigned fixed-point number with GF fraction bits (default
// Q2.14, 1.0 = 16384) and offset a signed value in sample LSBs. The original
// design only names this calibration step; the correction formula, the
// number formats and the saturation are this design's choices.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
module gain_cal #(
  parameter int unsigned NCH    = xfri_pkg::NCH,
  parameter int unsigned SAMP_W = xfri_pkg::SAMP_W,
  parameter int unsigned GAIN_W = 16,
  parameter int unsigned GF     = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [GAIN_W-1:0]        gain     [NCH],
  input  logic signed [SAMP_W-1:0] offset   [NCH],
  input  logic                     in_valid,
  input  logic signed [SAMP_W-1:0] in_samp  [NCH],
  output logic                     out_valid,
  output logic signed [SAMP_W-1:0] out_samp [NCH]
);
  localparam int unsigned PW = SAMP_W + 1 + GAIN_W + 1;   // product width

  logic signed [SAMP_W:0]   centred [NCH];
  logic signed [PW-1:0]     prod    [NCH];
  logic signed [PW-1:0]     scaled  [NCH];
  logic signed [SAMP_W-1:0] sat_v   [NCH];

  localparam logic signed [PW-1:0] MAXV = PW'((1 << (SAMP_W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(1 << (SAMP_W - 1));

  always_comb begin
    for (int c = 0; c < int'(NCH); c++) begin
      centred[c] = (SAMP_W+1)'(in_samp[c]) - (SAMP_W+1)'(offset[c]);
      prod[c]    = PW'(centred[c]) * $signed(PW'({1'b0, gain[c]}));
      scaled[c]  = (prod[c] + PW'(1 << (GF - 1))) >>> GF;
      if (scaled[c] > MAXV)      sat_v[c] = MAXV[SAMP_W-1:0];
      else if (scaled[c] < MINV) sat_v[c] = MINV[SAMP_W-1:0];
      else                       sat_v[c] = scaled[c][SAMP_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int c = 0; c < int'(NCH); c++) out_samp[c] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < int'(NCH); c++) out_samp[c] <= sat_v[c];
    end
  end
endmodule
