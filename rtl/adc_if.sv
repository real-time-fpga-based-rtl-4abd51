// adc_if: capture of the four-channel 14-bit IF samples and reduction to 12 bits.
//
// The ADC delivers one 14-bit two's-complement word per channel at 40 MSa/s;
// the processing clock is faster (200 MHz), so adc_valid marks the clocks
// that carry a new sample. Each word is registered, rounded to 12 bits
// (add half an LSB of the result, drop two bits) and saturated, as the
// original chain reduces the 14-bit samples to 12 bits before processing.
// The parallel word format, two's complement coding and round-half-up are
// this design's choices; the serial LVDS deserialisation of a real ADC is
// not part of this block.
//
// Timing: one register stage; samp_valid follows adc_valid by one clock.
module adc_if #(
  parameter int unsigned NCH    = xfri_pkg::NCH,
  parameter int unsigned ADC_W  = xfri_pkg::ADC_W,
  parameter int unsigned SAMP_W = xfri_pkg::SAMP_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic signed [ADC_W-1:0]  adc_data [NCH],
  output logic                     samp_valid,
  output logic signed [SAMP_W-1:0] samp     [NCH],
  output logic [NCH-1:0]           clipped          // saturation happened on this sample
);
  localparam int unsigned SH = ADC_W - SAMP_W;

  logic signed [ADC_W:0]  rounded [NCH];
  logic signed [SAMP_W:0] reduced [NCH];
  logic signed [SAMP_W-1:0] sat_v [NCH];
  logic [NCH-1:0] clip_v;

  always_comb begin
    for (int c = 0; c < int'(NCH); c++) begin
      rounded[c] = (ADC_W+1)'(adc_data[c]) + (ADC_W+1)'(1 << (SH - 1));
      reduced[c] = rounded[c][ADC_W:SH];
      clip_v[c]  = (reduced[c][SAMP_W] != reduced[c][SAMP_W-1]);
      sat_v[c]   = clip_v[c] ? {reduced[c][SAMP_W], {(SAMP_W-1){~reduced[c][SAMP_W]}}}
                             : reduced[c][SAMP_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_valid <= 1'b0;
      clipped    <= '0;
      for (int c = 0; c < int'(NCH); c++) samp[c] <= '0;
    end else begin
      samp_valid <= adc_valid;
      if (adc_valid) begin
        clipped <= clip_v;
        for (int c = 0; c < int'(NCH); c++) samp[c] <= sat_v[c];
      end
    end
  end
endmodule
