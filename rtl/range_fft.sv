// range_fft: the first FFT of the chain, along each frequency ramp.
//
// One 8192-point pipelined FFT lane (fft_r22sdf: six radix-4 stages and one
// radix-2 stage) per receive channel; all lanes run in lock step on the same
// valid/flush strobes. The 12-bit real IF samples enter the DW-bit lanes
// shifted up by DW - SAMP_W bits, with a zero imaginary part. The lanes
// scale by 1/N; their results are multiplied by 2^GAIN, rounded back to
// SAMP_W bits per real and imaginary part and saturated: the 24-bit complex
// words stored in the transpose memory. With N = 8192 and GAIN = 6 the
// noise of the input keeps about its rms value while a tone gains about
// 19 dB; a tone above 1/16 of full scale saturates.
//
// Interface: a block is 2**LOG2N steps (valid samples or flush steps). The
// outputs of a block (out_valid, out_re/out_im per channel, out_bin the range
// bin in natural numbering, emitted in bit-reversed order) leave during the
// next block or its flush. Latency: N - 1 steps plus about 22 clocks.
// The lane count, FFT size and 12-bit words follow the original design; the
// scaling, GAIN and rounding are this design's choices.
module range_fft #(
  parameter int unsigned NCH    = xfri_pkg::NCH,
  parameter int unsigned SAMP_W = xfri_pkg::SAMP_W,
  parameter int unsigned LOG2N  = xfri_pkg::LOG2_NR,
  parameter int unsigned DW     = xfri_pkg::DW,
  parameter int unsigned TW     = xfri_pkg::TW,
  parameter int unsigned GAIN   = xfri_pkg::RANGE_GAIN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     flush,
  input  logic signed [SAMP_W-1:0] in_samp [NCH],
  output logic                     out_valid,
  output logic [LOG2N-1:0]         out_bin,
  output logic signed [SAMP_W-1:0] out_re  [NCH],
  output logic signed [SAMP_W-1:0] out_im  [NCH]
);
  localparam int unsigned SH = DW - SAMP_W;   // input alignment in the lanes
  localparam int unsigned OS = SH - GAIN;     // output shift

  // Multiply by 2^GAIN, round to SAMP_W bits and saturate.
  function automatic logic signed [SAMP_W-1:0] round_sw(input logic signed [DW-1:0] x);
    logic signed [DW:0] r;
    r = ((DW+1)'(x) + (DW+1)'(1 << (OS - 1))) >>> OS;
    if (r > (DW+1)'((1 << (SAMP_W - 1)) - 1)) return {1'b0, {(SAMP_W-1){1'b1}}};
    if (r < -(DW+1)'(1 << (SAMP_W - 1)))      return {1'b1, {(SAMP_W-1){1'b0}}};
    return r[SAMP_W-1:0];
  endfunction

  logic                 l_valid [NCH];
  logic signed [DW-1:0] l_re    [NCH];
  logic signed [DW-1:0] l_im    [NCH];
  logic [LOG2N-1:0]     l_idx   [NCH];

  for (genvar c = 0; c < int'(NCH); c++) begin : g_lane
    fft_r22sdf #(.LOG2N(LOG2N), .DW(DW), .TW(TW)) u_fft (
      .clk, .rst_n,
      .in_valid (in_valid),
      .flush    (flush),
      .in_re    ({in_samp[c], {SH{1'b0}}}),
      .in_im    ('0),
      .out_valid(l_valid[c]),
      .out_re   (l_re[c]),
      .out_im   (l_im[c]),
      .out_idx  (l_idx[c])
    );
  end

  // The lanes are identical and driven alike: lane 0 gives valid and bin.
  always_comb begin
    out_valid = l_valid[0];
    out_bin   = l_idx[0];
    for (int c = 0; c < int'(NCH); c++) begin
      out_re[c] = round_sw(l_re[c]);
      out_im[c] = round_sw(l_im[c]);
    end
  end
endmodule
