// fft_r22sdf: streaming pipelined FFT, radix-2^2 single-path delay feedback.
//
// Used for the 8192-point range FFT (LOG2N = 13: six radix-4 stages and one
// final radix-2 stage) and for the 256-point Doppler FFT (LOG2N = 8: four
// radix-4 stages). Each radix-4 stage is a pair of SDF butterflies (sdf_bf):
// between the two butterflies the data is rotated by -j where needed (a
// trivial multiplication, no multiplier), and after the pair one complex
// multiplier applies the twiddle W_M^(q*(a+2b)) of the radix-4 decomposition.
// With an odd LOG2N the last butterfly stands alone as the radix-2 stage.
// Every butterfly halves its results, so out = DFT(in) / N.
//
// Interface: one complex sample per clock at most. A block is N consecutive
// steps; in_valid = 1 marks a sample, flush = 1 (with in_valid = 0) a step that
// only pushes data through. Feed whole blocks: the block of N samples starts
// on the first step after reset or after a whole number of blocks. The
// outputs of a block appear with a latency of N - 1 steps (plus about
// 1.5 * LOG2N clocks of registers), so the last block of a burst is pushed out
// by N flush steps. out_idx is the frequency bin of out_re/out_im: the
// pipeline emits bins in bit-reversed order.
//
// The algorithm (radix-4 stages, mixed radix-2/radix-4 for 8192 points) follows
// the original design; the SDF organisation, the 1/2 scaling per butterfly,
// the truncating arithmetic and the flush mechanism are this design's choices.
module fft_r22sdf #(
  parameter int unsigned LOG2N = 13,
  parameter int unsigned DW    = xfri_pkg::DW,
  parameter int unsigned TW    = xfri_pkg::TW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 flush,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [LOG2N-1:0]     out_idx
);
  localparam int unsigned N = 1 << LOG2N;

  // Saturate a value of DW+2 bits to DW bits.
  function automatic logic signed [DW-1:0] sat(input logic signed [DW+1:0] x);
    if (x > (DW+2)'((1 << (DW - 1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (x < -(DW+2)'(1 << (DW - 1)))       return {1'b1, {(DW-1){1'b0}}};
    return x[DW-1:0];
  endfunction

  // Twiddle table, W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N), in Q2.(TW-2).
  // Only exponents below 3N/4 are ever used.
  localparam int unsigned NTAB = (3 * N) / 4;
  logic signed [TW-1:0] cos_rom [NTAB];
  logic signed [TW-1:0] sin_rom [NTAB];
  initial begin
    for (int k = 0; k < int'(NTAB); k++) begin
      cos_rom[k] = TW'($rtoi($floor($cos(6.283185307179586 * real'(k) / real'(N))
                                    * real'(1 << (TW - 2)) + 0.5)));
      sin_rom[k] = TW'($rtoi($floor(-$sin(6.283185307179586 * real'(k) / real'(N))
                                    * real'(1 << (TW - 2)) + 0.5)));
    end
  end

  // Inter-stage signals: index s is the input of butterfly stage s.
  logic                 st_step  [LOG2N+1];
  logic                 st_valid [LOG2N+1];
  logic signed [DW-1:0] st_re    [LOG2N+1];
  logic signed [DW-1:0] st_im    [LOG2N+1];

  assign st_step[0]  = in_valid | flush;
  assign st_valid[0] = in_valid;
  assign st_re[0]    = in_valid ? in_re : '0;
  assign st_im[0]    = in_valid ? in_im : '0;

  for (genvar s = 0; s < int'(LOG2N); s++) begin : g_stage
    localparam int unsigned LOG2D = LOG2N - 1 - s;   // delay of this butterfly
    logic                 b_step, b_valid;
    logic signed [DW-1:0] b_re, b_im;
    logic [LOG2D:0]       b_pos;   // used by the -j rotation only

    sdf_bf #(.DW(DW), .LOG2D(LOG2D)) u_bf (
      .clk, .rst_n,
      .in_step (st_step[s]), .in_valid(st_valid[s]),
      .in_re   (st_re[s]),   .in_im   (st_im[s]),
      .out_step(b_step),     .out_valid(b_valid),
      .out_re  (b_re),       .out_im  (b_im),
      .out_pos (b_pos)
    );

    if ((s % 2 == 0) && (s + 1 < int'(LOG2N))) begin : g_first
      // First butterfly of a radix-4 stage: rotate the last quarter of the
      // block (positions 3Q..4Q-1) by -j: (re, im) -> (im, -re).
      logic rot;
      logic signed [DW+1:0] neg_re;
      always_comb begin
        rot    = b_pos[LOG2D] & b_pos[LOG2D-1];
        neg_re = -(DW+2)'(b_re);
      end
      assign st_step[s+1]  = b_step;
      assign st_valid[s+1] = b_valid;
      assign st_re[s+1]    = rot ? b_im : b_re;
      assign st_im[s+1]    = rot ? sat(neg_re) : b_im;
    end else if ((s % 2 == 1) && (LOG2D >= 1)) begin : g_twiddle
      // Second butterfly of a radix-4 stage with block M = 4Q, Q = 2**LOG2D:
      // multiply by W_M^(q*(a+2b)) = W_N^(q*(a+2b)*N/M).
      localparam int unsigned LOG2M = LOG2D + 2;
      // Position in the 4Q block of the first butterfly, counted on steps.
      logic [LOG2M-1:0] pos;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)      pos <= LOG2M'(1 << LOG2D); // -3Q mod 4Q = Q
        else if (b_step) pos <= pos + 1'b1;
      end
      logic [LOG2D-1:0] q;
      logic [1:0]       ab;
      logic [LOG2N-1:0] tw_idx;
      always_comb begin
        q      = pos[LOG2D-1:0];
        ab     = {pos[LOG2M-2], pos[LOG2M-1]};   // a + 2b, a = MSB, b = next bit
        tw_idx = LOG2N'(LOG2N'(q) * LOG2N'(ab)) << (LOG2N - LOG2M);
      end
      // Twiddle multiply, one register stage.
      logic signed [DW+TW:0] pr, pi;
      logic signed [TW-1:0]  wc, ws;
      always_comb begin
        wc = cos_rom[tw_idx];
        ws = sin_rom[tw_idx];
        pr = (DW+TW+1)'(b_re * wc) - (DW+TW+1)'(b_im * ws) + (DW+TW+1)'(1 << (TW - 3));
        pi = (DW+TW+1)'(b_re * ws) + (DW+TW+1)'(b_im * wc) + (DW+TW+1)'(1 << (TW - 3));
      end
      logic                 m_step, m_valid;
      logic signed [DW-1:0] m_re, m_im;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          m_step <= 1'b0; m_valid <= 1'b0; m_re <= '0; m_im <= '0;
        end else begin
          m_step  <= b_step;
          m_valid <= b_valid & b_step;
          if (b_step) begin
            m_re <= sat((DW+2)'(pr >>> (TW - 2)));
            m_im <= sat((DW+2)'(pi >>> (TW - 2)));
          end
        end
      end
      assign st_step[s+1]  = m_step;
      assign st_valid[s+1] = m_valid;
      assign st_re[s+1]    = m_re;
      assign st_im[s+1]    = m_im;
    end else begin : g_plain
      // Last butterfly (radix-2 stage, or end of the last radix-4 stage whose
      // twiddles are all 1).
      assign st_step[s+1]  = b_step;
      assign st_valid[s+1] = b_valid;
      assign st_re[s+1]    = b_re;
      assign st_im[s+1]    = b_im;
    end
  end

  // Output position: the first output step carries block position 1 (the
  // pipeline holds N - 1 samples), so the counter starts at 1.
  logic [LOG2N-1:0] opos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                opos <= LOG2N'(1);
    else if (st_step[LOG2N])   opos <= opos + 1'b1;
  end

  always_comb begin
    out_valid = st_valid[LOG2N] & st_step[LOG2N];
    out_re    = st_re[LOG2N];
    out_im    = st_im[LOG2N];
    for (int i = 0; i < int'(LOG2N); i++) out_idx[i] = opos[LOG2N-1-i];
  end

endmodule
