// ramp_ctrl: ramp timing and FFT framing of the control module.
//
// The transmitter sweeps its frequency in linear ramps of T_SW = 175 us. For
// every ramp this block pulses ramp_trig (the start of the waveform
// generation in the PLL synthesiser), takes the next NSAMP calibrated
// samples of all channels, and passes them on as one block of the range FFT,
// padded with zeros up to NFFT samples (the 7000 samples of a 175 us ramp at
// 40 MSa/s do not fill the 8192-point FFT). The padding runs at the full
// clock rate. After
// the last of the NRAMP ramps of an observation frame it adds NFFT flush
// steps so that the range FFT delivers the whole frame without waiting for
// the next one. A new ramp starts RAMP_PERIOD clocks after the previous one,
// or as soon as the padding and flushing are done if they take longer.
//
// Ramp trigger, sample framing and zero padding follow the original design;
// the trigger pulse, the counters and the flush at the end of a frame are
// this design's choices. Frames start while enable is high; a frame that
// has begun is completed even if enable falls. ramp_idx numbers the ramp whose samples are being
// framed; frame_start pulses with the trigger of ramp 0.
module ramp_ctrl #(
  parameter int unsigned NCH         = xfri_pkg::NCH,
  parameter int unsigned SAMP_W      = xfri_pkg::SAMP_W,
  parameter int unsigned LOG2NFFT    = xfri_pkg::LOG2_NR,
  parameter int unsigned NSAMP       = 7000,
  parameter int unsigned LOG2NRAMP   = xfri_pkg::LOG2_ND,
  parameter int unsigned RAMP_PERIOD = 35000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,          // start frames while high
  input  logic                     in_valid,
  input  logic signed [SAMP_W-1:0] in_samp [NCH],
  output logic                     ramp_trig,       // start of a frequency ramp
  output logic                     frame_start,     // trigger of the first ramp of a frame
  output logic [LOG2NRAMP-1:0]     ramp_idx,
  output logic                     fft_valid,
  output logic                     fft_flush,
  output logic signed [SAMP_W-1:0] fft_samp [NCH],
  output logic                     busy             // a ramp is being framed
);
  localparam int unsigned NFFT  = 1 << LOG2NFFT;
  localparam int unsigned NRAMP = 1 << LOG2NRAMP;
  localparam int unsigned TMW   = $clog2(RAMP_PERIOD + 1);

  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_PAD, S_FLUSH, S_WAIT} state_t;
  state_t state;

  logic [LOG2NFFT:0] cnt;      // samples of the current block / flush steps
  logic [TMW-1:0]    timer;    // clocks since the last trigger

  logic period_done;
  assign period_done = (timer >= TMW'(RAMP_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      timer       <= '0;
      ramp_idx    <= '0;
      ramp_trig   <= 1'b0;
      frame_start <= 1'b0;
      fft_valid   <= 1'b0;
      fft_flush   <= 1'b0;
      for (int c = 0; c < int'(NCH); c++) fft_samp[c] <= '0;
    end else begin
      ramp_trig   <= 1'b0;
      frame_start <= 1'b0;
      fft_valid   <= 1'b0;
      fft_flush   <= 1'b0;
      if (timer != TMW'(RAMP_PERIOD)) timer <= timer + 1'b1;
      unique case (state)
        S_IDLE, S_WAIT: begin
          // A frame in progress is always completed; new frames need enable.
          if ((state == S_IDLE && enable) ||
              (state == S_WAIT && period_done && (enable || ramp_idx != '0))) begin
            state       <= S_ACQ;
            cnt         <= '0;
            timer       <= '0;
            ramp_trig   <= 1'b1;
            frame_start <= (ramp_idx == '0);
          end else if (!enable && state == S_WAIT && ramp_idx == '0) begin
            state <= S_IDLE;
          end
        end
        S_ACQ: begin
          if (in_valid) begin
            fft_valid <= 1'b1;
            for (int c = 0; c < int'(NCH); c++) fft_samp[c] <= in_samp[c];
            cnt <= cnt + 1'b1;
            if (cnt == (LOG2NFFT+1)'(NSAMP - 1)) state <= S_PAD;
          end
        end
        S_PAD: begin
          fft_valid <= 1'b1;
          for (int c = 0; c < int'(NCH); c++) fft_samp[c] <= '0;
          cnt <= cnt + 1'b1;
          if (cnt == (LOG2NFFT+1)'(NFFT - 1)) begin
            cnt <= '0;
            if (ramp_idx == LOG2NRAMP'(NRAMP - 1)) state <= S_FLUSH;
            else begin
              state    <= S_WAIT;
              ramp_idx <= ramp_idx + 1'b1;
            end
          end
        end
        S_FLUSH: begin
          fft_flush <= 1'b1;
          cnt <= cnt + 1'b1;
          if (cnt == (LOG2NFFT+1)'(NFFT - 1)) begin
            state    <= S_WAIT;
            ramp_idx <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_ACQ) || (state == S_PAD) || (state == S_FLUSH);

  // The padding must leave room: a ramp has at most NFFT useful samples.
  initial assert (NSAMP >= 1 && NSAMP <= NFFT) else $error("NSAMP out of range");
endmodule
