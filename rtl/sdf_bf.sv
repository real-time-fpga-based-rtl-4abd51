// sdf_bf: one radix-2 butterfly stage of a single-path delay-feedback (SDF)
// pipeline FFT, decimation in frequency.
//
// The stage holds a delay line of D = 2**LOG2D complex words. During the first
// half of each 2*D-step block the input is written into the delay line and the
// differences stored during the previous block leave the stage; during the
// second half the stage adds the delayed sample to the input (the sum leaves
// at once) and stores the difference. Sums and differences are halved, so the
// complete FFT is scaled by 1/N and cannot overflow.
//
// The stage advances only on in_step. A step is either a real sample
// (in_valid = 1) or a flush step (in_valid = 0, data ignored) used to push the
// last block out of the pipeline. A valid flag travels through a parallel delay
// line so out_valid marks the outputs that belong to real input samples.
// out_pos is the position of the output sample inside its 2*D block. The
// outputs are registered: one clock of latency plus D steps.
module sdf_bf #(
  parameter int unsigned DW    = 16,
  parameter int unsigned LOG2D = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_step,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_step,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im,
  output logic [LOG2D:0]       out_pos
);
  localparam int unsigned D  = 1 << LOG2D;
  localparam int unsigned PW = (LOG2D > 0) ? LOG2D : 1;

  logic signed [DW-1:0] dl_re [D];
  logic signed [DW-1:0] dl_im [D];
  logic                 dl_v  [D];

  logic [LOG2D:0] cnt;
  logic           primed;   // the delay line has been filled once since reset
  logic [PW-1:0]  ptr;
  logic           second_half;

  always_comb begin
    ptr         = PW'(cnt) & PW'(D - 1);
    second_half = cnt[LOG2D];
  end

  logic signed [DW:0] sum_re, sum_im, dif_re, dif_im;
  always_comb begin
    sum_re = (DW+1)'(dl_re[ptr]) + (DW+1)'(in_re);
    sum_im = (DW+1)'(dl_im[ptr]) + (DW+1)'(in_im);
    dif_re = (DW+1)'(dl_re[ptr]) - (DW+1)'(in_re);
    dif_im = (DW+1)'(dl_im[ptr]) - (DW+1)'(in_im);
  end

  // Delay lines: no reset, every word is written before it is read back.
  always_ff @(posedge clk) begin
    if (in_step) begin
      dl_v[ptr] <= in_valid;
      if (second_half) begin
        dl_re[ptr] <= dif_re[DW:1];
        dl_im[ptr] <= dif_im[DW:1];
      end else begin
        dl_re[ptr] <= in_re;
        dl_im[ptr] <= in_im;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_step  <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_pos   <= '0;
    end else begin
      out_step  <= in_step;
      out_valid <= 1'b0;
      if (in_step) begin
        cnt       <= cnt + 1'b1;
        primed    <= primed | second_half;
        // The sample leaving now entered the stage D steps ago.
        out_valid <= dl_v[ptr] & (primed | second_half);
        out_pos   <= cnt ^ (LOG2D+1)'(D);
        if (second_half) begin
          out_re <= sum_re[DW:1];
          out_im <= sum_im[DW:1];
        end else begin
          out_re <= dl_re[ptr];
          out_im <= dl_im[ptr];
        end
      end
    end
  end

endmodule
