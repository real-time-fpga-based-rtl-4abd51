// bitrev_reorder: puts the bit-reversed output blocks of a pipelined FFT back
// into natural order.
//
// Two banks of N = 2**LOG2N words. Block b is written into bank b mod 2 at
// the bit-reversed position of its arrival index; once a block is complete
// its bank is read out in natural order, one word per clock, while the next
// block fills the other bank. The reader is never slower than the writer (at
// most one word per clock), so a bank is always empty again before the
// writer returns to it. out_idx is the natural index of the word (the FFT
// bin). Words carry any payload of W bits.
//
// Timing: a word leaves between N + 1 and 2N clocks after it entered. The
// ping-pong organisation and the widths are this design's choices.
module bitrev_reorder #(
  parameter int unsigned LOG2N = xfri_pkg::LOG2_ND,
  parameter int unsigned W     = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W-1:0]     in_data,
  output logic             out_valid,
  output logic [W-1:0]     out_data,
  output logic [LOG2N-1:0] out_idx
);
  logic [W-1:0] mem [2 << LOG2N];

  logic             wbank, rbank;
  logic [LOG2N-1:0] wcnt, rcnt, wrev;
  logic [1:0]       full;         // bank holds a complete block not yet read
  logic             reading;

  always_comb
    for (int i = 0; i < int'(LOG2N); i++) wrev[i] = wcnt[LOG2N-1-i];

  always_ff @(posedge clk)
    if (in_valid) mem[{wbank, wrev}] <= in_data;

  always_ff @(posedge clk)
    if (reading) out_data <= mem[{rbank, rcnt}];

  assign reading = full[rbank];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wcnt      <= '0;
      rcnt      <= '0;
      full      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= reading;
      out_idx   <= rcnt;
      if (reading) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == '1) begin
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
        end
      end
      if (in_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == '1) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end
      end
    end
  end

  // The writer never fills a bank that is still waiting to be read.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && wcnt == '0) |-> !full[wbank])
    else $error("bitrev_reorder overflow");
endmodule
