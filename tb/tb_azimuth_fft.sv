// tb_azimuth_fft: the 4-point FFT across channels against a direct 4-point
// DFT divided by 4 (floor), on random and full-scale inputs, with the tag
// and the one-clock latency.
module tb_azimuth_fft;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               in_valid, out_valid;
  logic [20:0]        in_tag, out_tag;
  logic signed [15:0] in_re [4], in_im [4], out_re [4], out_im [4];

  azimuth_fft #(.DW(16)) dut (.clk, .rst_n, .in_valid, .in_tag, .in_re, .in_im,
                   .out_valid, .out_tag, .out_re, .out_im);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_tag = 0;
    for (int c = 0; c < 4; c++) begin in_re[c] = 0; in_im[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      int er [4], ei [4];
      @(negedge clk);
      in_valid = 1'b1;
      in_tag   = 21'($urandom);
      for (int c = 0; c < 4; c++) begin
        in_re[c] = (n % 7 == 0) ? 16'sh8000 : 16'($urandom);
        in_im[c] = (n % 7 == 0) ? 16'sh7fff : 16'($urandom);
      end
      // X_k = sum_c x_c * (-j)^(k*c)
      for (int k = 0; k < 4; k++) begin
        automatic int sr = 0, si = 0;
        for (int c = 0; c < 4; c++) begin
          automatic int xr = in_re[c], xi = in_im[c];
          case ((k * c) % 4)
            0: begin sr += xr;  si += xi;  end
            1: begin sr += xi;  si -= xr;  end   // -j
            2: begin sr -= xr;  si -= xi;  end
            3: begin sr -= xi;  si += xr;  end   // +j
          endcase
        end
        er[k] = sr >>> 2; ei[k] = si >>> 2;
      end
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_tag != in_tag) begin failures++; $display("FAIL valid/tag"); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(out_re[k]) != er[k] || int'(out_im[k]) != ei[k]) begin
          failures++;
          if (failures < 10) $display("FAIL bin %0d: got (%0d,%0d) expected (%0d,%0d)", k,
                                      out_re[k], out_im[k], er[k], ei[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
