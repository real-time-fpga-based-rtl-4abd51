// tb_adc_if: checks the 14 -> 12 bit reduction of the ADC interface.
// Random and extreme 14-bit words on four channels with random gaps; every
// output is compared with round-half-up and saturation computed here, and
// the one-clock latency and the clip flags are checked.
module tb_adc_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              adc_valid;
  logic signed [13:0] adc_data [4];
  logic              samp_valid;
  logic signed [11:0] samp [4];
  logic [3:0]        clipped;

  adc_if dut (.clk, .rst_n, .adc_valid, .adc_data, .samp_valid, .samp, .clipped);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int exp_v [4];
  bit exp_c [4];
  int nclip = 0;
  initial begin
    adc_valid = 0;
    for (int c = 0; c < 4; c++) adc_data[c] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      adc_valid = ($urandom_range(4) == 0) || (n < 10);
      for (int c = 0; c < 4; c++) begin
        int v;
        case ($urandom_range(5))
          0: v = 8191; 1: v = -8192; 2: v = 8189 + $urandom_range(2);
          default: v = $signed($urandom_range(16383)) - 8192;
        endcase
        adc_data[c] = 14'(v);
        // reference: floor((v + 2) / 4), saturated to 12 bits
        exp_v[c] = (v + 2) >>> 2;
        exp_c[c] = (exp_v[c] > 2047);
        if (exp_v[c] > 2047) exp_v[c] = 2047;
      end
      @(posedge clk); #1;
      checks++;
      if (samp_valid !== adc_valid) begin failures++; $display("FAIL valid"); end
      if (adc_valid) begin
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(samp[c]) != exp_v[c] || clipped[c] != exp_c[c]) begin
            failures++;
            $display("FAIL ch%0d in %0d: got %0d/%0b expected %0d/%0b", c, adc_data[c],
                     samp[c], clipped[c], exp_v[c], exp_c[c]);
          end
          if (exp_c[c]) nclip++;
        end
      end
    end
    checks++;
    if (nclip == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
