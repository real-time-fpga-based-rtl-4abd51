// tb_gain_cal: checks the per-channel gain/offset correction against
// round(((x - offset) * gain) / 2^14) with saturation to 12 bits, for random
// samples, gains between 0 and 4 and offsets of +-64 LSB.
module tb_gain_cal;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0]        gain [4];
  logic signed [11:0] offset [4];
  logic               in_valid, out_valid;
  logic signed [11:0] in_samp [4];
  logic signed [11:0] out_samp [4];

  gain_cal dut (.clk, .rst_n, .gain, .offset, .in_valid, .in_samp, .out_valid, .out_samp);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nsat = 0;
  initial begin
    in_valid = 0;
    for (int c = 0; c < 4; c++) begin gain[c] = 16'd16384; offset[c] = '0; in_samp[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      int expv [4];
      @(negedge clk);
      if (n % 100 == 0)
        for (int c = 0; c < 4; c++) begin
          gain[c]   = 16'($urandom_range(65535));
          offset[c] = 12'($signed($urandom_range(128)) - 64);
        end
      in_valid = ($urandom_range(1) == 0);
      for (int c = 0; c < 4; c++) begin
        longint p;
        in_samp[c] = 12'($urandom);
        p = longint'(int'(in_samp[c]) - int'(offset[c])) * longint'(gain[c]);
        p = (p + 8192) >>> 14;
        if (p > 2047) begin p = 2047; nsat++; end
        if (p < -2048) begin p = -2048; nsat++; end
        expv[c] = int'(p);
      end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("FAIL valid"); end
      if (in_valid)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (int'(out_samp[c]) != expv[c]) begin
            failures++;
            if (failures < 10) $display("FAIL ch%0d: got %0d expected %0d", c, out_samp[c], expv[c]);
          end
        end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
