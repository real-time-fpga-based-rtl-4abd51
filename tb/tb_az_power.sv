// tb_az_power: power of the strongest azimuth bin and its index against a
// reference computed here, with ties, the tag and the two-clock latency.
module tb_az_power;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               in_valid, out_valid;
  logic [20:0]        in_tag, out_tag;
  logic signed [15:0] in_re [4], in_im [4];
  logic [31:0]        out_power;
  logic [1:0]         out_az;

  az_power #(.DW(16)) dut (.clk, .rst_n, .in_valid, .in_tag, .in_re, .in_im,
                .out_valid, .out_tag, .out_power, .out_az);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint exp_p [$];
  int     exp_k [$];
  int     exp_t [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_p.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      automatic longint p = exp_p.pop_front();
      automatic int k = exp_k.pop_front();
      automatic int t = exp_t.pop_front();
      if (longint'(out_power) != p || int'(out_az) != k || int'(out_tag) != t) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d/%0d expected %0d/%0d", out_power, out_az, p, k);
      end
    end
  end

  initial begin
    in_valid = 0; in_tag = 0;
    for (int c = 0; c < 4; c++) begin in_re[c] = 0; in_im[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_tag = 21'($urandom);
      for (int c = 0; c < 4; c++) begin
        in_re[c] = (n % 5 == 0) ? 16'sh8000 : 16'($signed($urandom_range(2000)) - 1000);
        in_im[c] = (n % 5 == 0) ? 16'sh8000 : 16'($signed($urandom_range(2000)) - 1000);
      end
      if (in_valid) begin
        automatic longint best = -1; automatic int bk = 0;
        for (int c = 0; c < 4; c++) begin
          automatic longint p = longint'(in_re[c]) * in_re[c] + longint'(in_im[c]) * in_im[c];
          if (p > best) begin best = p; bk = c; end
        end
        exp_p.push_back(best); exp_k.push_back(bk); exp_t.push_back(int'(in_tag));
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_p.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_p.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
