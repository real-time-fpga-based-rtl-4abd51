// tb_bitrev_reorder: blocks of 16 words written in bit-reversed order, with
// random idle cycles, must come out in natural order with the right index.
module tb_bitrev_reorder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, out_valid;
  logic [31:0] in_data, out_data;
  logic [3:0]  out_idx;

  bitrev_reorder #(.LOG2N(4), .W(32)) dut (.clk, .rst_n, .in_valid, .in_data,
                                           .out_valid, .out_data, .out_idx);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nout = 0;
  // Word of block b at natural index k is {b, k}.
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_data != {16'(nout / 16), 16'(nout % 16)} || int'(out_idx) != nout % 16) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d: data %h idx %0d", nout, out_data, out_idx);
    end
    nout++;
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 20; b++)
      for (int i = 0; i < 16; i++) begin
        automatic int k = {i[0], i[1], i[2], i[3]};
        @(negedge clk);
        while (b >= 10 && $urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = {16'(b), 16'(k)};
      end
    @(negedge clk); in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (nout != 320) begin failures++; $display("FAIL %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
