// tb_flash_ctrl: test of the SPI FLASH read/program/erase unit against the
// behavioural serial NOR FLASH model.
//
// Sequence: read an erased area; program 40 bytes in the middle of a page and
// read back a window around them (erased bytes on both sides); program a few
// bytes in the second sector, erase the first sector and check that only the
// first was erased. Every read byte is compared with a byte array the
// testbench keeps itself. Also checked: each command ends with done, the
// program handshake took exactly cmd_len bytes, no command reached the FLASH
// while it was still busy (the controller must poll the status), the number of
// SPI clock pulses of a read is 8 * (4 + length), the SPI clock high time is
// DIV clocks, and cmd_ready stays low while a command runs.
module tb_flash_ctrl;
  localparam int DIV = 2, GAP = 4, AW = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cmd_valid, cmd_ready, done, busy, wr_valid, wr_ready, rd_valid;
  logic [1:0]  cmd_op;
  logic [23:0] cmd_addr;
  logic [8:0]  cmd_len;
  logic [7:0]  wr_data, rd_data;
  logic        spi_cs_n, spi_sck, spi_mosi, spi_miso;

  flash_ctrl #(.DIV(DIV), .GAP(GAP)) dut (.*);
  spi_flash_model #(.AW(AW), .PROG_T(3000), .ERASE_T(9000)) u_mem (
    .cs_n(spi_cs_n), .sck(spi_sck), .mosi(spi_mosi), .miso(spi_miso));

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] ref_mem [1 << AW];
  logic [7:0] src [256];
  logic [7:0] got [256];
  int n_rd, n_wr, n_rise, hi_len;

  // Monitors: read bytes, program handshakes, SPI clock pulses and high time.
  always @(posedge clk) begin
    if (rd_valid) begin got[n_rd] = rd_data; n_rd++; end
    if (wr_valid && wr_ready) n_wr++;
    if (busy && cmd_ready) begin failures++; $display("FAIL cmd_ready while busy"); end
  end
  always @(posedge clk) begin
    if (!rst_n) hi_len = 0;
    else if (spi_sck) hi_len++;
    else if (hi_len != 0) begin
      checks++;
      if (hi_len != DIV) begin failures++; $display("FAIL sck high for %0d clocks", hi_len); end
      hi_len = 0;
    end
  end
  always @(posedge spi_sck) n_rise++;

  task automatic run(input logic [1:0] op, input int addr, input int len);
    int t;
    n_rd = 0; n_wr = 0; n_rise = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = 24'(addr); cmd_len = 9'(len);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 0;
    t = 0;
    while (!done && t < 200000) begin
      @(negedge clk);
      wr_data = src[n_wr];     // next byte on offer
      wr_valid = ($urandom_range(3) != 0) && n_wr < len;
      t++;
    end
    wr_valid = 0;
    checks++;
    if (!done) begin failures++; $display("FAIL op %0d did not finish", op); end
    if (op == 2'd1) begin
      checks++;
      if (n_wr != len) begin failures++; $display("FAIL %0d program bytes taken, %0d expected", n_wr, len); end
      checks++;
      if (u_mem.wip) begin failures++; $display("FAIL program reported done while the FLASH is busy"); end
      for (int i = 0; i < len; i++) ref_mem[(addr & ~255) | ((addr + i) & 255)] &= src[i];
    end
    if (op == 2'd2) begin
      checks++;
      if (u_mem.wip) begin failures++; $display("FAIL erase reported done while the FLASH is busy"); end
      for (int i = 0; i < 4096; i++) ref_mem[(addr & ~4095) + i] = 8'hFF;
    end
    if (op == 2'd0) begin
      checks++;
      if (n_rd != len) begin failures++; $display("FAIL %0d bytes read, %0d expected", n_rd, len); end
      checks++;
      if (n_rise != 8 * (4 + len)) begin failures++; $display("FAIL %0d SPI clocks for a read of %0d", n_rise, len); end
      for (int i = 0; i < len; i++) begin
        checks++;
        if (got[i] !== ref_mem[(addr + i) % (1 << AW)]) begin
          failures++;
          $display("FAIL read %0h: got %02h expected %02h", addr + i, got[i], ref_mem[(addr + i) % (1 << AW)]);
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << AW); i++) ref_mem[i] = 8'hFF;
    cmd_valid = 0; cmd_op = 0; cmd_addr = 0; cmd_len = 0; wr_valid = 0; wr_data = 0;
    hi_len = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    run(2'd0, 'h0100, 16);                                      // erased
    for (int i = 0; i < 256; i++) src[i] = 8'($urandom);
    run(2'd1, 'h0110, 40);                                      // program
    run(2'd0, 'h0100, 64);                                      // read back
    for (int i = 0; i < 256; i++) src[i] = 8'($urandom);
    run(2'd1, 'h1000, 4);                                       // second sector
    run(2'd2, 'h0123, 1);                                       // erase first sector
    run(2'd0, 'h0110, 8);
    run(2'd0, 'h0FFC, 8);                                       // across both sectors
    for (int i = 0; i < 256; i++) src[i] = 8'($urandom);
    run(2'd1, 'h01F8, 16);                                      // wraps inside its page
    run(2'd0, 'h0100, 256);
    checks++;
    if (u_mem.n_ignored != 0) begin
      failures++; $display("FAIL %0d commands sent while the FLASH was busy", u_mem.n_ignored);
    end
    checks++;
    if (u_mem.n_prog != 3 || u_mem.n_erase != 1) begin
      failures++; $display("FAIL FLASH saw %0d programs, %0d erases", u_mem.n_prog, u_mem.n_erase);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
