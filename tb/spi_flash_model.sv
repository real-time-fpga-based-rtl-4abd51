// spi_flash_model: behavioural model of a small serial NOR FLASH, for
// testbenches only (not synthesizable).
//
// SPI mode 0, MSB first: input bits are taken on the rising edge of sck, the
// output bit changes on the falling edge. Commands: 06h write enable,
// 05h read status (bit 0 busy, bit 1 write enable latch, repeated while
// chip select stays low), 03h read (24-bit address, any length, address
// increments), 02h page program (24-bit address, bytes wrap inside the
// 256-byte page, bits can only be cleared), 20h sector erase (4 KiB to FFh).
// A program or erase is carried out when chip select rises, only with the
// write enable latch set; the part is then busy for PROG_T or ERASE_T time
// units, during which every command but read status is ignored and counted
// in n_ignored. The memory holds 2^AW bytes and starts erased.
module spi_flash_model #(
  parameter int  AW      = 16,
  parameter time PROG_T  = 3000,
  parameter time ERASE_T = 9000
) (
  input  logic cs_n,
  input  logic sck,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [1 << AW];
  logic [7:0] in_sh, out_sh, next_out, opcode;
  logic [7:0] page_buf [256];
  bit   page_hit [256];
  logic [23:0] addr;
  int   bitc, bytec;
  bit   load_pending, wel, wip;
  int   n_prog = 0, n_erase = 0, n_read = 0, n_ignored = 0;

  initial begin
    wel = 0; wip = 0; opcode = 8'h00; bitc = 0; bytec = 0; out_sh = 8'h00; load_pending = 0;
    for (int i = 0; i < (1 << AW); i++) mem[i] = 8'hFF;
  end

  assign miso = out_sh[7];

  always @(negedge cs_n) begin
    bitc = 0; bytec = 0; out_sh = 8'h00; load_pending = 0;
    for (int i = 0; i < 256; i++) page_hit[i] = 0;
  end

  always @(posedge sck) if (!cs_n) begin
    in_sh = {in_sh[6:0], mosi};
    bitc++;
    if (bitc == 8) begin
      bitc = 0;
      take_byte(in_sh);
      bytec++;
    end
  end

  always @(negedge sck) if (!cs_n) begin
    if (load_pending) begin out_sh = next_out; load_pending = 0; end
    else out_sh = {out_sh[6:0], 1'b0};
  end

  task automatic take_byte(input logic [7:0] b);
    if (bytec == 0) begin
      opcode = b;
      if (wip && b != 8'h05) n_ignored++;
      else if (b == 8'h06) wel = 1;
      if (b == 8'h05) begin next_out = {6'b0, wel, wip}; load_pending = 1; end
    end else if (opcode == 8'h05) begin
      next_out = {6'b0, wel, wip}; load_pending = 1;
    end else if (bytec <= 3) begin
      addr = {addr[15:0], b};
      if (bytec == 3 && opcode == 8'h03 && !wip) begin
        n_read++;
        next_out = mem[addr[AW-1:0]]; load_pending = 1;
      end
    end else if (opcode == 8'h03 && !wip) begin
      addr = addr + 1'b1;
      next_out = mem[addr[AW-1:0]]; load_pending = 1;
    end else if (opcode == 8'h02) begin
      page_buf[8'(addr[7:0] + 8'(bytec - 4))] = b;
      page_hit[8'(addr[7:0] + 8'(bytec - 4))] = 1;
    end
  endtask

  always @(posedge cs_n) begin
    if (!wip && wel && bitc == 0) begin
      if (opcode == 8'h02 && bytec > 4) begin
        for (int i = 0; i < 256; i++)
          if (page_hit[i]) mem[{addr[AW-1:8], 8'(i)}] &= page_buf[i];
        n_prog++; wel = 0; wip = 1;
        fork begin #(PROG_T) wip = 0; end join_none
      end else if (opcode == 8'h20 && bytec == 4) begin
        for (int i = 0; i < 4096; i++) mem[{addr[AW-1:12], 12'(i)}] = 8'hFF;
        n_erase++; wel = 0; wip = 1;
        fork begin #(ERASE_T) wip = 0; end join_none
      end
    end
  end
endmodule
