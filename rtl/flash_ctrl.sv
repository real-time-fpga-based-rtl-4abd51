// flash_ctrl: read, program and erase unit for an on-board SPI NOR FLASH.
//
// The radar node keeps selected intermediate results (calibration values, a
// region of interest, a detection list) in a non-volatile FLASH so that it
// can reload them after a power loss. This block turns one command into the
// SPI byte sequence of a standard serial NOR FLASH and moves the data bytes:
//   OP_READ  : READ (03h) + 24-bit address, then cmd_len bytes out on rd_data;
//   OP_PROG  : WRITE ENABLE (06h), PAGE PROGRAM (02h) + address, cmd_len bytes
//              taken from wr_data, then READ STATUS (05h) until the busy bit
//              (bit 0) clears;
//   OP_ERASE : WRITE ENABLE, SECTOR ERASE (20h) + address, then the same
//              status polling.
// A byte engine shifts 8 bits per byte in SPI mode 0, MSB first: spi_mosi
// changes while spi_sck is low and spi_miso is sampled on the rising edge.
// spi_sck runs at clk / (2 * DIV). Between two commands chip select stays
// high for GAP clocks.
//
// Interface: a command is accepted when cmd_valid and cmd_ready are both
// high; done pulses for one clock when it has completed (for a program or
// erase: when the FLASH reports it is no longer busy). Program data follow a
// valid/ready handshake, one byte per transfer; read data appear on rd_data
// with a one-clock rd_valid pulse per byte. cmd_len is the byte count, 1 to
// 256; a program must not cross a 256-byte page (the FLASH would wrap).
// A byte takes 16 * DIV clocks on the SPI.
//
// The existence of a FLASH read/write unit in the control logic follows the
// original design; the SPI bus, the command set, the polling and this
// interface are this design's choices, as the FLASH device is not specified.
module flash_ctrl #(
  parameter int unsigned DIV = 2,     // spi_sck half period, in clocks
  parameter int unsigned GAP = 8      // chip-select high time between commands
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [1:0]  cmd_op,       // flash_op_e
  input  logic [23:0] cmd_addr,
  input  logic [8:0]  cmd_len,      // bytes, 1..256
  output logic        done,
  output logic        busy,
  // program data
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [7:0]  wr_data,
  // read data
  output logic        rd_valid,
  output logic [7:0]  rd_data,
  // SPI FLASH pins
  output logic        spi_cs_n,
  output logic        spi_sck,
  output logic        spi_mosi,
  input  logic        spi_miso
);
  typedef enum logic [1:0] { OP_READ = 2'd0, OP_PROG = 2'd1, OP_ERASE = 2'd2 } flash_op_e;
  typedef enum logic [2:0] { S_IDLE, S_WREN, S_HDR, S_DATA, S_POLL, S_GAP, S_DONE } state_e;

  localparam int unsigned DCW = $clog2(DIV + 1);
  localparam int unsigned GW  = $clog2(GAP + 1);

  // ---------------------------------------------------------------- byte engine
  logic           bx_start, bx_act, bx_done;
  logic [7:0]     bx_tx, sh_tx, sh_rx;
  logic [2:0]     bitn;
  logic [DCW-1:0] dcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx_act <= 1'b0; bx_done <= 1'b0; sh_tx <= '0; sh_rx <= '0; bitn <= '0; dcnt <= '0;
      spi_sck <= 1'b0;
    end else begin
      bx_done <= 1'b0;
      if (bx_start) begin
        bx_act <= 1'b1; sh_tx <= bx_tx; bitn <= '0; dcnt <= '0; spi_sck <= 1'b0;
      end else if (bx_act) begin
        if (dcnt == DCW'(DIV - 1)) begin
          dcnt <= '0;
          if (!spi_sck) begin
            spi_sck <= 1'b1;
            sh_rx   <= {sh_rx[6:0], spi_miso};
          end else begin
            spi_sck <= 1'b0;
            sh_tx   <= {sh_tx[6:0], 1'b0};
            bitn    <= bitn + 1'b1;
            if (bitn == 3'd7) begin
              bx_act  <= 1'b0;
              bx_done <= 1'b1;
            end
          end
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end
  assign spi_mosi = sh_tx[7];

  // ---------------------------------------------------------------- sequencer
  state_e    state, after_gap;
  flash_op_e op;
  logic [23:0] addr;
  logic [8:0]  len, cnt;
  logic [1:0]  hcnt;          // header byte: opcode, A23..16, A15..8, A7..0
  logic        wait_x;        // a byte is on the wire
  logic [GW-1:0] gcnt;

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign wr_ready  = (state == S_DATA) && (op == OP_PROG) && !wait_x;

  always_comb begin
    bx_start = 1'b0;
    bx_tx    = 8'h00;
    if (!wait_x) begin
      unique case (state)
        S_WREN: begin bx_start = 1'b1; bx_tx = 8'h06; end
        S_HDR: begin
          bx_start = 1'b1;
          unique case (hcnt)
            2'd0:    bx_tx = (op == OP_READ) ? 8'h03 : (op == OP_PROG) ? 8'h02 : 8'h20;
            2'd1:    bx_tx = addr[23:16];
            2'd2:    bx_tx = addr[15:8];
            default: bx_tx = addr[7:0];
          endcase
        end
        S_DATA: begin
          bx_start = (op == OP_READ) || wr_valid;
          bx_tx    = (op == OP_READ) ? 8'h00 : wr_data;
        end
        S_POLL: begin bx_start = 1'b1; bx_tx = (cnt == '0) ? 8'h05 : 8'h00; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; after_gap <= S_IDLE; op <= OP_READ; addr <= '0; len <= '0; cnt <= '0;
      hcnt <= '0; wait_x <= 1'b0; gcnt <= '0; spi_cs_n <= 1'b1; done <= 1'b0;
      rd_valid <= 1'b0; rd_data <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= 1'b0;
      if (bx_start) begin
        wait_x   <= 1'b1;
        spi_cs_n <= 1'b0;
      end
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op   <= flash_op_e'(cmd_op);
          addr <= cmd_addr;
          len  <= cmd_len;
          cnt  <= '0;
          hcnt <= '0;
          state <= (flash_op_e'(cmd_op) == OP_READ) ? S_HDR : S_WREN;
        end
        S_WREN: if (bx_done) begin
          wait_x <= 1'b0; spi_cs_n <= 1'b1; gcnt <= '0;
          state <= S_GAP; after_gap <= S_HDR;
        end
        S_HDR: if (bx_done) begin
          wait_x <= 1'b0;
          hcnt   <= hcnt + 1'b1;
          if (hcnt == 2'd3) begin
            if (op == OP_ERASE) begin
              spi_cs_n <= 1'b1; gcnt <= '0; state <= S_GAP; after_gap <= S_POLL;
            end else state <= S_DATA;
          end
        end
        S_DATA: if (bx_done) begin
          wait_x <= 1'b0;
          cnt    <= cnt + 1'b1;
          if (op == OP_READ) begin rd_valid <= 1'b1; rd_data <= sh_rx; end
          if (cnt == len - 1'b1) begin
            spi_cs_n <= 1'b1; gcnt <= '0; cnt <= '0;
            state <= S_GAP; after_gap <= (op == OP_READ) ? S_DONE : S_POLL;
          end
        end
        S_POLL: if (bx_done) begin
          wait_x <= 1'b0;
          cnt    <= 9'd1;
          // status byte received (not the opcode slot) with the busy bit clear
          if (cnt != '0 && !sh_rx[0]) begin
            spi_cs_n <= 1'b1; gcnt <= '0; state <= S_GAP; after_gap <= S_DONE;
          end
        end
        S_GAP: begin
          gcnt <= gcnt + 1'b1;
          if (gcnt == GW'(GAP - 1)) begin
            state <= after_gap;
            cnt   <= '0;
          end
        end
        S_DONE: begin done <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (DIV >= 1 && GAP >= 1) else $error("DIV and GAP must be at least 1");
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
                          cmd_valid && cmd_ready |-> cmd_len >= 9'd1 && cmd_len <= 9'd256);
endmodule
