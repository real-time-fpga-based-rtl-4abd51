// xfri_top: FPGA baseband of a four-channel X-band FMCW imaging radar.
//
// The chain turns the IF samples of four receive channels into a list of
// detected targets with range, radial speed and direction:
//
//   adc_if       14-bit ADC words -> 12-bit samples (rounding, saturation)
//   gain_cal     per-channel gain and offset correction
//   ramp_ctrl    ramp trigger, one FFT block per ramp, zero padding, flush
//   range_fft    four 8192-point FFTs, one row of range bins per ramp
//   corner_turn  ping-pong transpose memory (256 ramps x 8192 bins x 4 ch),
//                columns read inside the range region of interest
//   doppler_fft  four 256-point FFTs along the ramps of each range bin
//   azimuth_fft  4-point FFT across the channels of every cell
//   az_power     power of the strongest azimuth bin of the cell
//   bitrev_reorder  Doppler bins back to natural order
//   ca_cfar      cell-averaging CFAR along the Doppler axis -> detections
//   flash_ctrl   read/program/erase of the on-board SPI FLASH, used to keep
//                intermediate results over a power loss; its command port
//                is brought out for the node's control logic
//
// One clock (200 MHz in the original design) runs everything; adc_valid marks
// the clocks carrying an ADC sample (40 MSa/s, one in five clocks). A frame is
// NRAMP ramps; the range FFT works during the ramps, the Doppler/azimuth/CFAR
// part works on the previous frame while the next one is acquired.
//
// The order of the processing steps, the FFT sizes and radices, the 12-bit
// samples and 24-bit transpose words follow the original design (its range-
// Doppler variant with the azimuth FFT last). The transpose memory is an
// on-chip array here where the original uses external SDRAM. The detection
// report format, the CFAR axis and every width not named above are this
// design's choices.
module xfri_top #(
  parameter int unsigned LOG2_NR     = xfri_pkg::LOG2_NR,  // range FFT size
  parameter int unsigned LOG2_NRAMP  = xfri_pkg::LOG2_ND,  // ramps per frame
  parameter int unsigned NSAMP       = 7000,               // samples per ramp
  parameter int unsigned RAMP_PERIOD = 35000,              // clocks per ramp
  parameter int unsigned CFAR_NT     = 8,
  parameter int unsigned CFAR_NG     = 2,
  parameter int unsigned RANGE_GAIN  = xfri_pkg::RANGE_GAIN  // range-FFT output gain, bits
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             enable,
  // ADC
  input  logic                             adc_valid,
  input  logic signed [xfri_pkg::ADC_W-1:0] adc_data [xfri_pkg::NCH],
  output logic [xfri_pkg::NCH-1:0]         adc_clipped,
  // waveform generator
  output logic                             ramp_trig,
  // configuration
  input  logic [15:0]                      cal_gain   [xfri_pkg::NCH],
  input  logic signed [xfri_pkg::SAMP_W-1:0] cal_offset [xfri_pkg::NCH],
  input  logic [LOG2_NR-1:0]               roi_first,
  input  logic [LOG2_NR-1:0]               roi_last,
  input  logic [xfri_pkg::ALPHA_W-1:0]     cfar_alpha,   // CFAR factor, 4 fraction bits
  // detections
  output logic                             det_valid,
  output logic [LOG2_NR-1:0]               det_range,
  output logic [LOG2_NRAMP-1:0]            det_doppler,
  output logic [1:0]                       det_az,
  output logic [2*xfri_pkg::DW-1:0]        det_power,
  output logic [2*xfri_pkg::DW+xfri_pkg::ALPHA_W-5:0] det_thresh,
  // status
  output logic [LOG2_NRAMP-1:0]            ramp_idx,     // ramp being acquired
  output logic                             acq_busy,     // a ramp is being framed
  output logic                             proc_busy,    // a frame is being read and processed
  output logic                             frame_start,
  output logic                             frame_done,
  output logic                             overrun,
  // on-board FLASH: command port (see flash_ctrl) and SPI pins
  input  logic                             flash_cmd_valid,
  output logic                             flash_cmd_ready,
  input  logic [1:0]                       flash_cmd_op,  // 0 read, 1 program, 2 sector erase
  input  logic [23:0]                      flash_cmd_addr,
  input  logic [8:0]                       flash_cmd_len,
  output logic                             flash_done,
  output logic                             flash_busy,
  input  logic                             flash_wr_valid,
  output logic                             flash_wr_ready,
  input  logic [7:0]                       flash_wr_data,
  output logic                             flash_rd_valid,
  output logic [7:0]                       flash_rd_data,
  output logic                             flash_cs_n,
  output logic                             flash_sck,
  output logic                             flash_mosi,
  input  logic                             flash_miso
);
  import xfri_pkg::*;

  // ADC interface and calibration
  logic                     a_valid;
  logic signed [SAMP_W-1:0] a_samp [NCH];
  adc_if u_adc (
    .clk, .rst_n, .adc_valid, .adc_data,
    .samp_valid(a_valid), .samp(a_samp), .clipped(adc_clipped)
  );

  logic                     g_valid;
  logic signed [SAMP_W-1:0] g_samp [NCH];
  gain_cal u_cal (
    .clk, .rst_n, .gain(cal_gain), .offset(cal_offset),
    .in_valid(a_valid), .in_samp(a_samp), .out_valid(g_valid), .out_samp(g_samp)
  );

  // Ramp control and framing
  logic                     f_valid, f_flush;
  logic signed [SAMP_W-1:0] f_samp [NCH];
  ramp_ctrl #(.LOG2NFFT(LOG2_NR), .NSAMP(NSAMP), .LOG2NRAMP(LOG2_NRAMP),
              .RAMP_PERIOD(RAMP_PERIOD)) u_ramp (
    .clk, .rst_n, .enable, .in_valid(g_valid), .in_samp(g_samp),
    .ramp_trig, .frame_start, .ramp_idx,
    .fft_valid(f_valid), .fft_flush(f_flush), .fft_samp(f_samp), .busy(acq_busy)
  );

  // Range FFT
  logic                     rf_valid;
  logic [LOG2_NR-1:0]       rf_bin;
  logic signed [SAMP_W-1:0] rf_re [NCH];
  logic signed [SAMP_W-1:0] rf_im [NCH];
  range_fft #(.LOG2N(LOG2_NR), .GAIN(RANGE_GAIN)) u_rfft (
    .clk, .rst_n, .in_valid(f_valid), .flush(f_flush), .in_samp(f_samp),
    .out_valid(rf_valid), .out_bin(rf_bin), .out_re(rf_re), .out_im(rf_im)
  );

  // Corner turn with region of interest
  logic                     ct_valid, ct_flush, ct_start;
  logic [LOG2_NR-1:0]       ct_base;
  logic signed [SAMP_W-1:0] ct_re [NCH];
  logic signed [SAMP_W-1:0] ct_im [NCH];
  corner_turn #(.LOG2C(LOG2_NR), .LOG2R(LOG2_NRAMP)) u_ct (
    .clk, .rst_n,
    .wr_valid(rf_valid), .wr_bin(rf_bin), .wr_re(rf_re), .wr_im(rf_im),
    .roi_first, .roi_last,
    .rd_valid(ct_valid), .rd_flush(ct_flush), .rd_row(), .rd_col(),
    .rd_re(ct_re), .rd_im(ct_im), .frame_start(ct_start), .col_base(ct_base),
    .frame_done, .overrun, .rd_busy(proc_busy)
  );

  // Doppler FFT
  logic                     df_valid;
  logic [LOG2_NRAMP-1:0]    df_bin;
  logic [LOG2_NR-1:0]       df_col;
  logic signed [DW-1:0]     df_re [NCH];
  logic signed [DW-1:0]     df_im [NCH];
  doppler_fft #(.LOG2N(LOG2_NRAMP), .LOG2C(LOG2_NR)) u_dfft (
    .clk, .rst_n, .frame_start(ct_start), .col_base(ct_base),
    .in_valid(ct_valid), .flush(ct_flush), .in_re(ct_re), .in_im(ct_im),
    .out_valid(df_valid), .out_bin(df_bin), .out_col(df_col), .out_re(df_re), .out_im(df_im)
  );

  // Azimuth FFT across the four channels
  localparam int unsigned TAGW = LOG2_NR + LOG2_NRAMP;
  logic                     az_valid;
  logic [TAGW-1:0]          az_tag;
  logic signed [DW-1:0]     az_re [4];
  logic signed [DW-1:0]     az_im [4];
  azimuth_fft #(.TAGW(TAGW)) u_az (
    .clk, .rst_n, .in_valid(df_valid), .in_tag({df_col, df_bin}),
    .in_re(df_re), .in_im(df_im),
    .out_valid(az_valid), .out_tag(az_tag), .out_re(az_re), .out_im(az_im)
  );

  logic                     pw_valid;
  logic [TAGW-1:0]          pw_tag;
  logic [2*DW-1:0]          pw_power;
  logic [1:0]               pw_az;
  az_power #(.TAGW(TAGW)) u_pw (
    .clk, .rst_n, .in_valid(az_valid), .in_tag(az_tag), .in_re(az_re), .in_im(az_im),
    .out_valid(pw_valid), .out_tag(pw_tag), .out_power(pw_power), .out_az(pw_az)
  );

  // Doppler bins back to natural order; the payload is {range, az, power}.
  localparam int unsigned RW = LOG2_NR + 2 + 2 * DW;
  logic                  ro_valid;
  logic [RW-1:0]         ro_data;
  logic [LOG2_NRAMP-1:0] ro_idx;
  bitrev_reorder #(.LOG2N(LOG2_NRAMP), .W(RW)) u_ro (
    .clk, .rst_n, .in_valid(pw_valid),
    .in_data({pw_tag[TAGW-1 -: LOG2_NR], pw_az, pw_power}),
    .out_valid(ro_valid), .out_data(ro_data), .out_idx(ro_idx)
  );

  // CA-CFAR along the Doppler axis
  logic [LOG2_NR+1:0] det_tag;
  ca_cfar #(.PW(2*DW), .LOG2N(LOG2_NRAMP), .NT(CFAR_NT), .NG(CFAR_NG),
            .TAGW(LOG2_NR + 2)) u_cfar (
    .clk, .rst_n, .alpha(cfar_alpha),
    .in_valid(ro_valid), .in_power(ro_data[2*DW-1:0]), .in_idx(ro_idx),
    .in_tag(ro_data[RW-1 -: LOG2_NR+2]),
    .det_valid, .det_power, .det_idx(det_doppler), .det_tag, .det_thresh
  );
  assign det_range = det_tag[LOG2_NR+1:2];
  assign det_az    = det_tag[1:0];

  // Non-volatile storage of intermediate results
  flash_ctrl u_flash (
    .clk, .rst_n,
    .cmd_valid(flash_cmd_valid), .cmd_ready(flash_cmd_ready), .cmd_op(flash_cmd_op),
    .cmd_addr(flash_cmd_addr), .cmd_len(flash_cmd_len), .done(flash_done), .busy(flash_busy),
    .wr_valid(flash_wr_valid), .wr_ready(flash_wr_ready), .wr_data(flash_wr_data),
    .rd_valid(flash_rd_valid), .rd_data(flash_rd_data),
    .spi_cs_n(flash_cs_n), .spi_sck(flash_sck), .spi_mosi(flash_mosi), .spi_miso(flash_miso)
  );

endmodule
