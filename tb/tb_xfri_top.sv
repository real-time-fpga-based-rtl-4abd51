// tb_xfri_top: end-to-end test of the radar chain at reduced size
// (64-point range FFT with an output gain of 2^3, 16 ramps per frame,
// 56 samples per ramp, CFAR with 2 training and 1 guard cell per side).
//
// The testbench plays the ADC: for every ramp it produces the IF signal of
// point targets, x_c(n, m) = sum A * cos(2*pi*(r*n/64 + d*m/16 + a*c/4)),
// n the sample in the ramp, m the ramp, c the channel: a beat frequency at
// range bin r, a phase step d/16 per ramp (speed) and a phase step a/4 per
// channel (direction). Each channel is attenuated by its own factor and the
// gain calibration is programmed to undo it. Three frames are acquired:
//   frame 0: two targets inside the region of interest,
//   frame 1: a narrower region that excludes one of two targets; the one in
//            it is slow (Doppler bin 14 of 16) and so lies at the edge of the
//            CFAR's Doppler column,
//   frame 2: a target strong enough to clip the ADC.
// Checked per frame: each target in the region is detected in exactly its
// (range, Doppler, azimuth) cell, with the power predicted from the signal
// amplitude (frames 0 and 1, within 15 %); no detection lies outside the
// region of interest; every other detection is a range sidelobe or the
// mirror image of a target (same or negated Doppler and azimuth bins) or, in
// the clipped frame, an odd harmonic of the target (Doppler and azimuth bins
// times +-3 or +-5), at most two per frame being unexplained.
// The test also counts that every mechanism happened: ramp triggers, zero
// padding, range-FFT flush, frame hand-over of the ping-pong memory (both
// banks), region-of-interest skipping, Doppler flush, ADC clipping and CFAR
// detections, FLASH program and read, and checks the ramp period. After the
// first frame the range bins of its first eight detections are programmed
// into a FLASH model through the FLASH port and read back.
module tb_xfri_top;
  localparam int LOG2_NR = 6, NR = 64, LOG2_NRAMP = 4, NRAMP = 16, NSAMP = 56, PER = 300;
  localparam int NFRAMES = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               enable, adc_valid;
  logic signed [13:0] adc_data [4];
  logic [3:0]         adc_clipped;
  logic               ramp_trig;
  logic [15:0]        cal_gain [4];
  logic signed [11:0] cal_offset [4];
  logic [LOG2_NR-1:0] roi_first, roi_last;
  logic [11:0]        cfar_alpha;
  logic               det_valid;
  logic [LOG2_NR-1:0] det_range;
  logic [LOG2_NRAMP-1:0] det_doppler;
  logic [1:0]         det_az;
  logic [47:0]        det_power;
  logic [55:0]        det_thresh;
  logic [LOG2_NRAMP-1:0] ramp_idx;
  logic               acq_busy, proc_busy, frame_start, frame_done, overrun;
  logic               flash_cmd_valid, flash_cmd_ready, flash_done, flash_busy;
  logic [1:0]         flash_cmd_op;
  logic [23:0]        flash_cmd_addr;
  logic [8:0]         flash_cmd_len;
  logic               flash_wr_valid, flash_wr_ready, flash_rd_valid;
  logic [7:0]         flash_wr_data, flash_rd_data;
  logic               flash_cs_n, flash_sck, flash_mosi, flash_miso;

  xfri_top #(.LOG2_NR(LOG2_NR), .LOG2_NRAMP(LOG2_NRAMP), .NSAMP(NSAMP), .RAMP_PERIOD(PER),
             .CFAR_NT(2), .CFAR_NG(1), .RANGE_GAIN(3)) dut (.*);
  spi_flash_model #(.AW(12)) u_flash_mem (.cs_n(flash_cs_n), .sck(flash_sck), .mosi(flash_mosi),
                                          .miso(flash_miso));

  // FLASH: after the first frame, its first eight detections (range bins,
  // low bytes) are programmed into the FLASH and read back.
  logic [7:0] rec [8], back [8];
  int n_rec = 0, n_back = 0, n_fprog = 0, n_fread = 0;
  always @(posedge clk) begin
    if (det_valid && n_rec < 8) begin rec[n_rec] = det_range[7:0]; n_rec++; end
    if (flash_wr_valid && flash_wr_ready) flash_wr_data <= rec[n_fprog + 1 < 8 ? n_fprog + 1 : 7];
    if (flash_wr_valid && flash_wr_ready) n_fprog++;
    if (rst_n && flash_rd_valid) begin back[n_back] = flash_rd_data; n_back++; n_fread++; end
  end
  initial begin
    flash_cmd_valid = 0; flash_cmd_op = 0; flash_cmd_addr = 0; flash_cmd_len = 0;
    flash_wr_valid = 0; flash_wr_data = 0;
    wait (n_done == 1 && n_rec == 8);
    @(negedge clk);
    flash_wr_data = rec[0];
    flash_cmd_valid = 1; flash_cmd_op = 2'd1; flash_cmd_addr = 24'h000100; flash_cmd_len = 9'd8;
    @(negedge clk) flash_cmd_valid = 0;
    flash_wr_valid = 1;
    wait (n_fprog == 8);
    @(negedge clk) flash_wr_valid = 0;
    wait (flash_done);
    @(negedge clk);
    flash_cmd_valid = 1; flash_cmd_op = 2'd0;
    @(negedge clk) flash_cmd_valid = 0;
    wait (flash_done);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (back[i] !== rec[i]) begin
        failures++; $display("FAIL FLASH byte %0d: read %02h, stored %02h", i, back[i], rec[i]);
      end
    end
  end

  initial begin
    #5_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ scenario
  typedef struct { int r; int d; int a; real amp; } tgt_t;
  tgt_t tg [NFRAMES][2];
  int   ntg [NFRAMES];
  int   roi_lo [NFRAMES], roi_hi [NFRAMES];
  real  att [4] = '{1.0, 0.8, 1.25, 0.625};   // channel attenuation, undone by cal_gain

  initial begin
    tg[0][0] = '{10, 5, 1, 150.0};  tg[0][1] = '{20, 11, 3, 100.0}; ntg[0] = 2;
    roi_lo[0] = 1; roi_hi[0] = 31;
    tg[1][0] = '{12, 14, 2, 120.0};  tg[1][1] = '{20, 4, 0, 120.0};  ntg[1] = 2;
    roi_lo[1] = 1; roi_hi[1] = 15;
    tg[2][0] = '{9, 6, 1, 3000.0};  ntg[2] = 1;
    roi_lo[2] = 2; roi_hi[2] = 30;
  end

  // ------------------------------------------------------------ ADC model
  int frame_acq = -1, ramp_m = 0, samp_n = 0, tick = 0;
  always @(posedge clk) begin
    if (ramp_trig) begin
      samp_n <= 0;
      if (ramp_idx == 0) frame_acq <= frame_acq + 1;
    end
    tick <= (tick == 4) ? 0 : tick + 1;
  end

  always @(negedge clk) begin
    adc_valid = (tick == 0);
    if (adc_valid && frame_acq >= 0 && frame_acq < NFRAMES) begin
      for (int c = 0; c < 4; c++) begin
        automatic real v = 0.0;
        for (int t = 0; t < ntg[frame_acq]; t++)
          v += 4.0 * tg[frame_acq][t].amp * att[c] *
               $cos(6.283185307179586 * (real'(tg[frame_acq][t].r * samp_n) / real'(NR) +
                                          real'(tg[frame_acq][t].d * int'(ramp_idx)) / real'(NRAMP) +
                                          real'(tg[frame_acq][t].a * c) / 4.0));
        v += real'($urandom_range(16)) - 8.0;
        if (v > 8191.0) v = 8191.0;
        if (v < -8192.0) v = -8192.0;
        adc_data[c] = 14'($rtoi(v));
      end
      samp_n++;
    end else if (adc_valid) begin
      for (int c = 0; c < 4; c++) adc_data[c] = 14'($signed($urandom_range(16)) - 8);
    end
  end


  // ------------------------------------------------------------ monitors
  int n_harm = 0, n_edge = 0;
  int n_trig = 0, n_pad = 0, n_rflush = 0, n_handover = 0, n_dflush = 0, n_clip = 0;
  int n_side = 0, n_done = 0, n_det = 0, n_skip = 0, last_trig = -1, cyc = 0, n_over = 0;
  bit bank_used [2];
  bit found [NFRAMES][2];
  int unexplained [NFRAMES];

  // The memory latches the region of interest when a frame is handed over
  // to the reader: present the region of the next frame to be handed over.
  always @(posedge clk)
    if (n_handover < NFRAMES) begin
      roi_first <= LOG2_NR'(roi_lo[n_handover]);
      roi_last  <= LOG2_NR'(roi_hi[n_handover]);
    end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (ramp_trig) begin
        n_trig++;
        if (last_trig >= 0) begin
          checks++;
          // After the last ramp of a frame the range-FFT flush may stretch the period.
          if ((ramp_idx != 0) ? (cyc - last_trig != PER) : (cyc - last_trig < PER)) begin
            failures++; $display("FAIL ramp period %0d", cyc - last_trig);
          end
        end
        last_trig = cyc;
      end
      if (dut.u_ramp.state.name() == "S_PAD") n_pad++;
      if (dut.u_ramp.fft_flush) n_rflush++;
      if (dut.u_ct.frame_start) begin
        n_handover++;
        bank_used[dut.u_ct.wbank] = 1'b1;
        // columns outside the region of interest are skipped
        if (int'(dut.u_ct.roi_first) > 0 || int'(dut.u_ct.roi_last) < NR - 1) n_skip++;
      end
      if (dut.u_ct.rd_flush) n_dflush++;
      if (|adc_clipped) n_clip++;
      if (overrun) n_over++;
      if (frame_done) n_done++;
      if (det_valid) begin
        automatic int f = n_done;
        automatic bit hit = 0;
        n_det++;
        checks++;
        if (f >= NFRAMES) begin failures++; $display("FAIL detection after the last frame"); end
        else begin
          if (int'(det_range) < roi_lo[f] || int'(det_range) > roi_hi[f]) begin
            failures++; $display("FAIL frame %0d detection at range %0d outside the ROI", f, det_range);
          end
          for (int t = 0; t < ntg[f]; t++)
            if (int'(det_range) == tg[f][t].r && int'(det_doppler) == tg[f][t].d &&
                int'(det_az) == tg[f][t].a) begin
              automatic real pexp = (4096.0 * 8.0 * tg[f][t].amp / 2.0 * real'(NSAMP) / real'(NR)) ** 2;
              hit = 1;
              found[f][t] = 1;
              if (f < 2) begin
                checks++;
                if (real'(det_power) < 0.85 * pexp || real'(det_power) > 1.15 * pexp) begin
                  failures++;
                  $display("FAIL frame %0d target %0d power %0d expected %0.0f", f, t, det_power, pexp);
                end
              end
            end
          // Range sidelobes of a target (the ramp is shorter than the FFT)
          // keep its Doppler and azimuth bins; the real IF signal also has a
          // mirror image with negated Doppler and azimuth bins.
          for (int t = 0; t < ntg[f]; t++)
            if ((int'(det_doppler) == tg[f][t].d && int'(det_az) == tg[f][t].a) ||
                (int'(det_doppler) == (NRAMP - tg[f][t].d) % NRAMP &&
                 int'(det_az) == (4 - tg[f][t].a) % 4)) begin
              hit = 1;
              n_side++;
            end
          // CFAR cells near the ends of the Doppler column (slow targets)
          if (det_doppler < 3 || det_doppler > NRAMP - 4) n_edge++;
          // Clipping (frame 2) adds odd harmonics: Doppler and azimuth bins
          // multiplied by 3 or 5, and their mirror images.
          if (f == 2)
            for (int t = 0; t < ntg[f]; t++)
              for (int h = 3; h <= 5; h += 2)
                for (int sg = 1; sg >= -1; sg -= 2)
                  if (int'(det_doppler) == ((sg * h * tg[f][t].d) % NRAMP + NRAMP) % NRAMP &&
                      int'(det_az) == ((sg * h * tg[f][t].a) % 4 + 4) % 4) begin
                    hit = 1;
                    n_harm++;
                  end
          if (!hit) begin
            unexplained[f]++;
            $display("note: frame %0d detection r=%0d d=%0d a=%0d p=%0d thr=%0d", f, det_range,
                     det_doppler, det_az, det_power, det_thresh);
          end
        end
      end
    end
  end

  initial begin
    enable = 0;
    cfar_alpha = 12'd160;   // 10.0
    for (int c = 0; c < 4; c++) begin
      cal_gain[c]   = 16'($rtoi(16384.0 / att[c] + 0.5));
      cal_offset[c] = '0;
      adc_data[c]   = '0;
    end
    roi_first = 1; roi_last = 31;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    enable <= 1;
    // Drop enable during the last frame: the frame must still be completed.
    wait (frame_acq == NFRAMES - 1 && ramp_idx == LOG2_NRAMP'(NRAMP / 2));
    enable <= 0;
    wait (n_done == NFRAMES);
    repeat (100) @(posedge clk);

    for (int f = 0; f < NFRAMES; f++)
      for (int t = 0; t < ntg[f]; t++) begin
        automatic bit in_roi = (tg[f][t].r >= roi_lo[f] && tg[f][t].r <= roi_hi[f]);
        checks++;
        if (found[f][t] != in_roi) begin
          failures++;
          $display("FAIL frame %0d target %0d (r=%0d): detected %0b, in ROI %0b", f, t, tg[f][t].r,
                   found[f][t], in_roi);
        end
      end
    for (int f = 0; f < NFRAMES; f++) begin
      checks++;
      if (unexplained[f] > 2) begin failures++; $display("FAIL frame %0d: %0d unexplained detections", f, unexplained[f]); end
    end
    $display("mechanisms: ramps=%0d pad=%0d range_flush=%0d handover=%0d banks=%0b%0b roi_skip=%0d doppler_flush=%0d clip=%0d detections=%0d edge_cells=%0d overrun=%0d flash_program=%0d flash_read=%0d",
             n_trig, n_pad, n_rflush, n_handover, bank_used[1], bank_used[0], n_skip, n_dflush, n_clip, n_det, n_edge, n_over,
             n_fprog, n_fread);
    checks++; if (n_trig != NFRAMES * NRAMP) begin failures++; $display("FAIL ramp count"); end
    checks++; if (n_pad != NFRAMES * NRAMP * (NR - NSAMP)) begin failures++; $display("FAIL padding count"); end
    checks++; if (n_rflush != NFRAMES * NR) begin failures++; $display("FAIL range flush count"); end
    checks++; if (n_handover != NFRAMES || !bank_used[0] || !bank_used[1]) begin failures++; $display("FAIL hand-over"); end
    checks++; if (n_skip == 0) begin failures++; $display("FAIL ROI never skipped columns"); end
    checks++; if (n_dflush != NFRAMES * NRAMP) begin failures++; $display("FAIL Doppler flush count"); end
    checks++; if (n_clip == 0) begin failures++; $display("FAIL ADC never clipped"); end
    checks++; if (n_edge == 0) begin failures++; $display("FAIL no detection at a Doppler column edge"); end
    checks++; if (n_det == 0) begin failures++; $display("FAIL no detections"); end
    checks++; if (n_over != 0) begin failures++; $display("FAIL unexpected overrun"); end
    checks++; if (n_fprog != 8 || n_fread != 8) begin failures++; $display("FAIL FLASH program/read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
