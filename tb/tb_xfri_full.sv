// tb_xfri_full: one complete observation frame through the radar chain at
// its full size: 8192-point range FFT, 256 ramps of 7000 samples taken one
// clock in five, 35000-clock ramp period, 256-point Doppler FFT, 4-point
// azimuth FFT, CA-CFAR with 8 training and 2 guard cells per side.
//
// The ADC model produces three point targets (beat frequency at range bin r,
// phase step d/256 per ramp, phase step a/4 per channel): one at 375 m, one
// near the 1500 m limit approaching at 7 m/s, and one standing still at 25 m
// (Doppler bin 0, at the edge of the CFAR's Doppler column). With 37.5 cm
// range bins and about 0.3 m/s Doppler bins these are the harbour and
// crossing scenes of the original system. The region of interest is range
// bins 1..4095, which leaves out the mirror image of the real IF signal.
// Checked: all targets are detected in exactly their
// (range, Doppler, azimuth) cells with the power predicted from their
// amplitude (within 15 %), no detection lies outside the region of interest,
// every other detection is a range sidelobe of a target or of its mirror
// image (same, or negated, Doppler and azimuth bins) or, more than 40 dB below the weaker target, a product of
// rounding the range output to 12 bits (the targets' phase steps from ramp
// to ramp make these fall on harmonics of their Doppler bins; at most 64
// are accepted and none may be stronger), and the
// frame takes 256 ramp periods to acquire and 4095 x 256 clocks (plus flush
// and drain) to process. At full size the 7000-sample sweep fills the whole
// 35000-clock period and the 1192 padding zeros follow it, so a ramp period
// lasts about 36200 clocks.
module tb_xfri_full;
  localparam int NR = 8192, NRAMP = 256, NSAMP = 7000, PER = 35000;
  // Actual ramp period: the sweep fills PER, the zero padding follows it.
  localparam int RP = (5 * NSAMP + NR - NSAMP > PER) ? 5 * NSAMP + NR - NSAMP : PER;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               enable, adc_valid;
  logic signed [13:0] adc_data [4];
  logic [3:0]         adc_clipped;
  logic               ramp_trig;
  logic [15:0]        cal_gain [4];
  logic signed [11:0] cal_offset [4];
  logic [12:0]        roi_first, roi_last;
  logic [11:0]        cfar_alpha;
  logic               det_valid;
  logic [12:0]        det_range;
  logic [7:0]         det_doppler;
  logic [1:0]         det_az;
  logic [47:0]        det_power;
  logic [55:0]        det_thresh;
  logic [7:0]         ramp_idx;
  logic               acq_busy, proc_busy, frame_start, frame_done, overrun;
  logic               flash_cmd_ready, flash_done, flash_busy, flash_wr_ready, flash_rd_valid;
  logic [7:0]         flash_rd_data;
  logic               flash_cs_n, flash_sck, flash_mosi;
  // the FLASH port is idle in this test
  logic               flash_cmd_valid = 0, flash_wr_valid = 0, flash_miso = 1;
  logic [1:0]         flash_cmd_op = 0;
  logic [23:0]        flash_cmd_addr = 0;
  logic [8:0]         flash_cmd_len = 0;
  logic [7:0]         flash_wr_data = 0;

  xfri_top dut (.*);

  initial begin
    #200_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct { int r; int d; int a; real amp; } tgt_t;
  localparam int NTG = 3;
  tgt_t tg [NTG];
  initial begin
    tg[0] = '{1000, 40, 1, 20.0};    // 375 m, receding at about 12 m/s
    tg[1] = '{3973, 233, 2, 12.0};   // 1490 m, approaching at 7 m/s (harbour)
    tg[2] = '{67, 0, 3, 16.0};       // 25 m, standing still (crossing)
  end

  // ADC model
  int frame_acq = -1, samp_n = 0, tick = 0;
  always @(posedge clk) begin
    if (ramp_trig) begin
      samp_n <= 0;
      if (ramp_idx == 0) frame_acq <= frame_acq + 1;
    end
    tick <= (tick == 4) ? 0 : tick + 1;
  end
  always @(negedge clk) begin
    adc_valid = (tick == 0);
    if (adc_valid) begin
      for (int c = 0; c < 4; c++) begin
        automatic real v = real'($urandom_range(16)) - 8.0;
        if (frame_acq == 0)
          for (int t = 0; t < NTG; t++)
            v += 4.0 * tg[t].amp *
                 $cos(6.283185307179586 * (real'(tg[t].r) * real'(samp_n) / real'(NR) +
                                            real'(tg[t].d * int'(ramp_idx)) / real'(NRAMP) +
                                            real'(tg[t].a * c) / 4.0));
        adc_data[c] = 14'($rtoi(v));
      end
      samp_n++;
    end
  end

  // Monitors
  int cyc = 0, t_first_trig = -1, t_handover = -1, t_done = -1;
  int n_trig = 0, n_det = 0, n_side = 0, n_done = 0, n_unexp = 0, n_spur = 0;
  real pmin;   // expected power of the weaker target
  bit found [NTG];
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (ramp_trig) begin
        if (t_first_trig < 0) t_first_trig = cyc;
        n_trig++;
      end
      if (dut.u_ct.frame_start) t_handover = cyc;
      if (frame_done) begin t_done = cyc; n_done++; end
      if (det_valid) begin
        automatic bit hit = 0;
        n_det++;
        checks++;
        if (int'(det_range) < 1 || int'(det_range) > 4095) begin
          failures++; $display("FAIL detection at range %0d outside the ROI", det_range);
        end
        for (int t = 0; t < NTG; t++) begin
          if (int'(det_range) == tg[t].r && int'(det_doppler) == tg[t].d && int'(det_az) == tg[t].a) begin
            automatic real pexp = (4096.0 * 64.0 * tg[t].amp / 2.0 * real'(NSAMP) / real'(NR)) ** 2;
            found[t] = 1;
            checks++;
            if (real'(det_power) < 0.85 * pexp || real'(det_power) > 1.15 * pexp) begin
              failures++; $display("FAIL target %0d power %0d expected %0.0f", t, det_power, pexp);
            end
            $display("target %0d detected: range %0d doppler %0d azimuth %0d power %0d", t,
                     det_range, det_doppler, det_az, det_power);
          end
          // range sidelobes keep the Doppler and azimuth bins; the mirror
          // image of the real IF signal has them negated
          if (int'(det_doppler) == tg[t].d && int'(det_az) == tg[t].a) hit = 1;
          if (int'(det_doppler) == (NRAMP - tg[t].d) % NRAMP && int'(det_az) == (4 - tg[t].a) % 4) hit = 1;
        end
        if (hit) n_side++;
        else if (real'(det_power) < 1.0e-4 * pmin) begin
          n_spur++;
        end
        else begin
          n_unexp++;
          $display("unexplained detection r=%0d d=%0d a=%0d p=%0d thr=%0d", det_range,
                   det_doppler, det_az, det_power, det_thresh);
        end
      end
    end
  end

  initial begin
    enable = 0;
    cfar_alpha = 12'd640;   // 40.0
    pmin = (4096.0 * 64.0 * tg[1].amp / 2.0 * real'(NSAMP) / real'(NR)) ** 2;
    roi_first = 13'd1; roi_last = 13'd4095;
    for (int c = 0; c < 4; c++) begin
      cal_gain[c] = 16'd16384; cal_offset[c] = '0; adc_data[c] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    enable <= 1;
    wait (frame_acq == 0 && ramp_idx == 8'd1);
    enable <= 0;                     // the frame started is completed
    wait (n_done == 1);
    repeat (100) @(posedge clk);
    for (int t = 0; t < NTG; t++) begin
      checks++;
      if (!found[t]) begin failures++; $display("FAIL target %0d not detected", t); end
    end
    checks++;
    if (n_trig != NRAMP) begin failures++; $display("FAIL %0d ramps", n_trig); end
    // Acquisition: 255 full ramp periods, the last ramp's samples and padding
    // and the range-FFT flush; processing: the ROI columns, flush and drain.
    checks++;
    if (t_handover - t_first_trig < 255 * RP + NSAMP * 5 + NR ||
        t_handover - t_first_trig > 255 * (RP + 10) + NSAMP * 5 + 2 * NR + 200) begin
      failures++; $display("FAIL acquisition took %0d clocks", t_handover - t_first_trig);
    end
    checks++;
    if (t_done - t_handover != 4095 * NRAMP + NRAMP + 64) begin
      failures++; $display("FAIL processing took %0d clocks", t_done - t_handover);
    end
    checks++;
    if (n_unexp > 0) begin failures++; $display("FAIL %0d unexplained detections", n_unexp); end
    checks++;
    if (n_spur > 64) begin failures++; $display("FAIL %0d quantisation products", n_spur); end
    $display("acquisition %0d clocks, processing %0d clocks, %0d detections (%0d sidelobes, %0d quantisation products)",
             t_handover - t_first_trig, t_done - t_handover, n_det, n_side, n_spur);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
