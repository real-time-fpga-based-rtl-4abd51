// tb_ca_cfar: CA-CFAR with 32-bin columns, 4 training and 1 guard cell per
// side. Columns of noise with a few strong cells (some next to each other,
// some at the column edges) stream in with random gaps, at two threshold
// factors. Every detection (bin, payload, power, threshold) is compared in
// order with a reference CFAR computed here, including the cells within 5
// bins of a column edge, whose threshold uses the complete training side
// twice; the last column's edge cells need the detector's own drain steps.
module tb_ca_cfar;
  localparam int LOG2N = 5, N = 32, NT = 4, NG = 1, HALF = NT + NG, NCOLS = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0]      alpha;
  logic             in_valid, det_valid;
  logic [31:0]      in_power, det_power;
  logic [LOG2N-1:0] in_idx, det_idx;
  logic [14:0]      in_tag, det_tag;
  logic [39:0]      det_thresh;

  ca_cfar #(.PW(32), .LOG2N(LOG2N), .NT(NT), .NG(NG), .TAGW(15)) dut (
    .clk, .rst_n, .alpha, .in_valid, .in_power, .in_idx, .in_tag,
    .det_valid, .det_power, .det_idx, .det_tag, .det_thresh);

  initial begin
    #2_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint pw [NCOLS][N];
  int exp_idx [$], exp_col [$];
  longint exp_thr [$];
  int ndet = 0, n_edge_exp = 0;

  always @(posedge clk) if (rst_n && det_valid) begin
    checks++;
    ndet++;
    if (exp_idx.size() == 0) begin failures++; $display("FAIL unexpected detection"); end
    else begin
      automatic int k = exp_idx.pop_front();
      automatic int col = exp_col.pop_front();
      automatic longint thr = exp_thr.pop_front();
      if (int'(det_idx) != k || int'(det_tag) != col || longint'(det_power) != pw[col][k] ||
          longint'(det_thresh) != thr) begin
        failures++;
        if (failures < 10) $display("FAIL det col %0d bin %0d thr %0d; expected col %0d bin %0d thr %0d",
                                    det_tag, det_idx, det_thresh, col, k, thr);
      end
    end
  end

  initial begin
    alpha = 12'd48; in_valid = 0; in_power = 0; in_idx = 0; in_tag = 0;
    for (int col = 0; col < NCOLS; col++)
      for (int k = 0; k < N; k++) begin
        pw[col][k] = 100 + $urandom_range(200);
        if ($urandom_range(9) == 0) pw[col][k] = 800 + $urandom_range(3000);
        if (col % 7 == 0 && (k == 2 || k == 29)) pw[col][k] = 100000;   // edge targets
        if (col % 5 == 1 && (k == 12 || k == 13)) pw[col][k] = 50000;   // a target over two bins
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int col = 0; col < NCOLS; col++) begin
      if (col == NCOLS / 2) begin
        // change the factor between columns, once the pipeline is idle
        @(negedge clk); in_valid = 0; repeat (HALF + 3) @(negedge clk);
        alpha = 12'd300;
      end
      for (int k = 0; k < N; k++) begin
        // reference for this cell
        begin
          automatic longint lead = 0, lag = 0, sum;
          automatic bit lead_ok = (k + HALF <= N - 1), lag_ok = (k - HALF >= 0);
          for (int i = NG + 1; i <= HALF; i++) begin
            if (lead_ok) lead += pw[col][k + i];
            if (lag_ok)  lag  += pw[col][k - i];
          end
          sum = (lead_ok && lag_ok) ? lead + lag : lag_ok ? 2 * lag : 2 * lead;
          if (pw[col][k] * 2 * NT * 16 > longint'(alpha) * sum) begin
            exp_idx.push_back(k); exp_col.push_back(col);
            exp_thr.push_back((longint'(alpha) * sum) / (2 * NT * 16));
            if (k < HALF || k > N - 1 - HALF) n_edge_exp++;
          end
        end
      end
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_power = 32'(pw[col][k]); in_idx = LOG2N'(k); in_tag = 15'(col);
      end
    end
    // The last column's cells near its end are tested by the drain steps.
    @(negedge clk); in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_idx.size() != 0) begin failures++; $display("FAIL %0d detections missing", exp_idx.size()); end
    checks++;
    if (ndet < 20) begin failures++; $display("FAIL only %0d detections", ndet); end
    checks++;
    if (n_edge_exp < 10) begin failures++; $display("FAIL only %0d edge detections", n_edge_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
