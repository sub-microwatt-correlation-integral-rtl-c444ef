// tb_ci_processor -- end-to-end testbench of the 16-channel CI processor at
// its default sizes (16 channels, 9-bit samples, p = 7, tau = 4, sigma = 24,
// N = 10).
//
// Feeds the time-multiplexed stream at full rate (one sample every clock, as
// at the 4096 Hz system clock) for NPER vector periods. Each channel is
// uniform noise whose amplitude changes at random every vector period, so
// pair distances fall on both sides of eps. The reference recomputes every
// CI directly from the stored samples: it builds the delay vectors, counts
// all pairs of the window with squared Euclidean distance <= eps^2, and
// compares with ci[] at every ci_upd.
//
// Timing checks: all 16 updates of a vector frame arrive within 195 cycles
// of the sample that completes the frame, inside the 0.1 s feature period
// (409 cycles) and before the next frame (384 cycles).
//
// Mechanisms that must each occur at least once (counted, a failure if
// never): warm-up updates over a partial window, full-window updates,
// differential updates that subtract a nonzero history, vector-memory
// ring-buffer wrap-around, matching and non-matching pairs, and a thread
// run for every channel.
module tb_ci_processor;
  localparam int NCH = 16, SW = 9, P = 7, TAU = 4, SIGMA = 24, NVEC = 10;
  localparam int NPER = 26;                 // vector periods per channel
  localparam int NSAMP = SIGMA * NPER + 1;
  localparam int EPS = 110;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a real falling edge for the asynchronous reset
  logic in_valid = 0;
  logic [SW-1:0] in_sample = '0;
  logic [10:0] eps = 11'(EPS);
  logic [3:0] in_ch, ci_upd_ch;
  logic [5:0] ci [NCH];
  logic [NCH-1:0] ci_full;
  logic ci_upd, busy;

  ci_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int x [NCH][NSAMP];
  int n [NCH];
  int nupd [NCH];
  int cycle = 0;
  // mechanism counters
  int n_warm = 0, n_full = 0, n_hist = 0, n_wrap = 0, n_match = 0, n_nomatch = 0;
  int thread_seen [NCH];
  // latency bookkeeping
  int frame_cycle = -1, upd_in_frame = 0, max_lat = 0, frames_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic int comp(input int c, input int m, input int k);
    // component k of vector m (m >= 0) of channel c
    return x[c][m * SIGMA + k * TAU];
  endfunction

  function automatic bit close(input int c, input int a, input int b);
    int d2;
    d2 = 0;
    for (int k = 0; k < P; k++) d2 += (comp(c, a, k) - comp(c, b, k)) ** 2;
    return d2 <= EPS * EPS;
  endfunction

  function automatic int ref_ci(input int c, input int i);
    int lo, s;
    if (i < 0) return 0;
    lo = (i - (NVEC - 1) < 0) ? 0 : i - (NVEC - 1);
    s = 0;
    for (int a = lo; a <= i; a++)
      for (int b = lo; b < a; b++) s += close(c, a, b);
    return s;
  endfunction

  initial begin
    repeat (NSAMP * NCH + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker.
  always @(negedge clk) begin
    if (rst_n && ci_upd) begin
      int c, i, e, newp;
      c = int'(ci_upd_ch);
      i = nupd[c];
      e = ref_ci(c, i);
      check(int'(ci[c]) == e, $sformatf("ci[%0d] update %0d: got %0d exp %0d", c, i, ci[c], e));
      check(ci_full[c] == (i >= NVEC - 1), "ci_full");
      newp = 0;
      for (int d = 1; d < NVEC && i - d >= 0; d++) begin
        newp += close(c, i, i - d);
        if (close(c, i, i - d)) n_match++; else n_nomatch++;
      end
      if (i < NVEC - 1) n_warm++; else n_full++;
      if (i >= NVEC) n_wrap++;
      if (e != ref_ci(c, i - 1) + newp) n_hist++;
      thread_seen[c]++;
      nupd[c]++;
      // latency of this frame
      check(frame_cycle >= 0, "update without a frame");
      upd_in_frame++;
      if (cycle - frame_cycle > max_lat) max_lat = cycle - frame_cycle;
      check(cycle - frame_cycle <= NCH * (NVEC + 2) + 3, "update latency");
      if (upd_in_frame == NCH) begin
        frames_done++;
        upd_in_frame = 0;
      end
    end
  end

  initial begin
    int ch, amp [NCH];
    for (int c = 0; c < NCH; c++) begin n[c] = 0; nupd[c] = 0; thread_seen[c] = 0; amp[c] = 40; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    ch = 0;
    while (n[NCH-1] < NSAMP) begin
      int v;
      if (n[ch] % SIGMA == 0) amp[ch] = $urandom_range(5, 90);
      v = $urandom_range(0, 2 * amp[ch]) - amp[ch];
      x[ch][n[ch]] = v;
      in_valid = 1;
      in_sample = SW'(v);
      @(negedge clk);
      // The last channel's vector-completing sample has just been taken.
      if (ch == NCH - 1 && n[ch] >= SIGMA && n[ch] % SIGMA == 0) begin
        check(upd_in_frame == 0, "previous frame finished before the next");
        frame_cycle = cycle;
      end
      n[ch]++;
      ch = (ch + 1) % NCH;
    end
    in_valid = 0;
    repeat (NCH * (NVEC + 2) + 10) @(negedge clk);
    check(frames_done == NPER, $sformatf("frames done %0d", frames_done));
    for (int c = 0; c < NCH; c++) check(thread_seen[c] == NPER, "thread ran for channel");
    check(n_warm > 0, "warm-up updates");
    check(n_full > 0, "full-window updates");
    check(n_hist > 0, "history subtraction");
    check(n_wrap > 0, "ring-buffer wrap");
    check(n_match > 0 && n_nomatch > 0, "matching and non-matching pairs");
    check(max_lat < 410, "within 0.1 s at 4096 Hz");
    $display("frames=%0d warm=%0d full=%0d hist_sub=%0d wrap=%0d match=%0d nomatch=%0d max_latency=%0d cycles",
             frames_done, n_warm, n_full, n_hist, n_wrap, n_match, n_nomatch, max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
