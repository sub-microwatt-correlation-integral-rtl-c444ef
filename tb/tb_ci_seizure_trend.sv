// tb_ci_seizure_trend -- scenario test of the CI processor on synthetic
// "background" and "seizure" activity, at default sizes.
//
// All 16 channels start with low-amplitude background noise. After vector
// period ONSET, channels 8..15 switch to a high-amplitude rhythmic discharge
// (a triangle wave of period 20 samples, +-200, plus small noise); channels
// 0..7 stay as they were. With a fixed eps, rhythmic large-swing activity
// spreads the phase-space vectors apart and the CI falls, which is the
// behaviour the processor is meant to expose. Samples arrive with random
// idle cycles (input slower than one per clock).
//
// Checks: every ci[] update equals a brute-force count of close pairs
// recomputed from the raw samples; the full-window CI of each seizure
// channel during the seizure is below its full-window CI before the onset;
// background channels keep a high CI throughout.
module tb_ci_seizure_trend;
  localparam int NCH = 16, SW = 9, P = 7, TAU = 4, SIGMA = 24, NVEC = 10;
  localparam int NPER = 30, ONSET = 14;
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
  // last full-window CI before onset and minimum CI once the window lies
  // entirely inside the seizure
  int ci_before [NCH];
  int ci_during [NCH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int comp(input int c, input int m, input int k);
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
    lo = (i - (NVEC - 1) < 0) ? 0 : i - (NVEC - 1);
    s = 0;
    for (int a = lo; a <= i; a++)
      for (int b = lo; b < a; b++) s += close(c, a, b);
    return s;
  endfunction

  initial begin
    repeat (NSAMP * NCH * 3 + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && ci_upd) begin
      int c, i, e;
      c = int'(ci_upd_ch);
      i = nupd[c];
      e = ref_ci(c, i);
      check(int'(ci[c]) == e, $sformatf("ci[%0d] update %0d: got %0d exp %0d", c, i, ci[c], e));
      // Vector i spans samples 24i .. 24i+24; the onset is at sample 24*ONSET.
      if (i >= NVEC - 1 && i + 1 <= ONSET) ci_before[c] = e;
      if (i - (NVEC - 1) >= ONSET && e < ci_during[c]) ci_during[c] = e;
      nupd[c]++;
    end
  end

  function automatic int triangle(input int t);
    int ph;
    ph = t % 20;
    return (ph < 10) ? -200 + 40 * ph : 200 - 40 * (ph - 10);
  endfunction

  initial begin
    int ch;
    for (int c = 0; c < NCH; c++) begin
      n[c] = 0; nupd[c] = 0; ci_before[c] = -1; ci_during[c] = 99;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    ch = 0;
    while (n[NCH-1] < NSAMP) begin
      int v;
      if (ch >= 8 && n[ch] >= ONSET * SIGMA)
        v = triangle(n[ch] + 3 * ch) + $urandom_range(0, 20) - 10;
      else
        v = $urandom_range(0, 60) - 30;
      x[ch][n[ch]] = v;
      in_valid = 1;
      in_sample = SW'(v);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      n[ch]++;
      ch = (ch + 1) % NCH;
    end
    in_valid = 0;
    repeat (NCH * (NVEC + 2) + 10) @(negedge clk);
    for (int c = 0; c < NCH; c++) begin
      check(nupd[c] == NPER, "update count");
      if (c >= 8) begin
        check(ci_before[c] >= 0 && ci_during[c] < ci_before[c],
              $sformatf("ch%0d CI falls: before %0d during %0d", c, ci_before[c], ci_during[c]));
      end else begin
        check(ci_during[c] >= 40, $sformatf("ch%0d background CI stays high: %0d", c, ci_during[c]));
      end
    end
    $display("CI before/during onset, ch8: %0d/%0d  ch15: %0d/%0d  ch0 min: %0d",
             ci_before[8], ci_during[8], ci_before[15], ci_during[15], ci_during[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
