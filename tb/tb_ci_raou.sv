// tb_ci_raou -- self-checking testbench for the result accumulation and
// output update banks.
//
// Plays the role of the DCTC: for update i of channel c it invents the pair
// results theta(V_i, V_{i-d}), d = 1..9 (0 for partners that do not exist
// yet), remembers them in a full pair table, shifts them into the channel's
// VD register and requests the update. The reference CI is recounted from
// the pair table over the window V_{i-9}..V_i, so the differential update and
// the history counters are checked against a direct count. Channels are
// updated in random order, and shifts into one channel overlap updates of
// another. Each channel uses its own match probability so that windows range
// from nearly empty to nearly full.
module tb_ci_raou;
  localparam int NCH = 16, NVEC = 10, NUPD = 40;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a real falling edge for the asynchronous reset
  logic vd_shift = 0, vd_bit = 0, upd = 0, upd_full = 0;
  logic [3:0] vd_ch = '0, upd_ch = '0;
  logic [5:0] ci [NCH];
  logic [NCH-1:0] ci_full;
  logic ci_upd;
  logic [3:0] ci_upd_ch;

  ci_raou #(.NCH(NCH), .NVEC(NVEC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, removals = 0;
  bit pairs [NCH][NUPD][NUPD];   // pairs[c][i][j], j < i
  int nupd [NCH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ref_ci(input int c, input int i);
    int lo, s;
    lo = (i - (NVEC - 1) < 0) ? 0 : i - (NVEC - 1);
    s = 0;
    for (int a = lo; a <= i; a++)
      for (int b = lo; b < a; b++) s += pairs[c][a][b];
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, i, prev_ci, newc, expected, other;
    for (int k = 0; k < NCH; k++) nupd[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (1) begin
      // Pick a channel that still has updates to do.
      c = $urandom_range(0, NCH - 1);
      begin
        int tries = 0;
        while (nupd[c] >= NUPD && tries < NCH) begin c = (c + 1) % NCH; tries++; end
        if (nupd[c] >= NUPD) break;
      end
      i = nupd[c];
      newc = 0;
      for (int d = 1; d < NVEC; d++) begin
        bit t;
        t = (i - d >= 0) && ($urandom_range(0, 15) < c + 1);
        if (i - d >= 0) pairs[c][i][i-d] = t;
        newc += t;
        @(negedge clk);
        upd = 0;
        vd_shift = 1; vd_ch = 4'(c); vd_bit = t;
      end
      prev_ci = ref_ci(c, i - 1 < 0 ? 0 : i - 1);
      if (i == 0) prev_ci = 0;
      expected = ref_ci(c, i);
      if (expected != prev_ci + newc) removals++;
      // Update c while shifting a (discarded) bit into another channel,
      // whose VD register is refilled before its own update.
      other = (c + 1) % NCH;
      @(negedge clk);
      vd_shift = 1; vd_ch = 4'(other); vd_bit = 1;
      upd = 1; upd_ch = 4'(c); upd_full = (i >= NVEC - 1);
      @(negedge clk);
      vd_shift = 0; upd = 0;
      check(ci_upd && int'(ci_upd_ch) == c, "ci_upd");
      check(int'(ci[c]) == expected, $sformatf("ci[%0d] upd %0d: got %0d exp %0d", c, i, ci[c], expected));
      check(ci_full[c] == (i >= NVEC - 1), "ci_full");
      nupd[c]++;
    end
    check(removals > 0, "history subtraction exercised");
    $display("updates with a nonzero history subtraction: %0d", removals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
