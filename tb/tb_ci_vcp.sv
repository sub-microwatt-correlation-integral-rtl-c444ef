// tb_ci_vcp -- self-checking testbench for the vector collecting and packing
// unit.
//
// Drives a random time-multiplexed 16-channel stream, with random idle cycles
// (in_valid low), and keeps its own copy of every channel's samples. For each
// sample index n = SIGMA*m (m >= 1) of a channel it expects, one cycle after
// that sample, a vector of the channel with components x[n - SIGMA + k*TAU],
// k = 0..P-1, and no vector at any other time. Also checks that the
// reported input channel follows the fixed channel order.
module tb_ci_vcp;
  localparam int NCH = 16, SW = 9, P = 7, TAU = 4, SIGMA = 24;
  localparam int NSAMP = SIGMA * 7 + 5;       // samples per channel

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a real falling edge for the asynchronous reset
  logic in_valid = 0;
  logic [SW-1:0] in_sample = '0;
  logic [3:0] in_ch, vec_ch;
  logic vec_valid;
  logic [P*SW-1:0] vec_data;

  ci_vcp #(.NCH(NCH), .SAMPLE_W(SW), .P(P), .TAU(TAU), .SIGMA(SIGMA)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [SW-1:0] x [NCH][NSAMP];
  int n [NCH];
  int nvec = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_valid;
    int exp_ch, exp_n, ch;
    for (int c = 0; c < NCH; c++) n[c] = 0;
    exp_valid = 0; exp_ch = 0; exp_n = 0; ch = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n[NCH-1] < NSAMP) begin
      @(negedge clk);
      // Outputs of the edge that just consumed the previous inputs.
      check(vec_valid == exp_valid, "vec_valid");
      if (exp_valid && vec_valid) begin
        logic [P*SW-1:0] e;
        for (int k = 0; k < P; k++) e[k*SW +: SW] = x[exp_ch][exp_n - SIGMA + k*TAU];
        check(int'(vec_ch) == exp_ch, "vec_ch");
        check(vec_data == e, "vec_data");
        nvec++;
      end
      check(int'(in_ch) == ch, "in_ch");
      // New inputs.
      exp_valid = 0;
      in_valid  = ($urandom_range(0, 7) != 0);
      in_sample = SW'($urandom);
      if (in_valid) begin
        x[ch][n[ch]] = in_sample;
        if (n[ch] >= SIGMA && n[ch] % SIGMA == 0) begin
          exp_valid = 1; exp_ch = ch; exp_n = n[ch];
        end
        n[ch]++;
        ch = (ch + 1) % NCH;
      end
    end
    @(negedge clk);
    check(vec_valid == exp_valid, "vec_valid last");
    in_valid = 0;
    // 7 vector instants per channel (samples 24, 48, ..., 168).
    check(nvec == NCH * (NSAMP / SIGMA), "vector count");
    $display("vectors seen: %0d", nvec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
