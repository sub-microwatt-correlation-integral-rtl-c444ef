// tb_ci_dctc -- self-checking testbench for the distance computation and
// threshold comparison unit.
//
// Loads random reference vectors, applies random partner vectors (including
// extreme samples -256/+255 and partners near the reference) and random eps,
// and checks dist2 against a sum of squared integer differences and theta
// against dist2 <= eps^2, including the case dist2 == eps^2 exactly.
module tb_ci_dctc;
  localparam int SW = 9, P = 7, EW = 11;

  logic clk = 0;
  logic load_ref = 0;
  logic [P*SW-1:0] vec_in = '0;
  logic [EW-1:0] eps = '0;
  logic [2*SW+$clog2(P):0] dist2;
  logic theta;

  ci_dctc #(.SAMPLE_W(SW), .P(P), .EPS_W(EW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ones = 0, zeros = 0, equal_hits = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int comp(input logic [P*SW-1:0] v, input int k);
    return int'($signed(v[k*SW +: SW]));
  endfunction

  function automatic int rsample(input int mode);
    case (mode)
      0: return -256;
      1: return 255;
      default: return $urandom_range(0, 511) - 256;
    endcase
  endfunction

  initial begin
    logic [P*SW-1:0] refv, b;
    int d2, e, spread;
    for (int t = 0; t < 400; t++) begin
      // New reference vector.
      for (int k = 0; k < P; k++) refv[k*SW +: SW] = SW'(rsample($urandom_range(0, 9)));
      @(negedge clk);
      vec_in = refv; load_ref = 1;
      @(negedge clk);
      load_ref = 0;
      for (int u = 0; u < 8; u++) begin
        spread = (u < 4) ? 20 : 600;
        for (int k = 0; k < P; k++) begin
          int v;
          if (spread > 512) v = rsample($urandom_range(0, 9));
          else begin
            v = comp(refv, k) + $urandom_range(0, 2*spread) - spread;
            if (v > 255) v = 255;
            if (v < -256) v = -256;
          end
          b[k*SW +: SW] = SW'(v);
        end
        if (u == 0) begin
          // One component moved toward zero by r: distance exactly r.
          int k0, r, v;
          k0 = $urandom_range(0, P-1); r = $urandom_range(0, 100);
          b = refv; v = comp(refv, k0);
          v = (v >= 0) ? v - r : v + r;
          b[k0*SW +: SW] = SW'(v);
        end
        d2 = 0;
        for (int k = 0; k < P; k++) d2 += (comp(refv, k) - comp(b, k)) ** 2;
        // eps: random, or exactly sqrt(d2) when d2 is a perfect square.
        e = $urandom_range(0, 1400);
        for (int r = 0; r * r <= d2; r++) if (r * r == d2 && u == 0) e = r;
        vec_in = b; eps = EW'(e);
        #1;
        checks++;
        if (int'(dist2) != d2) begin
          failures++;
          if (failures < 10) $display("FAIL dist2 got %0d exp %0d", dist2, d2);
        end
        checks++;
        if (theta != (d2 <= e * e)) begin
          failures++;
          if (failures < 10) $display("FAIL theta d2=%0d eps=%0d got %0d", d2, e, theta);
        end
        if (d2 == e * e) equal_hits++;
        if (theta) ones++; else zeros++;
        @(negedge clk);
      end
    end
    checks++;
    if (ones == 0 || zeros == 0 || equal_hits == 0) failures++;
    $display("theta=1: %0d theta=0: %0d dist==eps: %0d", ones, zeros, equal_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
