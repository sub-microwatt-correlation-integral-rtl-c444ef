// ci_dctc -- distance computation and threshold comparison (DCTC), shared by
// all channel threads.
//
// Produces one Heaviside term of the correlation integral per cycle:
//   theta = 1  when  ||A - B|| <= eps,  else 0,
// where A is the thread's newest vector, held in the reference register, and
// B is the vector on vec_in (straight from the vector memory read port).
// Vectors are P components of SAMPLE_W-bit two's complement samples, packed
// as vec[k*SAMPLE_W +: SAMPLE_W] = component k.
//
// Distance computation: the Euclidean norm is compared without a square
// root, as sum_k (A_k - B_k)^2 <= eps^2; the comparison is exact.
// Threshold computation: eps is squared here and compared with the sum.
//
// Timing: load_ref captures vec_in into the reference register at the clock
// edge; theta and dist2 are combinational in the reference register, vec_in
// and eps.
//
// The split into distance computation and threshold comparison, with eps as
// an input, follows the processor description. The Euclidean norm and the
// convention that a distance equal to eps counts as a match are this
// design's own choices.
module ci_dctc #(
  parameter int unsigned SAMPLE_W = ci_pkg::SAMPLE_W,
  parameter int unsigned P        = ci_pkg::P,
  parameter int unsigned EPS_W    = ci_pkg::EPS_W
) (
  input  logic                          clk,
  input  logic                          load_ref,
  input  logic [P*SAMPLE_W-1:0]         vec_in,
  input  logic [EPS_W-1:0]              eps,
  output logic [2*SAMPLE_W+$clog2(P):0] dist2,     // squared Euclidean distance
  output logic                          theta
);

  localparam int unsigned DIFF_W = SAMPLE_W + 1;
  localparam int unsigned SQ_W   = 2 * SAMPLE_W;            // |diff| <= 2^SAMPLE_W - 1
  localparam int unsigned SUM_W  = SQ_W + $clog2(P) + 1;
  localparam int unsigned CMP_W  = (SUM_W > 2*EPS_W) ? SUM_W : 2*EPS_W;

  logic [P*SAMPLE_W-1:0] ref_vec;

  always_ff @(posedge clk) begin
    if (load_ref) ref_vec <= vec_in;
  end

  // Distance computation.
  always_comb begin
    logic signed [DIFF_W-1:0] d;
    logic        [SAMPLE_W-1:0] mag;
    logic        [SQ_W-1:0]   sq;
    dist2 = '0;
    for (int k = 0; k < P; k++) begin
      d     = DIFF_W'($signed(ref_vec[k*SAMPLE_W +: SAMPLE_W]))
            - DIFF_W'($signed(vec_in[k*SAMPLE_W +: SAMPLE_W]));
      mag   = d[DIFF_W-1] ? SAMPLE_W'(-d) : SAMPLE_W'(d);   // |d| <= 2^SAMPLE_W - 1
      sq    = SQ_W'(mag * mag);
      dist2 = dist2 + SUM_W'(sq);
    end
  end

  // Threshold computation.
  logic [2*EPS_W-1:0] eps2;
  assign eps2  = eps * eps;
  assign theta = CMP_W'(dist2) <= CMP_W'(eps2);

endmodule
