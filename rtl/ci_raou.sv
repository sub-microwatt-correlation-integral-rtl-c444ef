// ci_raou -- result accumulation and output update (RAOU) with the
// differential schedule, one bank per channel.
//
// A channel's CI counts the vector pairs of its window of NVEC vectors whose
// distance is within eps. When a new vector V_i enters the window, V_{i-NVEC}
// leaves it. Only NVEC-1 pair results change each way, so
//   CI_i = CI_{i-1} + sum_d theta(V_i, V_{i-d}) - (pairs of V_{i-NVEC}),
// with d = 1 .. NVEC-1.
//
// Each bank holds:
//   * the VD register (NVEC-1 bits): the new results theta(V_i, V_{i-d}),
//     shifted in by the DCTC, d = 1 first; after NVEC-1 shifts bit d-1
//     holds the result for distance d;
//   * the history VD registers: one counter per older vector of the window,
//     the number of matches that vector has had with the vectors that came
//     after it. When a vector leaves the window its counter holds exactly
//     its NVEC-1 pair results, which are subtracted;
//   * the CI register.
// On upd for channel c: CI += popcount(VD) - oldest counter; the counters
// shift by one vector age, each adding the VD bit of its pair with V_i, and
// the VD register's d = 1 bit starts the counter of V_{i-1}.
//
// Interface: vd_shift/vd_ch/vd_bit deliver one DCTC result (already forced
// to 0 for a partner that does not exist yet); upd/upd_ch/upd_full apply the
// update; ci_upd/ci_upd_ch pulse one cycle later with the new ci[] value.
// ci_full[c] is set once channel c's CI covers a full window. Reset clears
// every bank.
//
// The VD, history VD and CI registers per channel and the difference update
// follow the processor description. Holding the history as one match counter
// per vector (36 bits per channel instead of all 45 pair bits) is this
// design's own choice; it gives the same sums.
module ci_raou #(
  parameter int unsigned NCH  = ci_pkg::NCH,
  parameter int unsigned NVEC = ci_pkg::NVEC
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     vd_shift,
  input  logic [$clog2(NCH)-1:0]                   vd_ch,
  input  logic                                     vd_bit,
  input  logic                                     upd,
  input  logic [$clog2(NCH)-1:0]                   upd_ch,
  input  logic                                     upd_full,
  output logic [$clog2(NVEC*(NVEC-1)/2+1)-1:0]     ci [NCH],
  output logic [NCH-1:0]                           ci_full,
  output logic                                     ci_upd,
  output logic [$clog2(NCH)-1:0]                   ci_upd_ch
);

  localparam int unsigned NDIFF  = NVEC - 1;
  localparam int unsigned HIST_W = $clog2(NDIFF + 1);
  localparam int unsigned CI_W   = $clog2(NVEC*(NVEC-1)/2 + 1);

  logic [NDIFF-1:0]  vd   [NCH];
  logic [HIST_W-1:0] hist [NCH][NDIFF];   // hist[c][k]: matches of V_{i-(k+2)} with later vectors

  // Difference for the channel being updated.
  logic [HIST_W-1:0]   new_cnt;
  logic signed [CI_W:0] delta;

  always_comb begin
    new_cnt = '0;
    for (int d = 0; d < NDIFF; d++) new_cnt = new_cnt + HIST_W'(vd[upd_ch][d]);
    delta = $signed({1'b0, CI_W'(new_cnt)}) - $signed({1'b0, CI_W'(hist[upd_ch][NDIFF-1])});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) begin
        vd[c] <= '0;
        ci[c] <= '0;
        for (int k = 0; k < NDIFF; k++) hist[c][k] <= '0;
      end
      ci_full   <= '0;
      ci_upd    <= 1'b0;
      ci_upd_ch <= '0;
    end else begin
      ci_upd <= upd;
      if (vd_shift) vd[vd_ch] <= {vd_bit, vd[vd_ch][NDIFF-1:1]};
      if (upd) begin
        ci_upd_ch       <= upd_ch;
        ci[upd_ch]      <= CI_W'($signed({1'b0, ci[upd_ch]}) + delta);
        ci_full[upd_ch] <= upd_full;
        hist[upd_ch][0] <= HIST_W'(vd[upd_ch][0]);
        for (int k = 1; k < NDIFF; k++)
          hist[upd_ch][k] <= hist[upd_ch][k-1] + HIST_W'(vd[upd_ch][k]);
      end
    end
  end

  // A shift into the bank being updated would be lost.
  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
                               (vd_shift && upd) |-> vd_ch != upd_ch);

endmodule
