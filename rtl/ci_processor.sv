// ci_processor -- 16-channel correlation integral (CI) processor for seizure
// detection in a closed-loop neuromodulator.
//
// The CI of a channel is the number of pairs among its last NVEC = 10
// phase-space vectors that lie within distance eps of each other; it drops
// when the EEG/ECoG becomes more organised, ahead of a seizure. Vectors have
// P = 7 components TAU = 4 samples apart and are formed every SIGMA = 24
// samples (256 Hz sampling: about one CI update per channel per 94 ms).
//
// One set of hardware serves all channels (channel folding):
//   ci_vcp            systolic register array + vector packer
//   ci_vector_memory  one 16-bank memory of 160 x 63 bits
//   ci_mt_fsm         runs the channels as threads on the shared units
//   ci_dctc           distance computation and threshold comparison
//   ci_raou           per-channel VD, history VD and CI registers,
//                     updated differentially (9 new pairs in, 9 old out)
//
// Interface: in_valid/in_sample carry the time-multiplexed stream, channel 0
// first after reset, one sample per clock at the 4096 Hz system clock. eps
// is the distance threshold in sample units; it is meant to be held constant
// (a change takes a full window to settle). ci[c] is the pair count of channel
// c (0..45); the normalised CI is ci[c] / 45. ci_upd pulses with ci_upd_ch when
// ci[ci_upd_ch] has been updated; ci_full[c] says the count covers a full
// window. busy is high while the threads run.
//
// Timing: after the sample that completes a vector frame the 16 updates follow
// within NCH*(NVEC+2) + 3 = 195 cycles, well inside the 0.1 s (410-cycle)
// feature update period and the 384 cycles until the next frame.
module ci_processor #(
  parameter int unsigned NCH      = ci_pkg::NCH,
  parameter int unsigned SAMPLE_W = ci_pkg::SAMPLE_W,
  parameter int unsigned P        = ci_pkg::P,
  parameter int unsigned TAU      = ci_pkg::TAU,
  parameter int unsigned SIGMA    = ci_pkg::SIGMA,
  parameter int unsigned NVEC     = ci_pkg::NVEC,
  parameter int unsigned EPS_W    = ci_pkg::EPS_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  logic [SAMPLE_W-1:0]                    in_sample,
  input  logic [EPS_W-1:0]                       eps,
  output logic [$clog2(NCH)-1:0]                 in_ch,
  output logic [$clog2(NVEC*(NVEC-1)/2+1)-1:0]   ci [NCH],
  output logic [NCH-1:0]                         ci_full,
  output logic                                   ci_upd,
  output logic [$clog2(NCH)-1:0]                 ci_upd_ch,
  output logic                                   busy
);

  localparam int unsigned CH_W   = $clog2(NCH);
  localparam int unsigned SLOT_W = $clog2(NVEC);
  localparam int unsigned VEC_W  = P * SAMPLE_W;

  logic              vec_valid;
  logic [CH_W-1:0]   vec_ch;
  logic [VEC_W-1:0]  vec_data;
  logic              start;
  logic [SLOT_W-1:0] wslot;
  logic              rd_en;
  logic [CH_W-1:0]   rd_bank;
  logic [SLOT_W-1:0] rd_slot;
  logic [VEC_W-1:0]  rd_data;
  logic              load_ref;
  logic              vd_shift, pair_valid, upd, upd_full;
  logic [CH_W-1:0]   vd_ch, upd_ch;
  logic              theta;

  ci_vcp #(.NCH(NCH), .SAMPLE_W(SAMPLE_W), .P(P), .TAU(TAU), .SIGMA(SIGMA)) u_vcp (
    .clk, .rst_n, .in_valid, .in_sample, .in_ch,
    .vec_valid, .vec_ch, .vec_data
  );

  // All channels of a frame have been written once the last one is.
  assign start = vec_valid && (int'(vec_ch) == NCH - 1);

  ci_vector_memory #(.NCH(NCH), .NVEC(NVEC), .VEC_W(VEC_W)) u_vm (
    .clk,
    .we(vec_valid), .wbank(vec_ch), .wslot, .wdata(vec_data),
    .re(rd_en), .rbank(rd_bank), .rslot(rd_slot), .rdata(rd_data)
  );

  ci_mt_fsm #(.NCH(NCH), .NVEC(NVEC)) u_fsm (
    .clk, .rst_n, .start, .busy, .wslot,
    .rd_en, .rd_bank, .rd_slot, .load_ref,
    .vd_shift, .vd_ch, .pair_valid, .upd, .upd_ch, .upd_full
  );

  ci_dctc #(.SAMPLE_W(SAMPLE_W), .P(P), .EPS_W(EPS_W)) u_dctc (
    .clk, .load_ref, .vec_in(rd_data), .eps, .dist2(), .theta
  );

  ci_raou #(.NCH(NCH), .NVEC(NVEC)) u_raou (
    .clk, .rst_n,
    .vd_shift, .vd_ch, .vd_bit(theta && pair_valid),
    .upd, .upd_ch, .upd_full,
    .ci, .ci_full, .ci_upd, .ci_upd_ch
  );

endmodule
