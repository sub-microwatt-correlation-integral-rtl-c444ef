// ci_vcp -- vector collecting and packing (VCP) for the folded 16-channel
// correlation integral processor.
//
// The input is the time-multiplexed EEG/ECoG stream: one 9-bit sample per
// accepted cycle (in_valid), channels in the fixed order 0, 1, ..., NCH-1,
// 0, ... starting with channel 0 after reset. A phase-space vector of one
// channel is V = (x[s], x[s+TAU], ..., x[s+(P-1)*TAU]).
//
// Structure (systolic register array): P columns, each a shift register of
// NCH sample registers that advances once per accepted sample, so the bottom
// register of every column always holds the state of the channel that is on
// the input now. For that channel, on a "tap" sample (every TAU samples of the
// channel) the columns form a P-deep FIFO: column 0 takes the new sample and
// column k takes the old value of column k-1; on other samples every column
// simply recirculates its bottom value into its top. This is the per-channel
// 7-register FIFO of the single-channel processor, folded over the channels.
//
// Every SIGMA samples (once P taps have been collected) the FIFO holds a
// complete vector, and the vector packer emits it, oldest component in the
// least significant bits: vec_data[k*SAMPLE_W +: SAMPLE_W] = x[s + k*TAU].
// With SIGMA = (P-1)*TAU consecutive vectors share one end sample.
//
// Timing: vec_valid/vec_ch/vec_data are registered, one cycle after the
// sample that completes the vector. All NCH channels complete their vectors
// in the same frame, in NCH consecutive accepted samples.
//
// The folding into a systolic array, the sizes and the vector rate follow
// the processor description; the recirculating columns, the packing order
// and the fixed channel order after reset are this design's own choices.
module ci_vcp #(
  parameter int unsigned NCH      = ci_pkg::NCH,
  parameter int unsigned SAMPLE_W = ci_pkg::SAMPLE_W,
  parameter int unsigned P        = ci_pkg::P,
  parameter int unsigned TAU      = ci_pkg::TAU,
  parameter int unsigned SIGMA    = ci_pkg::SIGMA
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [SAMPLE_W-1:0]          in_sample,
  output logic [$clog2(NCH)-1:0]       in_ch,      // channel of the current input slot
  output logic                         vec_valid,
  output logic [$clog2(NCH)-1:0]       vec_ch,
  output logic [P*SAMPLE_W-1:0]        vec_data
);

  localparam int unsigned CH_W  = $clog2(NCH);
  localparam int unsigned PH_W  = $clog2(SIGMA);
  localparam int unsigned TAP_W = $clog2(P + 1);

  // SIGMA must be a whole number of tap periods for the FIFO to hold a vector
  // at each vector instant.
  if (SIGMA % TAU != 0) begin : g_bad_sigma
    $error("ci_vcp: SIGMA must be a multiple of TAU");
  end

  logic [SAMPLE_W-1:0] col     [P][NCH];   // [column][stage], stage 0 = top
  logic [SAMPLE_W-1:0] top_nxt [P];
  logic [CH_W-1:0]     ch;
  logic [PH_W-1:0]     phase;              // sample index of the frame, mod SIGMA
  logic [TAP_W-1:0]    taps;               // taps collected before this frame, saturating at P
  logic                tap;
  logic                vec_done;

  assign in_ch    = ch;
  assign tap      = (int'(phase) % TAU) == 0;
  assign vec_done = in_valid && tap && (phase == '0) && (int'(taps) >= P - 1);

  // Next value of each column's top register for the channel on the input.
  always_comb begin
    for (int k = 0; k < P; k++) begin
      if (!tap)        top_nxt[k] = col[k][NCH-1];
      else if (k == 0) top_nxt[k] = in_sample;
      else             top_nxt[k] = col[k-1][NCH-1];
    end
  end

  // Systolic register array: every column advances once per accepted sample.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int k = 0; k < P; k++) begin
        col[k][0] <= top_nxt[k];
        for (int j = 1; j < NCH; j++) col[k][j] <= col[k][j-1];
      end
    end
  end

  // Channel slot, frame phase and tap count.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch    <= '0;
      phase <= '0;
      taps  <= '0;
    end else if (in_valid) begin
      if (int'(ch) == NCH - 1) begin
        ch    <= '0;
        phase <= (int'(phase) == SIGMA - 1) ? '0 : phase + 1'b1;
        if (tap && int'(taps) < P) taps <= taps + 1'b1;
      end else begin
        ch <= ch + 1'b1;
      end
    end
  end

  // Vector packer: oldest component (column P-1) in the low bits.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_valid <= 1'b0;
      vec_ch    <= '0;
      vec_data  <= '0;
    end else begin
      vec_valid <= vec_done;
      if (vec_done) begin
        vec_ch <= ch;
        for (int k = 0; k < P; k++)
          vec_data[k*SAMPLE_W +: SAMPLE_W] <= top_nxt[P-1-k];
      end
    end
  end

endmodule
