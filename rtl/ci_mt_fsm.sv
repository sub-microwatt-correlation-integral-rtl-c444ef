// ci_mt_fsm -- multi-thread FSM that shares one DCTC and one RAOU among the
// channel threads.
//
// Each channel is a thread. When the vector packer has written the newest
// vector of every channel into the vector memory (start, one pulse after the
// last channel's write), the FSM runs the threads one after the other, each
// for THREAD_CYC = NVEC + 2 cycles. For thread c, with w the ring-buffer slot
// of the newest vector:
//   k = 0            read bank c, slot w (newest vector V_i)
//   k = 1            load V_i into the DCTC reference register;
//                    read slot w-1
//   k = 2 .. NVEC    the DCTC result for V_{i-d}, d = k-1, is shifted into
//                    the RAOU VD register of channel c (forced to 0 while the
//                    window is still filling); read slot w-(k)
//   k = NVEC + 1     RAOU update of channel c
// After the last thread the slot w advances (mod NVEC) and the count of
// stored vectors grows until the window is full.
//
// Interface: wslot is the slot the vector packer writes to; the memory read
// is synchronous (data one cycle after rd_en). busy is high while threads
// run. A start that arrives while busy would be an overrun: with the default
// sizes the threads take NCH*THREAD_CYC = 192 cycles, against NCH*SIGMA = 384
// input cycles between vector frames.
//
// Time-multiplexing the channels as threads on one DCTC/RAOU follows the
// processor description; the exact cycle schedule, the ring-buffer slot
// order and running the threads in channel order are this design's own.
module ci_mt_fsm #(
  parameter int unsigned NCH  = ci_pkg::NCH,
  parameter int unsigned NVEC = ci_pkg::NVEC
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic                       busy,
  output logic [$clog2(NVEC)-1:0]    wslot,
  // vector memory read port
  output logic                       rd_en,
  output logic [$clog2(NCH)-1:0]     rd_bank,
  output logic [$clog2(NVEC)-1:0]    rd_slot,
  // DCTC
  output logic                       load_ref,
  // RAOU
  output logic                       vd_shift,
  output logic [$clog2(NCH)-1:0]     vd_ch,
  output logic                       pair_valid,
  output logic                       upd,
  output logic [$clog2(NCH)-1:0]     upd_ch,
  output logic                       upd_full
);

  localparam int unsigned CH_W       = $clog2(NCH);
  localparam int unsigned SLOT_W     = $clog2(NVEC);
  localparam int unsigned THREAD_CYC = NVEC + 2;
  localparam int unsigned K_W        = $clog2(THREAD_CYC);
  localparam int unsigned CNT_W      = $clog2(NVEC);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t           state;
  logic [CH_W-1:0]  ch;
  logic [K_W-1:0]   k;
  logic [CNT_W-1:0] nprev;   // older vectors stored per channel, saturates at NVEC-1

  // Slot of V_{i-d}.
  function automatic logic [SLOT_W-1:0] slot_back(input logic [SLOT_W-1:0] w, input int d);
    int s;
    s = int'(w) - d;
    if (s < 0) s = s + NVEC;
    return SLOT_W'(s);
  endfunction

  assign busy       = (state == S_RUN);
  assign rd_en      = (state == S_RUN) && (int'(k) <= NVEC - 1);
  assign rd_bank    = ch;
  assign rd_slot    = slot_back(wslot, int'(k));
  assign load_ref   = (state == S_RUN) && (int'(k) == 1);
  assign vd_shift   = (state == S_RUN) && (int'(k) >= 2) && (int'(k) <= NVEC);
  assign vd_ch      = ch;
  assign pair_valid = (int'(k) - 1) <= int'(nprev);
  assign upd        = (state == S_RUN) && (int'(k) == NVEC + 1);
  assign upd_ch     = ch;
  assign upd_full   = int'(nprev) == NVEC - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ch    <= '0;
      k     <= '0;
      wslot <= '0;
      nprev <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_RUN;
            ch    <= '0;
            k     <= '0;
          end
        end
        S_RUN: begin
          if (int'(k) == THREAD_CYC - 1) begin
            k <= '0;
            if (int'(ch) == NCH - 1) begin
              state <= S_IDLE;
              ch    <= '0;
              wslot <= (int'(wslot) == NVEC - 1) ? '0 : wslot + 1'b1;
              if (int'(nprev) < NVEC - 1) nprev <= nprev + 1'b1;
            end else begin
              ch <= ch + 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new vector frame must not arrive before all threads have finished.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
