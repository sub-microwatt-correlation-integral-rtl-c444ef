// ci_vector_memory -- vector memory (VM) of the folded CI processor.
//
// One memory of NCH banks x NVEC vectors x VEC_W bits (16 x 10 x 63 = 160 x 63
// bits at the default sizes) replaces the 16 separate 10-vector memories of
// 16 single-channel processors. Bank b holds the last NVEC vectors of channel
// b; the slot within a bank is chosen by the caller (the thread scheduler
// uses it as a ring buffer).
//
// Interface: one write port and one read port, both addressed by bank and
// slot. The read is synchronous, like an SRAM macro: rdata is valid on the
// cycle after re. A read and a write of the same entry in one cycle return
// the old contents. Contents are not reset.
//
// The organisation (one 16-bank memory of 160 x 63 bits) follows the
// processor description; the port arrangement and read latency are this
// design's own choices.
module ci_vector_memory #(
  parameter int unsigned NCH   = ci_pkg::NCH,
  parameter int unsigned NVEC  = ci_pkg::NVEC,
  parameter int unsigned VEC_W = ci_pkg::VEC_W
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(NCH)-1:0]    wbank,
  input  logic [$clog2(NVEC)-1:0]   wslot,
  input  logic [VEC_W-1:0]          wdata,
  input  logic                      re,
  input  logic [$clog2(NCH)-1:0]    rbank,
  input  logic [$clog2(NVEC)-1:0]   rslot,
  output logic [VEC_W-1:0]          rdata
);

  localparam int unsigned DEPTH  = NCH * NVEC;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic [VEC_W-1:0]  mem [DEPTH];
  logic [ADDR_W-1:0] waddr, raddr;

  assign waddr = ADDR_W'(int'(wbank) * NVEC + int'(wslot));
  assign raddr = ADDR_W'(int'(rbank) * NVEC + int'(rslot));

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  // Slots beyond NVEC-1 do not exist.
  a_wslot: assert property (@(posedge clk) we |-> int'(wslot) < NVEC);
  a_rslot: assert property (@(posedge clk) re |-> int'(rslot) < NVEC);

endmodule
