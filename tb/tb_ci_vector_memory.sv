// tb_ci_vector_memory -- self-checking testbench for the 16-bank vector
// memory.
//
// Fills every bank/slot with a random 63-bit word, then performs random
// mixed reads and writes against a reference array, checking each read one
// cycle after it is issued (synchronous read) and that a read of an entry
// written in the same cycle returns the old word.
module tb_ci_vector_memory;
  localparam int NCH = 16, NVEC = 10, W = 63;

  logic clk = 0;
  logic we = 0, re = 0;
  logic [3:0] wbank = '0, rbank = '0;
  logic [3:0] wslot = '0, rslot = '0;
  logic [W-1:0] wdata = '0, rdata;

  ci_vector_memory #(.NCH(NCH), .NVEC(NVEC), .VEC_W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [W-1:0] model [NCH][NVEC];

  function automatic logic [W-1:0] rnd63();
    return {$urandom, $urandom};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    bit pend;
    pend = 0;
    // Fill.
    for (int b = 0; b < NCH; b++)
      for (int s = 0; s < NVEC; s++) begin
        @(negedge clk);
        we = 1; wbank = 4'(b); wslot = 4'(s); wdata = rnd63();
        model[b][s] = wdata;
      end
    @(negedge clk);
    we = 0;
    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: got %h exp %h", i, rdata, exp);
        end
      end
      re = ($urandom_range(0, 3) != 0);
      we = ($urandom_range(0, 1) != 0);
      rbank = 4'($urandom_range(0, NCH-1)); rslot = 4'($urandom_range(0, NVEC-1));
      if (i % 17 == 0) begin wbank = rbank; wslot = rslot; end
      else begin wbank = 4'($urandom_range(0, NCH-1)); wslot = 4'($urandom_range(0, NVEC-1)); end
      wdata = rnd63();
      pend = re;
      if (re) exp = model[rbank][rslot];          // old contents on a same-entry write
      if (we) model[wbank][wslot] = wdata;
    end
    @(negedge clk);
    if (pend) begin
      checks++;
      if (rdata !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
