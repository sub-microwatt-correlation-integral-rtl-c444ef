// tb_ci_mt_fsm -- self-checking testbench for the multi-thread scheduler.
//
// Starts 13 rounds (more than one trip around the 10-slot ring buffer) and
// checks every cycle of every round against the intended schedule: thread c
// owns cycles 12c .. 12c+11 after start; it reads the newest vector from slot
// w, then slots w-1 .. w-9 of bank c, loads the DCTC reference on its second
// cycle, shifts nine results into the RAOU with pair_valid only for partners
// already stored, and updates the RAOU on its last cycle. Also checks the
// round length (16 x 12 = 192 cycles), the slot advance and upd_full.
module tb_ci_mt_fsm;
  localparam int NCH = 16, NVEC = 10, TC = NVEC + 2;

  logic clk = 0, rst_n = 1, start = 0;
  initial #1 rst_n = 0;     // a real falling edge for the asynchronous reset
  logic busy, rd_en, load_ref, vd_shift, pair_valid, upd, upd_full;
  logic [3:0] wslot, rd_slot, rd_bank, vd_ch, upd_ch;

  ci_mt_fsm #(.NCH(NCH), .NVEC(NVEC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w, nprev, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    w = 0; nprev = 0;
    for (int round = 0; round < 13; round++) begin
      @(negedge clk);
      check(!busy && int'(wslot) == w, "idle before start");
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 0;
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < TC; k++) begin
          bit e_rd, e_shift;
          e_rd = (k <= NVEC - 1);
          e_shift = (k >= 2 && k <= NVEC);
          check(busy, "busy");
          check(rd_en == e_rd, "rd_en");
          if (e_rd) check(int'(rd_bank) == c && int'(rd_slot) == (w - k + NVEC) % NVEC,
                          $sformatf("rd addr c%0d k%0d", c, k));
          check(load_ref == (k == 1), "load_ref");
          check(vd_shift == e_shift, "vd_shift");
          if (e_shift) check(int'(vd_ch) == c && pair_valid == (k - 1 <= nprev), "vd");
          check(upd == (k == TC - 1), "upd");
          if (k == TC - 1) check(int'(upd_ch) == c && upd_full == (nprev == NVEC - 1), "upd ch");
          @(negedge clk);
          cyc++;
        end
      check(!busy, "done after 192 cycles");
      check(cyc == NCH * TC, "round length");
      w = (w + 1) % NVEC;
      if (nprev < NVEC - 1) nprev++;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
