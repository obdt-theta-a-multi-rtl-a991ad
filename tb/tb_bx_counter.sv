// tb_bx_counter: checks the coarse counter against a reference count.
// Phase 1: internal BC0 every 3564 cycles, with an offset of 5; the counter
// must wrap 3563 -> 0 and show the offset at every BC0. Phase 2: external
// BC0 every 3564 cycles, first at an arbitrary phase (realignment, no error
// before the first), then shifted by 7 cycles once (one BC0 error).
`timescale 1ns/1ps
module tb_bx_counter;
  localparam int ORBIT = 3564;
  logic        clk = 1'b0, rst = 1'b1;
  logic        bc0_ext = 1'b0, bc0_internal = 1'b1;
  logic [11:0] bc0_offset = 12'd5;
  logic [11:0] bx;
  logic        bc0, bc0_err;
  logic [31:0] orbit_cnt;
  int checks = 0, failures = 0;
  int ref_bx, nbc0, nerr, nwrap;

  bx_counter dut (.*);

  always #12.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t: bx=%0d ref=%0d", what, $time, bx, ref_bx); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // Phase 1: internal BC0.
    ref_bx = -1; nbc0 = 0; nwrap = 0;
    for (int c = 0; c < 3 * ORBIT + 100; c++) begin
      @(negedge clk);
      if (bc0) begin
        nbc0++;
        // The first BC0 aligns the counter: it is numbered 5 from then on.
        if (ref_bx >= 0) chk(bx == 12'(ref_bx), "internal orbit");
        ref_bx = 5;
      end else if (ref_bx >= 0) chk(bx == 12'(ref_bx), "count");
      if (bx == 0 && ref_bx == 0) nwrap++;
      chk(bx < ORBIT, "range");
      chk(!bc0_err, "no error internal");
      if (ref_bx >= 0) ref_bx = (ref_bx + 1) % ORBIT;
    end
    chk(nbc0 == 4, "four internal BC0s (the first right after reset)");
    chk(nwrap >= 2, "wraps");
    // Phase 2: external BC0 at an arbitrary phase, offset 0.
    @(negedge clk);
    bc0_internal = 1'b0; bc0_offset = 12'd0;
    repeat (1234) @(negedge clk);
    nerr = 0;
    for (int o = 0; o < 4; o++) begin
      int period;
      period = (o == 2) ? ORBIT + 7 : ORBIT;
      bc0_ext = 1'b1;
      @(negedge clk);
      bc0_ext = 1'b0;
      ref_bx = 1;
      for (int c = 1; c < period; c++) begin
        chk(bx == 12'(ref_bx), "external count");
        if (bc0_err) nerr++;
        ref_bx = (ref_bx + 1) % ORBIT;
        @(negedge clk);
      end
      if (bc0_err) nerr++;
    end
    // bc0_err shows in the cycle after the misplaced BC0.
    @(negedge clk);
    if (bc0_err) nerr++;
    chk(nerr == 2, "two BC0 errors: leaving internal mode, shifted orbit");
    chk(orbit_cnt == 32'd8, "orbit count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 40000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
