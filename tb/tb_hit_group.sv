// tb_hit_group: checks the store-and-funnel group of 8 channels.
//  A: single hit into an idle group appears at the output 2 cycles later.
//  B: all 8 channels fire in the same cycle, repeatedly; every hit comes
//     out exactly once, in order per channel, and a full burst of 8 leaves
//     in 8 consecutive cycles.
//  C: random traffic with random pops: nothing lost, order kept per channel.
//  D: output not read, 25 hits into one channel: 16 + 4 are stored, 5 are
//     lost and flagged, the 20 stored come out in order.
`timescale 1ns/1ps
module tb_hit_group;
  import obdt_pkg::*;
  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] in_valid = '0;
  hit_t [7:0] in_hit;
  logic       pop = 1'b0;
  logic       out_valid, ovf;
  hit_t       out_hit;
  int checks = 0, failures = 0;
  int sent [8], got [8];
  int nlost, nout;
  bit order_ok;

  hit_group dut (.*);

  always #12.5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Hit words carry the channel in ch and a per-channel sequence in coarse.
  function automatic hit_t mk(int c, int s);
    return '{ch: 8'(c), coarse: 12'(s), fine: 5'(c + s)};
  endfunction

  // Output monitor: counts pops and checks per-channel order.
  always @(posedge clk) begin
    if (!rst) begin
      if (ovf) nlost++;
      if (pop && out_valid) begin
        int c;
        c = int'(out_hit.ch);
        nout++;
        if (c > 7 || out_hit.coarse != 12'(got[c]) || out_hit.fine != 5'(c + got[c])) order_ok = 0;
        else got[c]++;
      end
    end
  end

  initial begin
    order_ok = 1; nlost = 0; nout = 0;
    foreach (sent[i]) begin sent[i] = 0; got[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // A: latency.
    pop = 1'b0;
    in_valid = 8'b0000_0100; in_hit[2] = mk(2, sent[2]++);
    @(negedge clk); in_valid = '0;
    chk(!out_valid, "not yet after 1 cycle");
    @(negedge clk);
    chk(out_valid && out_hit.ch == 8'd2, "out after 2 cycles");
    pop = 1'b1;
    @(negedge clk);
    // B: bursts of all channels.
    for (int b = 0; b < 5; b++) begin
      int run;
      for (int c = 0; c < 8; c++) in_hit[c] = mk(c, sent[c]++);
      in_valid = '1;
      @(negedge clk); in_valid = '0;
      run = 0;
      for (int k = 0; k < 12; k++) begin
        if (out_valid) run++;
        @(negedge clk);
      end
      chk(run == 8, "burst of 8 leaves in 8 cycles");
    end
    // C: random traffic.
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] v;
      pop = ($urandom_range(0, 3) != 0);
      v = '0;
      for (int c = 0; c < 8; c++)
        if ($urandom_range(0, 99) < 6) begin v[c] = 1'b1; in_hit[c] = mk(c, sent[c]++); end
      in_valid = v;
      @(negedge clk);
    end
    in_valid = '0; pop = 1'b1;
    repeat (60) @(negedge clk);
    for (int c = 0; c < 8; c++) chk(got[c] == sent[c], "all hits delivered");
    chk(nlost == 0, "nothing lost at low rate");
    chk(order_ok, "order per channel");
    // D: overflow.
    pop = 1'b0;
    sent[5] = 0; got[5] = 0; nlost = 0;
    for (int k = 0; k < 25; k++) begin
      in_valid = 8'b0010_0000; in_hit[5] = mk(5, sent[5]++);
      @(negedge clk);
    end
    in_valid = '0;
    repeat (3) @(negedge clk);
    chk(nlost == 5, "5 hits lost to the full FIFO");
    nout = 0; pop = 1'b1;
    repeat (40) @(negedge clk);
    chk(nout == 20, "20 hits stored");
    chk(got[5] == 20 && order_ok, "stored hits in order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 10000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
