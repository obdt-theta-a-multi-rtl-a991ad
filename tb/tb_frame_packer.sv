// tb_frame_packer: checks one link's frame builder. Eight slot queues held
// by the testbench feed the packer; every cycle the expected frame is built
// from the queue heads: a hit whose age (bunch crossings since its coarse
// time, modulo 3564) is within the threshold goes into its slot, a late
// hit is dropped and flags bit 200, empty slots carry channel 0xFF, bit 201
// marks BC0. Also checked: one pop per non-empty slot per frame, nothing
// popped while the link is disabled, and the sent/late counters.
`timescale 1ns/1ps
module tb_frame_packer;
  import obdt_pkg::*;
  logic         clk = 1'b0, rst = 1'b1, en = 1'b0, bc0 = 1'b0;
  logic [11:0]  bx = '0, max_latency = 12'd40;
  logic [7:0]   slot_valid, slot_pop;
  hit_t [7:0]   slot_hit;
  logic [201:0] frame;
  logic         frame_valid;
  logic [31:0]  n_sent, n_late;
  int checks = 0, failures = 0;
  hit_t q [8][$];
  int exp_sent = 0, exp_late = 0, nbc0 = 0;

  frame_packer dut (.*);

  always #12.5 clk = ~clk;

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      slot_valid[k] = (q[k].size() > 0);
      slot_hit[k]   = slot_valid[k] ? q[k][0] : '0;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    logic [201:0] exp;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      bit late_any;
      // New hits: coarse time up to 80 crossings in the past.
      for (int k = 0; k < 8; k++)
        if ($urandom_range(0, 99) < 30 && q[k].size() < 8) begin
          int age;
          age = $urandom_range(0, 80);
          q[k].push_back('{ch: 8'($urandom_range(0, 227)),
                           coarse: 12'((int'(bx) - age + 3564) % 3564),
                           fine: 5'($urandom)});
        end
      en  = (t % 500) < 450;
      bc0 = (bx == 12'd0);
      // Expected frame.
      exp = '0; late_any = 0;
      for (int k = 0; k < 8; k++) begin
        hit_t h;
        h = '{ch: 8'hFF, coarse: '0, fine: '0};
        if (q[k].size() > 0) begin
          int age;
          age = (int'(bx) - int'(q[k][0].coarse) + 3564) % 3564;
          if (age > int'(max_latency)) begin late_any = 1; if (en) exp_late++; end
          else begin h = q[k][0]; if (en) exp_sent++; end
        end
        exp[25*k +: 25] = h;
      end
      exp[200] = late_any; exp[201] = bc0;
      #1;
      for (int k = 0; k < 8; k++) chk(slot_pop[k] == (en && q[k].size() > 0), "pop");
      @(negedge clk);
      chk(frame_valid == en, "frame_valid");
      if (en) begin
        chk(frame == exp, "frame content");
        if (bc0) nbc0++;
        for (int k = 0; k < 8; k++) if (q[k].size() > 0) void'(q[k].pop_front());
      end
      bx = (bx == 12'd3563) ? 12'd0 : bx + 12'd1;
    end
    chk(n_sent == 32'(exp_sent), "sent counter");
    chk(n_late == 32'(exp_late), "late counter");
    if (exp_late < 100 || exp_sent < 1000 || nbc0 == 0) begin
      failures++;
      $display("FAIL coverage sent=%0d late=%0d bc0=%0d", exp_sent, exp_late, nbc0);
    end
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
