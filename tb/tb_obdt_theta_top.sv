// tb_obdt_theta_top: end-to-end test of the whole design at its default size
// (228 channels, 4 links, 5 I2C buses), configured through the register bus.
//
// Every input pulse is recorded with the number n of the first 640 MHz
// sampling edge that sees it (edges every 781 ps here). Every hit read back
// from the link frames must belong to a recorded pulse of its channel, with
// time stamp bx*32 + fine = n + one constant offset (mod one orbit).
// Phases, each counted as a mechanism that must occur:
//   A  random pulses on all channels, internal BC0 (an orbit is crossed)
//   B  all 228 channels fire together (funnel backlog)
//   C  two edges within 25 ns on one channel (second edge dropped, counted)
//   G  testpulse: fast command and periodic mode; the request is looped back
//      into channels 32..63, which must all report the same time stamp
//   H  I2C command through the registers (no slave: not acknowledged)
//   S  safety: an over-temperature flag cuts the regulators until cleared
//   D  link 0 disabled with a short latency threshold: late hits dropped
//   E  link 0 disabled, one channel firing every 26 ns: FIFO overflow
//   F  switch to external BC0 at a new phase: BC0 error counted
`timescale 1ps/1ps
module tb_obdt_theta_top;
  import obdt_pkg::*;
  localparam int TB = 781;
  localparam int MOD = ORBIT_BX * 32;

  logic clk640 = 1'b0, clk40 = 1'b0, rst = 1'b1, rst640 = 1'b1;
  logic [N_CH-1:0] din_tb = '0, din;
  logic bc0_ext = 1'b0, fc_testpulse = 1'b0;
  logic reg_wr = 1'b0, reg_rd = 1'b0;
  logic [7:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [N_LINKS-1:0][USER_BITS-1:0] frames;
  logic [N_LINKS-1:0] frame_valid;
  logic [N_I2C-1:0] scl_oe, sda_oe, scl_i, sda_i;
  logic tp_out;
  logic safety_clear_n = 1'b0, ov5 = 1'b0, oc5 = 1'b0, ov3 = 1'b0, ext_disable = 1'b0;
  logic [1:0] ot = '0;
  logic reg_en, mosfet_on, alarm;

  obdt_theta_top dut (.*);

  always #(TB) clk640 = ~clk640;
  initial begin #400; forever #(8 * 2 * TB) clk40 = ~clk40; end

  // I2C buses with pull-ups and no slave.
  assign scl_i = ~scl_oe;
  assign sda_i = ~sda_oe;

  // Testpulse loop-back into channels 32..63.
  logic tp_loop = 1'b0;
  always_comb begin
    din = din_tb;
    if (tp_loop) din[63:32] = {32{tp_out}};
  end

  int checks = 0, failures = 0;
  typedef struct { int n; bit strict; } exp_t;
  exp_t pend [N_CH][$];
  int  offset; bit have_offset = 0;
  int  nhits = 0, nstrict = 0, tp_hits = 0, tp_bad = 0, tp_ts = -1;
  int  mech [string];
  bit  bad_hit = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Frame monitor.
  always @(posedge clk40) begin
    if (!rst) begin
      for (int l = 0; l < N_LINKS; l++) begin
        if (frame_valid[l]) for (int k = 0; k < SLOTS; k++) begin
          hit_t h;
          int c, ts, d;
          h = frames[l][25*k +: 25];
          if (h.ch != IDLE_CH) begin
            c  = int'(h.ch);
            ts = int'(h.coarse) * 32 + int'(h.fine);
            nhits++;
            if (c >= N_CH || c % 32 != l * 8 + k) begin
              failures++; $display("FAIL hit of channel %0d in link %0d slot %0d", c, l, k);
            end else if (tp_loop && c >= 32 && c < 64) begin
              tp_hits++;
              if (tp_ts < 0) tp_ts = ts;
              else if (ts != tp_ts && ts != (tp_ts + 32 * (ORBIT_BX - 0)) % MOD) tp_bad++;
            end else begin
              bit matched;
              exp_t e;
              matched = 0;
              while (!matched && pend[c].size() > 0) begin
                e = pend[c].pop_front();
                d = ((ts - e.n) % MOD + MOD) % MOD;
                if (!have_offset) begin offset = d; have_offset = 1; end
                if (d == offset) begin matched = 1; if (e.strict) nstrict++; end
                else if (e.strict) begin
                  failures++;
                  $display("FAIL ch %0d: time offset %0d, expected %0d", c, d, offset);
                  matched = 1;
                end
              end
              if (!matched) begin failures++; $display("FAIL ch %0d: hit without pulse", c); end
            end
          end
        end
      end
    end
  end

  // One pulse on channel c, rising 'after' ps from now, 'w' ps wide.
  task automatic pulse(input int c, input int after, input int w, input bit strict);
    fork
      begin
        #(after);
        if ($time % TB == 0) #1;
        pend[c].push_back('{n: int'(($time + TB - 1) / TB), strict: strict});
        din_tb[c] = 1'b1;
        #(w);
        if ($time % TB == 0) #1;
        din_tb[c] = 1'b0;
      end
    join_none
  endtask

  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk40); reg_wr = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk40); reg_wr = 1'b0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk40); reg_rd = 1'b1; reg_addr = a;
    @(negedge clk40); reg_rd = 1'b0; d = reg_rdata;
  endtask

  task automatic bx_wait(input int n);
    repeat (n) @(negedge clk40);
  endtask

  int strict_left;
  initial begin
    logic [31:0] d, d2;
    repeat (3) @(posedge clk640);
    rst640 = 1'b0;
    repeat (3) @(posedge clk40);
    rst = 1'b0;
    safety_clear_n = 1'b1;
    rreg(8'h00, d); chk(d == 32'h0BD7_0001, "identifier");
    wreg(8'h01, 32'h0000_00F1);            // internal BC0, all links
    rreg(8'h10, d);
    // ---- A: random pulses for 4000 crossings ----
    for (int c = 0; c < N_CH; c++) begin
      fork
        automatic int ch = c;
        begin
          longint stop_t;
          stop_t = $time + 64'd4000 * 16 * 2 * TB;
          while ($time < stop_t) begin
            int gap, w;
            gap = $urandom_range(32000, 1500000);
            w   = $urandom_range(5000, 150000);
            #(gap);
            if ($time % TB == 0) #1;
            pend[ch].push_back('{n: int'(($time + TB - 1) / TB), strict: 1});
            din_tb[ch] = 1'b1;
            #(w);
            if ($time % TB == 0) #1;
            din_tb[ch] = 1'b0;
          end
        end
      join_none
    end
    wait fork;
    bx_wait(50);
    rreg(8'h10, d2);
    if (d2 > d) mech["internal BC0"]++;
    // ---- B: burst on all channels ----
    for (int c = 0; c < N_CH; c++) pulse(c, 5000, 60000, 1);
    bx_wait(30);
    mech["burst of 228"]++;
    // ---- C: two edges within 25 ns ----
    rreg(8'h13, d);
    for (int r = 0; r < 6; r++) begin
      pulse(100, 3000 + r * 3100, 3000, 1);
      pulse(100, 3000 + r * 3100 + 7000, 3000, 0);
      bx_wait(8);
    end
    bx_wait(20);
    rreg(8'h13, d2);
    if (d2 > d) mech["second edge dropped"] += int'(d2 - d);
    // ---- G: testpulse, fast command then periodic ----
    tp_loop = 1'b1;
    wreg(8'h04, 32'd200);                  // crossing 200
    wreg(8'h06, 32'd4);                    // 100 ns wide
    @(negedge clk40); fc_testpulse = 1'b1; @(negedge clk40); fc_testpulse = 1'b0;
    bx_wait(ORBIT_BX + 50);
    rreg(8'h1C, d);
    if (d == 32'd1) mech["testpulse by fast command"]++;
    chk(tp_hits == 32 && tp_bad == 0, "32 testpulse responses with one time stamp");
    tp_hits = 0; tp_ts = -1;
    wreg(8'h05, 32'd1);
    wreg(8'h01, 32'h0000_01F1);            // periodic testpulse every orbit
    bx_wait(2 * ORBIT_BX + 100);
    wreg(8'h01, 32'h0000_00F1);
    rreg(8'h1C, d);
    if (d >= 32'd3) mech["periodic testpulse"] += int'(d) - 1;
    chk(tp_hits == 32 * (int'(d) - 1) && tp_bad == 0, "periodic responses share the time stamp");
    bx_wait(10);
    tp_loop = 1'b0;
    // ---- H: I2C command through the registers ----
    wreg(8'h22, 32'h0000_0100);            // bus 1: START
    rreg(8'h23, d); chk(d[0], "I2C busy");
    do begin bx_wait(20); rreg(8'h23, d); end while (d[0]);
    wreg(8'h22, 32'h0000_03A0);            // bus 1: WRITE 0xA0
    do begin bx_wait(50); rreg(8'h23, d); end while (d[0]);
    chk(!d[1], "no slave: not acknowledged");
    wreg(8'h22, 32'h0000_0200);            // STOP
    do begin bx_wait(20); rreg(8'h23, d); end while (d[0]);
    if (!scl_oe[1] && !sda_oe[1]) mech["I2C transaction"]++;
    // ---- S: safety ----
    ot[1] = 1'b1; bx_wait(2); ot[1] = 1'b0; bx_wait(2);
    chk(!reg_en && alarm, "over-temperature latched");
    safety_clear_n = 1'b0; bx_wait(1); safety_clear_n = 1'b1; bx_wait(1);
    chk(reg_en && !alarm, "cleared");
    mech["safety trip"]++;
    // ---- D: late hits on link 0 ----
    rreg(8'h18, d);
    wreg(8'h02, 32'd10);
    wreg(8'h01, 32'h0000_00E1);            // link 0 off
    for (int c = 1; c < 8; c++) pulse(c, 3000, 20000, 0);
    bx_wait(40);
    wreg(8'h01, 32'h0000_00F1);
    bx_wait(20);
    rreg(8'h18, d2);
    if (d2 > d) mech["late hits dropped"] += int'(d2 - d);
    wreg(8'h02, 32'd128);
    // ---- E: overflow on channel 0 ----
    rreg(8'h12, d);
    wreg(8'h01, 32'h0000_00E1);
    for (int p = 0; p < 40; p++) pulse(0, 3000 + p * 26000, 10000, 0);
    bx_wait(60);
    wreg(8'h01, 32'h0000_00F1);
    bx_wait(40);
    rreg(8'h12, d2);
    if (d2 > d) mech["channel FIFO overflow"] += int'(d2 - d);
    // ---- F: external BC0 at a new phase ----
    rreg(8'h11, d);
    wreg(8'h01, 32'h0000_00F0);            // external BC0
    bx_wait(777);
    for (int o = 0; o < 2; o++) begin
      @(negedge clk40); bc0_ext = 1'b1; @(negedge clk40); bc0_ext = 1'b0;
      bx_wait(ORBIT_BX - 2);
    end
    rreg(8'h11, d2);
    $display("BC0 errors before %0d after %0d", d, d2);
    if (d2 == d + 1) mech["external BC0 realignment"]++;
    // The last BC0 was 3566 crossings before the one read here: 3566 mod 3564.
    rreg(8'h1D, d);
    chk(d == 32'd2, "counter aligned to external BC0");
    // ---- results ----
    strict_left = 0;
    for (int c = 0; c < N_CH; c++) foreach (pend[c][i]) if (pend[c][i].strict) strict_left++;
    chk(strict_left == 0, "every pulse measured");
    chk(nstrict > 15000, "enough hits");
    foreach (mech[m]) $display("mechanism %-28s %0d", m, mech[m]);
    begin
      string names [10] = '{"internal BC0", "burst of 228", "second edge dropped",
                            "testpulse by fast command", "periodic testpulse",
                            "I2C transaction", "safety trip", "late hits dropped",
                            "channel FIFO overflow", "external BC0 realignment"};
      foreach (names[i]) begin
        checks++;
        if (!mech.exists(names[i]) || mech[names[i]] == 0) begin
          failures++; $display("FAIL mechanism never happened: %s", names[i]);
        end
      end
    end
    $display("hits %0d, strict pulses matched %0d, time offset %0d bins", nhits, nstrict, offset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd25_000 * 30000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
