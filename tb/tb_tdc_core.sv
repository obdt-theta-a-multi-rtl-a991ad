// tb_tdc_core: drives pulses at random times on 16 channels and checks the
// time stamps. Sampling edges of the 640 MHz clock are numbered n = 1, 2,..
// (one every 781 ps here); a rising input edge between edges n-1 and n is
// first seen by sample n. The full time stamp, bx*32 + fine, must equal n
// plus one constant (the pipeline offset, removed by calibration) for every
// hit of every channel, modulo one orbit of 3564*32 bins, and every pulse
// must give exactly one hit on its own channel.
`timescale 1ps/1ps
module tb_tdc_core;
  import obdt_pkg::*;
  localparam int NCH = 16;
  localparam int TB  = 781;          // sample spacing, ps
  logic            clk640 = 1'b0, clk40 = 1'b0, rst = 1'b1, rst640 = 1'b1;
  logic [NCH-1:0]  din = '0;
  logic [11:0]     bx = '0;
  logic [NCH-1:0]  hit_valid, extra_edge;
  hit_t [NCH-1:0]  hits;
  int checks = 0, failures = 0;
  int exp_n [NCH][$];
  int offset;
  bit have_offset = 0;
  int nhits = 0, npulses = 0;

  tdc_core #(.NCH(NCH)) dut (.*);

  always #(TB) clk640 = ~clk640;
  initial begin
    #400;
    forever #(8 * 2 * TB) clk40 = ~clk40;   // 16 x clk640 period, edges between clk640 edges
  end

  always @(posedge clk40) bx <= rst ? 12'd0 : (bx == 12'd3563 ? 12'd0 : bx + 12'd1);

  always @(posedge clk40) begin
    if (!rst) begin
      for (int c = 0; c < NCH; c++) begin
        if (extra_edge[c]) begin failures++; $display("FAIL extra edge ch %0d", c); end
        if (hit_valid[c]) begin
          int ts, d;
          nhits++;
          checks++;
          if (exp_n[c].size() == 0 || hits[c].ch != 8'(c)) begin
            failures++; $display("FAIL unexpected hit on %0d", c);
          end else begin
            ts = int'(hits[c].coarse) * 32 + int'(hits[c].fine);
            d  = ((ts - exp_n[c].pop_front()) % (3564 * 32) + 3564 * 32) % (3564 * 32);
            if (!have_offset) begin offset = d; have_offset = 1; end
            else if (d != offset) begin
              failures++; $display("FAIL ch %0d offset %0d expected %0d", c, d, offset);
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk640);
    rst640 = 1'b0;
    repeat (3) @(posedge clk40);
    rst = 1'b0;
    repeat (4) @(posedge clk40);
    for (int c = 0; c < NCH; c++) begin
      fork
        automatic int ch = c;
        begin
          for (int p = 0; p < 60; p++) begin
            int gap, w, n;
            gap = $urandom_range(32000, 200000);   // >= 32 ns between pulses
            w   = $urandom_range(3000, 150000);    // up to 150 ns wide
            #(gap);
            // Move off the sampling edges (multiples of TB).
            if ($time % TB == 0) #1;
            n = int'(($time + TB - 1) / TB);
            exp_n[ch].push_back(n);
            npulses++;
            din[ch] = 1'b1;
            #(w);
            if ($time % TB == 0) #1;
            din[ch] = 1'b0;
          end
        end
      join_none
    end
    wait fork;
    #(200000);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (exp_n[c].size() != 0) begin failures++; $display("FAIL ch %0d missed %0d", c, exp_n[c].size()); end
    end
    checks++;
    if (nhits != npulses || nhits < 900) begin failures++; $display("FAIL hits %0d pulses %0d", nhits, npulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
