// tb_tdc_validation: the laboratory validation runs of the TDC, on 16
// channels of tdc_core with the bunch-crossing counter.
//  1 Code density: pulses at times uncorrelated with the clocks; the fine
//    time histogram over all channels must be flat: every bin within 25 %
//    of the mean (differential non-linearity), and the integral
//    non-linearity below 1 bin.
//  2 Delay scan: a pulse at a fixed delay after BC0, the delay stepped by
//    50 ps over 4 ns, 10 repetitions per step. Every repetition gives the
//    same time stamp, the stamp never decreases with the delay, and it
//    advances by the number of sampling edges crossed.
//  3 Repeatability: a pulse at a fixed delay after BC0 is measured, both
//    resets are applied and released at a different 640 MHz phase each
//    time (as after a power cycle or a clock loss), BC0 realigns the
//    counter, and the same pulse must get the same time stamp.
//  4 Clock duty cycle: the code density test is repeated with clk640 high
//    for 55 % of its period (rising edges unchanged). The falling-edge
//    samples then lag by 78 ps, so bins alternate between 781+78 and
//    781-78 ps: the even/odd bin populations must differ by about
//    2*78/781 = 0.2 of the mean, while at 50 % they must not differ.
// The simulated sampling step is 781 ps (640 MHz period 1.562 ns).
`timescale 1ps/1ps
module tb_tdc_validation;
  import obdt_pkg::*;
  localparam int NCH = 16;
  localparam int TB  = 781;
  localparam int T40 = 32 * TB;
  logic            clk640 = 1'b0, clk40 = 1'b0, rst = 1'b1, rst640 = 1'b1;
  logic [NCH-1:0]  din = '0;
  logic            bc0_ext = 1'b0, bc0, bc0_err;
  logic [11:0]     bx;
  logic [31:0]     orbit_cnt;
  logic [NCH-1:0]  hit_valid, extra_edge;
  hit_t [NCH-1:0]  hits;
  int checks = 0, failures = 0;
  int hist [32];
  int nhit = 0;
  int last_ts = -1, last_ch = -1;
  bit collect = 0;

  bx_counter u_bx (.clk(clk40), .rst(rst), .bc0_ext(bc0_ext), .bc0_internal(1'b0),
                   .bc0_offset(12'd0), .bx(bx), .bc0(bc0), .bc0_err(bc0_err),
                   .orbit_cnt(orbit_cnt));
  tdc_core #(.NCH(NCH)) u_tdc (.clk640(clk640), .rst640(rst640), .clk40(clk40), .rst(rst),
                               .din(din), .bx(bx), .hit_valid(hit_valid), .hits(hits),
                               .extra_edge(extra_edge));

  // clk640: rising edges at TB + k*2*TB, high for t_hi ps.
  int t_hi = TB;
  initial begin
    #(TB);
    forever begin
      int h;
      h = t_hi;
      clk640 = 1'b1;
      #(h);
      clk640 = 1'b0;
      #(2 * TB - h);
    end
  end

  // True when the current time falls exactly on a clk640 edge.
  function automatic bit on_edge();
    longint t;
    t = $time;
    return (t % (2 * TB) == TB) || ((t - TB - t_hi) % (2 * TB) == 0);
  endfunction
  initial begin #400; forever #(T40 / 2) clk40 = ~clk40; end

  always @(posedge clk40) begin
    if (!rst) for (int c = 0; c < NCH; c++) if (hit_valid[c]) begin
      nhit++;
      last_ts = int'(hits[c].coarse) * 32 + int'(hits[c].fine);
      last_ch = c;
      if (collect) hist[hits[c].fine]++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Send BC0, then a pulse on channel 3 'delay' ps after the clk40 edge
  // that follows 100 crossings later; return its time stamp.
  task automatic measure(input int delay, output int ts);
    @(negedge clk40); bc0_ext = 1'b1;
    @(negedge clk40); bc0_ext = 1'b0;
    repeat (99) @(posedge clk40);
    #(delay);
    if ($time % TB == 0) #1;
    last_ts = -1;
    din[3] = 1'b1;
    #(40000);
    din[3] = 1'b0;
    repeat (6) @(posedge clk40);
    ts = (last_ch == 3) ? last_ts : -1;
  endtask

  // Pulses at times uncorrelated with the clocks, 1000 per channel.
  task automatic run_density();
    foreach (hist[i]) hist[i] = 0;
    collect = 1;
    for (int c = 0; c < NCH; c++) begin
      fork
        automatic int ch = c;
        for (int p = 0; p < 1000; p++) begin
          #($urandom_range(30000, 90000));
          while (on_edge()) #1;
          din[ch] = 1'b1;
          #($urandom_range(3000, 20000));
          while (on_edge()) #1;
          din[ch] = 1'b0;
        end
      join_none
    end
    wait fork;
    repeat (10) @(posedge clk40);
    collect = 0;
  endtask

  // Relative difference between the mean even-bin and odd-bin populations.
  function automatic real odd_even_split();
    real ev, od;
    ev = 0; od = 0;
    foreach (hist[i]) if (i % 2 == 0) ev += hist[i]; else od += hist[i];
    return (ev > od ? ev - od : od - ev) / ((ev + od) / 2.0);
  endfunction

  task automatic do_reset(input int phase_ps);
    rst = 1'b1; rst640 = 1'b1;
    repeat (5) @(posedge clk40);
    #(phase_ps);
    @(posedge clk640);
    rst640 = 1'b0;
    repeat (2) @(posedge clk40);
    #(phase_ps / 3);
    @(negedge clk40);
    rst = 1'b0;
    repeat (4) @(posedge clk40);
  endtask

  initial begin
    int ts, ts0, prev, base_ts, nbins;
    do_reset(0);
    // ---- 1: code density ----
    run_density();
    begin
      real mean, dnl, worst_dnl, inl, worst_inl;
      mean = 0;
      foreach (hist[i]) mean += hist[i];
      mean /= 32.0;
      worst_dnl = 0; worst_inl = 0; inl = 0;
      foreach (hist[i]) begin
        dnl = (hist[i] - mean) / mean;
        inl += dnl;
        if (dnl < 0) dnl = -dnl;
        if (dnl > worst_dnl) worst_dnl = dnl;
        if ((inl < 0 ? -inl : inl) > worst_inl) worst_inl = (inl < 0 ? -inl : inl);
      end
      $display("code density: %0.0f hits per bin, worst DNL %0.3f LSB, worst INL %0.3f LSB",
               mean, worst_dnl, worst_inl);
      chk(mean * 32 == NCH * 1000, "every pulse measured");
      chk(worst_dnl < 0.25, "flat fine-time distribution");
      chk(worst_inl < 1.0, "INL below one bin");
      $display("  even/odd split at 50 %% duty: %0.3f", odd_even_split());
      chk(odd_even_split() < 0.06, "no even/odd pattern at 50 % duty cycle");
    end
    // ---- 2: delay scan ----
    prev = -1; nbins = 0;
    measure(2000, base_ts);
    for (int d = 2000; d <= 6000; d += 50) begin
      measure(d, ts0);
      for (int r = 1; r < 10; r++) begin
        measure(d, ts);
        chk(ts == ts0, "same time stamp on repetition");
      end
      chk(ts0 >= 0 && ts0 >= prev, "time stamp does not decrease with delay");
      if (ts0 != prev) nbins++;
      // Sampling edges crossed between delay 2000 and d.
      begin
        longint t_ref, t_now;
        t_ref = 2000; t_now = d;
        chk(ts0 - base_ts == int'((t_now + 400) / TB) - int'((t_ref + 400) / TB)
            || ts0 - base_ts == int'((t_now + 400 + TB - 1) / TB) - int'((t_ref + 400 + TB - 1) / TB),
            "advance equals sampling edges crossed");
      end
      prev = ts0;
    end
    chk(nbins >= 5, "scan crosses several bins");
    // ---- 3: repeatability after resets ----
    measure(3333, ts0);
    for (int k = 0; k < 12; k++) begin
      do_reset(k * 997 % T40);
      measure(3333, ts);
      chk(ts == ts0, "same time stamp after reset");
      if (ts != ts0) $display("  reset %0d: %0d instead of %0d", k, ts, ts0);
    end
    // ---- 4: clock duty cycle ----
    @(posedge clk640);
    t_hi = TB + TB / 10;
    run_density();
    begin
      real mean, split, worst;
      mean = 0;
      foreach (hist[i]) mean += hist[i];
      mean /= 32.0;
      split = odd_even_split();
      // Flatness within each parity class.
      worst = 0;
      for (int par = 0; par < 2; par++) begin
        real m;
        m = 0;
        for (int i = par; i < 32; i += 2) m += hist[i];
        m /= 16.0;
        for (int i = par; i < 32; i += 2)
          if ((hist[i] > m ? hist[i] - m : m - hist[i]) / m > worst)
            worst = (hist[i] > m ? hist[i] - m : m - hist[i]) / m;
      end
      $display("duty 55 %%: even/odd split %0.3f (expected %0.3f), worst DNL within a parity %0.3f",
               split, 2.0 * (TB / 10) / TB, worst);
      chk(mean * 32 == NCH * 1000, "every pulse measured at 55 % duty");
      chk(split > 0.14 && split < 0.26, "even/odd split matches the duty cycle");
      chk(worst < 0.25, "flat within each parity");
    end
    t_hi = TB;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd25_000 * 200_000);
    failures++;
    $display("FAIL watchdog");
    // ---- 4: clock duty cycle ----
    @(posedge clk640);
    t_hi = TB + TB / 10;
    run_density();
    begin
      real mean, split, worst;
      mean = 0;
      foreach (hist[i]) mean += hist[i];
      mean /= 32.0;
      split = odd_even_split();
      // Flatness within each parity class.
      worst = 0;
      for (int par = 0; par < 2; par++) begin
        real m;
        m = 0;
        for (int i = par; i < 32; i += 2) m += hist[i];
        m /= 16.0;
        for (int i = par; i < 32; i += 2)
          if ((hist[i] > m ? hist[i] - m : m - hist[i]) / m > worst)
            worst = (hist[i] > m ? hist[i] - m : m - hist[i]) / m;
      end
      $display("duty 55 %%: even/odd split %0.3f (expected %0.3f), worst DNL within a parity %0.3f",
               split, 2.0 * (TB / 10) / TB, worst);
      chk(mean * 32 == NCH * 1000, "every pulse measured at 55 % duty");
      chk(split > 0.14 && split < 0.26, "even/odd split matches the duty cycle");
      chk(worst < 0.25, "flat within each parity");
    end
    t_hi = TB;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
