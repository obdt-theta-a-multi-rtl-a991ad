// tb_readout: checks the readout at its full size (228 channels, 4 links).
//  A: random hits (about 1 MHz per channel): every hit appears exactly once,
//     in link (c mod 32)/8, slot (c mod 32) mod 8, and within the threshold.
//  B: all 228 channels fire in the same bunch crossing: all hits leave within
//     8 frames (7 or 8 channels per slot).
//  C: link 0 disabled for a while: its backlog ages past the threshold and is
//     dropped on re-enable; the late counter matches, and sent + late + lost
//     equals the hits given.
//  D: a second readout built with 5 links (40 groups, 5 or 6 channels
//     each) gets the same 228-channel burst: every hit appears once, in
//     link (c mod 40)/8, slot (c mod 40) mod 8, within 6 frames.
`timescale 1ns/1ps
module tb_readout;
  import obdt_pkg::*;
  localparam int NCH = 228, NL = 4;
  logic                 clk = 1'b0, rst = 1'b1, bc0;
  logic [NCH-1:0]       hit_valid = '0;
  hit_t [NCH-1:0]       hits;
  logic [NL-1:0]        link_en = '1;
  logic [11:0]          bx = '0, max_latency = 12'd128;
  logic [NL-1:0][201:0] frames;
  logic [NL-1:0]        frame_valid;
  logic [NL-1:0][31:0]  n_sent, n_late;
  logic [31:0]          n_ovf;
  int checks = 0, failures = 0;
  int pending [int];          // key: ch*4096 + coarse -> 1
  int given = 0, received = 0, misplaced = 0, too_old = 0, dup = 0;
  int burst_frames;

  readout dut (.*);

  // D: five-link variant, fed with the same hits.
  localparam int NL5 = 5;
  logic [NCH-1:0]        hit_valid5 = '0;
  logic [NL5-1:0][201:0] frames5;
  logic [NL5-1:0]        frame_valid5;
  logic [NL5-1:0][31:0]  n_sent5, n_late5;
  logic [31:0]           n_ovf5;
  int seen5 [NCH];
  int misplaced5 = 0;
  readout #(.NL(NL5)) dut5 (
    .clk(clk), .rst(rst), .bx(bx), .bc0(bc0), .hit_valid(hit_valid5), .hits(hits),
    .link_en('1), .max_latency(max_latency), .frames(frames5),
    .frame_valid(frame_valid5), .n_sent(n_sent5), .n_late(n_late5), .n_ovf(n_ovf5));

  always @(posedge clk) begin
    if (!rst) for (int l = 0; l < NL5; l++) if (frame_valid5[l])
      for (int k = 0; k < 8; k++) begin
        hit_t h;
        h = frames5[l][25*k +: 25];
        if (h.ch != 8'hFF) begin
          seen5[h.ch]++;
          if ((int'(h.ch) % 40) != l * 8 + k) misplaced5++;
        end
      end
  end

  always #12.5 clk = ~clk;
  assign bc0 = (bx == 12'd0);
  always @(posedge clk) bx <= (bx == 12'd3563) ? 12'd0 : bx + 12'd1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Frame monitor.
  always @(posedge clk) begin
    if (!rst) begin
      for (int l = 0; l < NL; l++) begin
        if (frame_valid[l]) begin
          for (int k = 0; k < 8; k++) begin
            hit_t h;
            h = frames[l][25*k +: 25];
            if (h.ch != 8'hFF) begin
              int key, age;
              key = int'(h.ch) * 4096 + int'(h.coarse);
              received++;
              if (!pending.exists(key)) dup++;
              else pending.delete(key);
              if ((int'(h.ch) % 32) != l * 8 + k) misplaced++;
              // The frame was built in the previous crossing.
              age = ((int'(bx) - 1 - int'(h.coarse)) % 3564 + 3564) % 3564;
              if (age > int'(max_latency)) too_old++;
              if (int'(h.fine) != int'(h.ch) % 32) misplaced++;
            end
          end
        end
      end
    end
  end

  task automatic give(input logic [NCH-1:0] v);
    for (int c = 0; c < NCH; c++) begin
      hits[c] = '{ch: 8'(c), coarse: bx, fine: 5'(c % 32)};
      if (v[c]) begin pending[c * 4096 + int'(bx)] = 1; given++; end
    end
    hit_valid = v;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // A: random hits, 1 MHz per channel = 1/40 per crossing.
    for (int t = 0; t < 3000; t++) begin
      logic [NCH-1:0] v;
      for (int c = 0; c < NCH; c++) v[c] = ($urandom_range(0, 39) == 0);
      give(v);
      @(negedge clk);
    end
    hit_valid = '0;
    repeat (40) @(negedge clk);
    chk(pending.size() == 0, "all random hits delivered");
    chk(given > 10000, "enough hits");
    // B: burst on all channels.
    give('1);
    @(negedge clk);
    hit_valid = '0;
    burst_frames = 0;
    while (pending.size() != 0 && burst_frames < 40) begin
      @(negedge clk);
      burst_frames++;
    end
    $display("burst of 228 hits delivered after %0d cycles", burst_frames);
    chk(pending.size() == 0, "burst delivered");
    chk(burst_frames <= 12, "burst leaves within 8 frames plus pipeline");
    chk(n_ovf == 0, "no loss");
    // C: link 0 disabled, backlog turns late.
    link_en = 4'b1110;
    max_latency = 12'd20;
    for (int t = 0; t < 60; t++) begin
      logic [NCH-1:0] v;
      for (int c = 0; c < NCH; c++) v[c] = ($urandom_range(0, 39) == 0);
      give(v);
      @(negedge clk);
    end
    hit_valid = '0;
    repeat (40) @(negedge clk);
    link_en = '1;
    repeat (60) @(negedge clk);
    chk(n_late[0] > 0, "late hits dropped on link 0");
    chk(n_late[0] + n_ovf == 32'(pending.size()), "late + lost = undelivered");
    chk(n_sent[0] + n_sent[1] + n_sent[2] + n_sent[3] == 32'(received), "sent counters");
    chk(32'(received) + n_late[0] + n_late[1] + n_late[2] + n_late[3] + n_ovf == 32'(given), "accounting");
    chk(misplaced == 0, "slot mapping");
    chk(dup == 0, "no duplicates");
    chk(too_old == 0, "latency threshold respected");
    $display("given %0d received %0d late %0d lost %0d", given, received, n_late[0], n_ovf);
    // D: burst into the five-link readout.
    foreach (seen5[c]) seen5[c] = 0;
    max_latency = 12'd128;
    for (int c = 0; c < NCH; c++) hits[c] = '{ch: 8'(c), coarse: bx, fine: 5'(c % 32)};
    hit_valid5 = '1;
    @(negedge clk);
    hit_valid5 = '0;
    burst_frames = 0;
    while (n_sent5[0] + n_sent5[1] + n_sent5[2] + n_sent5[3] + n_sent5[4] < 32'(NCH)
           && burst_frames < 40) begin
      @(negedge clk);
      burst_frames++;
    end
    repeat (2) @(negedge clk);
    $display("5 links: burst of 228 hits delivered after %0d cycles", burst_frames);
    begin
      int once;
      once = 0;
      foreach (seen5[c]) if (seen5[c] == 1) once++;
      chk(once == NCH, "5 links: every hit exactly once");
    end
    chk(misplaced5 == 0, "5 links: slot mapping");
    chk(burst_frames <= 10, "5 links: burst leaves within 6 frames plus pipeline");
    chk(n_ovf5 == 0 && n_late5 == '0, "5 links: no loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
