// tb_tdc_channel: feeds random 32-sample words (a pulse train with random
// transitions, including edges across word boundaries) and checks every
// output against a bit-by-bit scan done in the testbench: hit present, fine
// time = index of the first 0->1 step, coarse time = bx of the word, channel
// number, and the flag for a second edge. Latency is one cycle.
`timescale 1ns/1ps
module tb_tdc_channel;
  import obdt_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] word = '0;
  logic [11:0] bx = '0;
  logic        hit_valid, extra_edge;
  hit_t        hit;
  int checks = 0, failures = 0;
  int nhits = 0, nextra = 0, nboundary = 0;

  tdc_channel #(.CH_ID(77)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    logic        prev;
    logic        lvl;
    logic [31:0] w;
    int          first, nedge;
    logic [11:0] b;
    prev = 1'b0; lvl = 1'b0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 4000; t++) begin
      // Build a word: flip the level with a small probability per sample.
      for (int i = 0; i < 32; i++) begin
        if ($urandom_range(0, 99) < ((t % 3 == 0) ? 12 : 3)) lvl = ~lvl;
        w[i] = lvl;
      end
      b = 12'($urandom_range(0, 3563));
      @(negedge clk);
      word = w; bx = b;
      // Reference scan.
      first = -1; nedge = 0;
      for (int i = 0; i < 32; i++) begin
        logic p;
        p = (i == 0) ? prev : w[i-1];
        if (!p && w[i]) begin
          if (first < 0) first = i;
          nedge++;
        end
      end
      if (first == 0) nboundary++;
      prev = w[31];
      @(negedge clk);
      checks++;
      if (hit_valid !== (first >= 0) || extra_edge !== (nedge > 1)) begin
        failures++;
        $display("FAIL t=%0d valid=%0b extra=%0b first=%0d nedge=%0d", t, hit_valid, extra_edge, first, nedge);
      end
      if (first >= 0) begin
        nhits++;
        checks++;
        if (hit.fine != 5'(first) || hit.coarse != b || hit.ch != 8'd77) begin
          failures++;
          $display("FAIL t=%0d hit %p expected fine %0d coarse %0d", t, hit, first, b);
        end
      end
      if (nedge > 1) nextra++;
    end
    if (nhits < 500 || nextra < 50 || nboundary < 5) begin
      failures++;
      $display("FAIL coverage hits=%0d extra=%0d boundary=%0d", nhits, nextra, nboundary);
    end
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
