// tb_testpulse_gen: checks the testpulse schedule cycle by cycle against a
// list of expected pulses. Periodic mode, period 3 orbits, bunch crossing
// 100, width 4, enabled during orbit 0: pulses in orbits 3, 6 and 9, high in
// crossings 101..104 (one cycle after bx = 100). Then periodic mode off and
// two single requests: one after crossing 100 of orbit 10 (pulse in orbit
// 11), one before crossing 100 of orbit 12 with width 1 (pulse in orbit 12).
`timescale 1ns/1ps
module tb_testpulse_gen;
  logic        clk = 1'b0, rst = 1'b1;
  logic [11:0] bx = '0;
  logic        bc0;
  logic        enable = 1'b0, fire = 1'b0;
  logic [11:0] tp_bx = 12'd100;
  logic [15:0] period = 16'd3;
  logic [7:0]  width = 8'd4;
  logic        tp_out;
  logic [31:0] n_pulses;
  int checks = 0, failures = 0;
  int orbit = 0, nhigh = 0;

  testpulse_gen dut (.*);

  always #12.5 clk = ~clk;
  assign bc0 = (bx == 12'd0) && !rst;

  always @(posedge clk) begin
    if (!rst) begin
      if (bx == 12'd3563) begin bx <= 12'd0; orbit <= orbit + 1; end
      else bx <= bx + 12'd1;
    end
  end

  function automatic bit expected(int o, int b);
    int w;
    w = (o == 12) ? 1 : 4;
    return (o == 3 || o == 6 || o == 9 || o == 11 || o == 12) && b >= 101 && b < 101 + w;
  endfunction

  // Stimulus on the falling edge.
  always @(negedge clk) begin
    if (!rst) begin
      enable <= (orbit < 10) && !(orbit == 0 && bx < 50);
      fire   <= (orbit == 10 && bx == 12'd2000) || (orbit == 12 && bx == 12'd50);
      width  <= (orbit >= 12) ? 8'd1 : 8'd4;
      checks++;
      if (tp_out != expected(orbit, int'(bx))) begin
        failures++;
        $display("FAIL orbit %0d bx %0d tp_out %0b", orbit, bx, tp_out);
      end
      if (tp_out) nhigh++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    wait (orbit == 14);
    checks++;
    if (n_pulses != 32'd5 || nhigh != 4 * 4 + 1) begin
      failures++; $display("FAIL pulses %0d high cycles %0d", n_pulses, nhigh);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25.0 * 3564 * 16);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
