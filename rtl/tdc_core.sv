// tdc_core: the time digitization module for all input channels.
//
// Every channel has its own 640 MHz DDR deserializer (deser_ddr) and edge
// encoder (tdc_channel). One phase counter in the 640 MHz domain produces the
// 'load' strobe shared by all deserializers (one clk640 cycle in 16), so every
// channel's 32-sample window covers the same 25 ns. The 40 MHz domain takes
// the words at its rising edge and tags hits with the coarse time bx from the
// bunch-crossing counter.
//
// Phase lock: a flag in the 40 MHz domain toggles every cycle; the 640 MHz
// domain samples it through two registers and, on each change, sets the
// phase counter to a fixed value (SYNC_PHASE). The load strobe therefore
// always sits at the same place relative to the clk40 edge, whatever the
// moment either reset was released: after a reset, a clock loss or a power
// cycle, the same signal gets the same time stamp. With SYNC_PHASE = 10 the
// word changes about 8 clk640 cycles before and after each clk40 edge, half
// a period away from both.
//
// Clocks: clk40 and clk640 = 16 x clk40 must come from one PLL with a fixed
// phase. The fixed delay between a signal edge and its time stamp is a
// constant offset removed by calibration.
//
// Interface: din[c] is channel c; hit_valid[c]/hits[c] is its hit, one
// cycle long, about two 25 ns cycles after the edge.
//
// Following the board: 228 channels, one deserializer per channel at 640 MHz
// DDR, 0.78 ns bins, 12-bit coarse time, identical time stamps after clock
// disruptions. This design's choice: the shared load strobe and the way it
// is locked to the 40 MHz clock.
module tdc_core
  import obdt_pkg::*;
#(
  parameter int NCH        = N_CH,
  parameter int SYNC_PHASE = 10
) (
  input  logic                clk640,
  input  logic                rst640,
  input  logic                clk40,
  input  logic                rst,
  input  logic [NCH-1:0]      din,
  input  logic [COARSE_W-1:0] bx,
  output logic [NCH-1:0]      hit_valid,
  output hit_t [NCH-1:0]      hits,
  output logic [NCH-1:0]      extra_edge
);
  logic [3:0] phase;
  logic       load;
  logic       tog40;          // toggles on every clk40 edge
  logic       t1, t2;         // tog40 seen in the 640 MHz domain

  always_ff @(posedge clk40) begin
    if (rst) tog40 <= 1'b0;
    else     tog40 <= ~tog40;
  end

  always_ff @(posedge clk640) begin
    t1 <= tog40;
    t2 <= t1;
    if (rst640)       phase <= '0;
    else if (t1 != t2) phase <= 4'(SYNC_PHASE);
    else              phase <= phase + 1'b1;
  end
  assign load = (phase == 4'd15);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [SAMPLES-1:0] w640, w40;

    deser_ddr u_deser (
      .clk640(clk640), .rst(rst640), .din(din[c]), .load(load), .word(w640)
    );

    // Hand-over into the 40 MHz domain (the word is stable for 25 ns).
    always_ff @(posedge clk40) w40 <= w640;

    tdc_channel #(.CH_ID(c)) u_ch (
      .clk(clk40), .rst(rst), .word(w40), .bx(bx),
      .hit_valid(hit_valid[c]), .hit(hits[c]), .extra_edge(extra_edge[c])
    );
  end

endmodule
