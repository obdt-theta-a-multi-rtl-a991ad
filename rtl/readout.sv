// readout: funnels the hits of all channels into the output link frames.
//
// The channels are spread over NL links x NSLOT slots = NG groups, channel c
// going to group c mod NG (228 channels, 32 groups: 7 or 8 channels each).
// Neighbouring wires, which a crossing muon tends to hit together, thus land
// in different groups and are sent in parallel. Group g feeds slot g mod NSLOT
// of link g / NSLOT. Each group (hit_group) buffers and funnels its channels'
// hits; each link's frame_packer sends up to NSLOT hits per 25 ns and drops
// hits older than max_latency bunch crossings.
//
// Capacity: 4 links x 8 slots = 32 hits per 25 ns (1.28 G hits/s); with a
// 1 MHz average rate on all 228 channels the input is 0.23 G hits/s.
//
// Interface: hit_valid/hits from the TDC; frames[l]/frame_valid[l] per link;
// n_sent/n_late per link and n_ovf (hits lost to full channel FIFOs) for
// monitoring.
//
// Following the board: funnelling of all channels into 4 lpGBT-protocol
// links with a latency limit. This design's choice: the grouping and sizes.
module readout
  import obdt_pkg::*;
#(
  parameter int NCH       = N_CH,
  parameter int NL        = N_LINKS,
  parameter int NSLOT     = SLOTS,
  parameter int FW        = USER_BITS,
  parameter int CH_DEPTH  = 4,
  parameter int OUT_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NCH-1:0]       hit_valid,
  input  hit_t [NCH-1:0]       hits,
  input  logic [NL-1:0]        link_en,
  input  logic [COARSE_W-1:0]  bx,
  input  logic                 bc0,
  input  logic [COARSE_W-1:0]  max_latency,
  output logic [NL-1:0][FW-1:0] frames,
  output logic [NL-1:0]        frame_valid,
  output logic [NL-1:0][31:0]  n_sent,
  output logic [NL-1:0][31:0]  n_late,
  output logic [31:0]          n_ovf
);
  localparam int NG   = NL * NSLOT;
  localparam int GSZ  = (NCH + NG - 1) / NG;   // channels per group, at most

  logic [NG-1:0] g_valid, g_pop, g_ovf;
  hit_t [NG-1:0] g_hit;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    logic [GSZ-1:0] v;
    hit_t [GSZ-1:0] h;
    for (genvar i = 0; i < GSZ; i++) begin : g_in
      if (i * NG + g < NCH) begin : g_used
        assign v[i] = hit_valid[i*NG + g];
        assign h[i] = hits[i*NG + g];
      end else begin : g_unused
        assign v[i] = 1'b0;
        assign h[i] = '0;
      end
    end
    hit_group #(.N_IN(GSZ), .CH_DEPTH(CH_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_grp (
      .clk(clk), .rst(rst), .in_valid(v), .in_hit(h), .pop(g_pop[g]),
      .out_valid(g_valid[g]), .out_hit(g_hit[g]), .ovf(g_ovf[g])
    );
  end

  for (genvar l = 0; l < NL; l++) begin : g_link
    frame_packer #(.NSLOT(NSLOT), .FW(FW)) u_pack (
      .clk(clk), .rst(rst), .en(link_en[l]), .bx(bx), .bc0(bc0),
      .max_latency(max_latency),
      .slot_valid(g_valid[l*NSLOT +: NSLOT]), .slot_hit(g_hit[l*NSLOT +: NSLOT]),
      .slot_pop(g_pop[l*NSLOT +: NSLOT]),
      .frame(frames[l]), .frame_valid(frame_valid[l]),
      .n_sent(n_sent[l]), .n_late(n_late[l])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) n_ovf <= '0;
    else     n_ovf <= n_ovf + 32'($countones(g_ovf));
  end

endmodule
