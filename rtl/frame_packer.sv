// frame_packer: builds the user-data frame of one output link.
//
// Once per 25 ns bunch crossing the packer takes at most one hit from each of
// its SLOTS group buffers and places it in the matching 25-bit slot of a
// 202-bit frame, the user payload of an lpGBT-protocol uplink frame with
// FEC12 (about 8.1 Gb/s). Hits whose age, the bunch crossings between their
// coarse time and now (modulo one orbit), exceeds max_latency are too late
// to be used downstream: they are removed from the buffer and not sent, and
// the slot stays idle. An idle slot carries channel number 8'hFF, which no
// input channel has.
//
// Frame layout: bits [25*k +: 25] hold slot k (k = 0..7); bit 200 is set
// when a late hit was discarded in this frame; bit 201 marks the frame sent
// in the BC0 crossing.
//
// Interface: slot_valid/slot_hit are the heads of the group buffers,
// slot_pop removes them (combinational). frame/frame_valid are registered
// and valid one cycle after the pop; frame_valid is high every cycle while
// en is high. n_sent and n_late count hits sent and hits discarded.
//
// Following the board: latency threshold on hit delivery, lpGBT FEC12 user
// bandwidth. This design's choice: the slot layout, idle code, flags and
// the default threshold.
module frame_packer
  import obdt_pkg::*;
#(
  parameter int NSLOT = SLOTS,
  parameter int FW    = USER_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [COARSE_W-1:0] bx,
  input  logic                bc0,
  input  logic [COARSE_W-1:0] max_latency,
  input  logic [NSLOT-1:0]    slot_valid,
  input  hit_t [NSLOT-1:0]    slot_hit,
  output logic [NSLOT-1:0]    slot_pop,
  output logic [FW-1:0]       frame,
  output logic                frame_valid,
  output logic [31:0]         n_sent,
  output logic [31:0]         n_late
);
  localparam hit_t IDLE = '{ch: IDLE_CH, coarse: '0, fine: '0};

  logic [NSLOT-1:0] late, send;
  logic [FW-1:0]    f;

  always_comb begin
    for (int k = 0; k < NSLOT; k++) begin
      late[k] = slot_valid[k] && (bx_age(bx, slot_hit[k].coarse) > max_latency);
      send[k] = slot_valid[k] && !late[k];
    end
  end

  assign slot_pop = en ? slot_valid : '0;

  always_comb begin
    f = '0;
    for (int k = 0; k < NSLOT; k++)
      f[HIT_W*k +: HIT_W] = send[k] ? slot_hit[k] : IDLE;
    f[NSLOT*HIT_W]     = |late;
    f[NSLOT*HIT_W + 1] = bc0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      frame       <= '0;
      frame_valid <= 1'b0;
      n_sent      <= '0;
      n_late      <= '0;
    end else begin
      frame_valid <= en;
      if (en) begin
        frame  <= f;
        n_sent <= n_sent + 32'($countones(send));
        n_late <= n_late + 32'($countones(late));
      end
    end
  end

  initial assert (NSLOT * HIT_W + 2 <= FW)
    else $error("frame_packer: %0d slots do not fit in %0d bits", NSLOT, FW);

endmodule
