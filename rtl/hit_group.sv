// hit_group: stores and funnels the hits of a group of channels into one
// frame slot.
//
// Every channel of the group has a small FIFO that absorbs hits while the
// group is busy, e.g. when all its channels fire in the same bunch crossing.
// A round-robin arbiter moves one hit per cycle from a non-empty channel FIFO
// into the group's output buffer, which is read by the link frame packer
// (one hit per 25 ns frame). A hit that meets a full channel FIFO is lost;
// ovf is then high for one cycle.
//
// Interface: in_valid[i]/in_hit[i] are the hit strobes of the group's
// channels; out_valid/out_hit show the head of the output buffer, removed by
// pop. Latency from in_valid to out_valid is two cycles when the group is
// idle.
//
// This design's choice: per-channel FIFOs, round-robin funnelling and the
// buffer depths; the board asks only that simultaneous hits of all channels
// be stored and funnelled to the output link buffers.
module hit_group
  import obdt_pkg::*;
#(
  parameter int N_IN      = 8,
  parameter int CH_DEPTH  = 4,
  parameter int OUT_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_IN-1:0]  in_valid,
  input  hit_t [N_IN-1:0]  in_hit,
  input  logic             pop,
  output logic             out_valid,
  output hit_t             out_hit,
  output logic             ovf
);
  logic [N_IN-1:0] ch_empty, ch_full, ch_pop, grant;
  hit_t [N_IN-1:0] ch_head;
  logic [$clog2(N_IN > 1 ? N_IN : 2)-1:0] gidx;
  logic            out_full, out_empty, move;

  for (genvar i = 0; i < N_IN; i++) begin : g_ch
    sync_fifo #(.W(HIT_W), .DEPTH(CH_DEPTH)) u_fifo (
      .clk(clk), .rst(rst), .push(in_valid[i]), .wdata(in_hit[i]),
      .pop(ch_pop[i]), .rdata(ch_head[i]), .empty(ch_empty[i]), .full(ch_full[i])
    );
  end

  rr_arbiter #(.N(N_IN)) u_arb (
    .clk(clk), .rst(rst), .req(~ch_empty), .advance(move),
    .grant(grant), .grant_idx(gidx)
  );

  assign move   = !out_full && |(~ch_empty);
  assign ch_pop = move ? grant : '0;

  sync_fifo #(.W(HIT_W), .DEPTH(OUT_DEPTH)) u_out (
    .clk(clk), .rst(rst), .push(move), .wdata(ch_head[gidx]),
    .pop(pop), .rdata(out_hit), .empty(out_empty), .full(out_full)
  );

  assign out_valid = !out_empty;

  always_ff @(posedge clk) begin
    if (rst) ovf <= 1'b0;
    else     ovf <= |(in_valid & ch_full);
  end

endmodule
