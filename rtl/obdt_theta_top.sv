// obdt_theta_top: digital design of the OBDT-theta drift-tube readout board.
//
// The board time-stamps the rising edges of 228 drift-tube channels with
// 0.78 ns bins and streams every hit, without any trigger selection, to the
// counting room. Inside the FPGA:
//   tdc_core      640 MHz DDR deserializer and edge encoder per channel;
//                 hits carry {channel, 12-bit bunch crossing, 5-bit fine}
//   bx_counter    coarse time, 0..3563, aligned by an external or internal BC0
//   readout       per-channel FIFOs, round-robin funnels and one frame packer
//                 per link: 8 hits per 25 ns per link, late hits discarded
//   testpulse_gen orbit-synchronous calibration pulse request
//   i2c_master    four external I2C buses and one on-board bus (lpGBT,
//                 GBT-SCA, VTRX+ control)
//   config_regs   settings and counters on a simple register bus
// Beside the FPGA logic, safety_logic models the board's always-on
// protection logic; it shares no signal with the rest.
//
// The link frames (202 user bits per link per 25 ns) leave on frames[] for
// the lpGBT-protocol uplink encoder and transceivers, which are not part of
// this design; the register bus is meant for the slow-control link decoder,
// and fc_testpulse for the fast-command decoder, also outside.
//
// Clocks: clk40 is the LHC bunch clock; clk640 = 16 x clk40 from the same
// PLL (see tdc_core). rst/rst640 are synchronous resets in each domain.
// A hit appears in a frame about five 25 ns cycles after its edge when the
// link is idle.
module obdt_theta_top
  import obdt_pkg::*;
(
  input  logic                        clk640,
  input  logic                        rst640,
  input  logic                        clk40,
  input  logic                        rst,
  input  logic [N_CH-1:0]             din,
  input  logic                        bc0_ext,
  input  logic                        fc_testpulse,
  // register bus
  input  logic                        reg_wr,
  input  logic                        reg_rd,
  input  logic [7:0]                  reg_addr,
  input  logic [31:0]                 reg_wdata,
  output logic [31:0]                 reg_rdata,
  // output link payload
  output logic [N_LINKS-1:0][USER_BITS-1:0] frames,
  output logic [N_LINKS-1:0]          frame_valid,
  // I2C buses (open drain)
  output logic [N_I2C-1:0]            scl_oe,
  output logic [N_I2C-1:0]            sda_oe,
  input  logic [N_I2C-1:0]            scl_i,
  input  logic [N_I2C-1:0]            sda_i,
  // testpulse board
  output logic                        tp_out,
  // safety logic
  input  logic                        safety_clear_n,
  input  logic [1:0]                  ot,
  input  logic                        ov5,
  input  logic                        oc5,
  input  logic                        ov3,
  input  logic                        ext_disable,
  output logic                        reg_en,
  output logic                        mosfet_on,
  output logic                        alarm
);
  logic [COARSE_W-1:0] bx, bc0_offset, max_latency, tp_bx;
  logic                bc0, bc0_err, bc0_internal;
  logic [31:0]         orbit_cnt, bc0_err_cnt, ovf_cnt, extra_cnt, tp_cnt;
  logic [N_CH-1:0]     hit_valid, extra_edge;
  hit_t [N_CH-1:0]     hits;
  logic [N_LINKS-1:0]  link_en;
  logic [N_LINKS-1:0][31:0] n_sent, n_late;
  logic                tp_enable, tp_fire;
  logic [15:0]         tp_period;
  logic [7:0]          tp_width;
  logic [N_I2C-1:0]    i2c_cmd_valid, i2c_ack_out, i2c_busy, i2c_ack_in;
  logic [N_I2C-1:0][2:0] i2c_cmd;
  logic [N_I2C-1:0][7:0] i2c_wdata, i2c_rdata;

  bx_counter u_bx (
    .clk(clk40), .rst(rst), .bc0_ext(bc0_ext), .bc0_internal(bc0_internal),
    .bc0_offset(bc0_offset), .bx(bx), .bc0(bc0), .bc0_err(bc0_err),
    .orbit_cnt(orbit_cnt)
  );

  tdc_core u_tdc (
    .clk640(clk640), .rst640(rst640), .clk40(clk40), .rst(rst),
    .din(din), .bx(bx), .hit_valid(hit_valid), .hits(hits),
    .extra_edge(extra_edge)
  );

  readout u_ro (
    .clk(clk40), .rst(rst), .hit_valid(hit_valid), .hits(hits),
    .link_en(link_en), .bx(bx), .bc0(bc0), .max_latency(max_latency),
    .frames(frames), .frame_valid(frame_valid),
    .n_sent(n_sent), .n_late(n_late), .n_ovf(ovf_cnt)
  );

  testpulse_gen u_tp (
    .clk(clk40), .rst(rst), .bx(bx), .bc0(bc0), .enable(tp_enable),
    .fire(tp_fire || fc_testpulse), .tp_bx(tp_bx), .period(tp_period),
    .width(tp_width), .tp_out(tp_out), .n_pulses(tp_cnt)
  );

  for (genvar i = 0; i < N_I2C; i++) begin : g_i2c
    i2c_master u_i2c (
      .clk(clk40), .rst(rst), .cmd_valid(i2c_cmd_valid[i]), .cmd(i2c_cmd[i]),
      .wdata(i2c_wdata[i]), .ack_out(i2c_ack_out[i]), .busy(i2c_busy[i]),
      .rdata(i2c_rdata[i]), .ack_in(i2c_ack_in[i]),
      .scl_oe(scl_oe[i]), .sda_oe(sda_oe[i]), .scl_i(scl_i[i]), .sda_i(sda_i[i])
    );
  end

  config_regs u_regs (
    .clk(clk40), .rst(rst), .wr(reg_wr), .rd(reg_rd), .addr(reg_addr),
    .wdata(reg_wdata), .rdata(reg_rdata),
    .bc0_internal(bc0_internal), .link_en(link_en), .max_latency(max_latency),
    .bc0_offset(bc0_offset), .tp_enable(tp_enable), .tp_bx(tp_bx),
    .tp_period(tp_period), .tp_width(tp_width), .tp_fire(tp_fire),
    .i2c_cmd_valid(i2c_cmd_valid), .i2c_cmd(i2c_cmd), .i2c_wdata(i2c_wdata),
    .i2c_ack_out(i2c_ack_out), .i2c_busy(i2c_busy), .i2c_ack_in(i2c_ack_in),
    .i2c_rdata(i2c_rdata), .orbit_cnt(orbit_cnt), .bc0_err_cnt(bc0_err_cnt),
    .ovf_cnt(ovf_cnt), .extra_cnt(extra_cnt), .n_sent(n_sent), .n_late(n_late),
    .tp_cnt(tp_cnt), .bx(bx)
  );

  // Monitoring counters.
  always_ff @(posedge clk40) begin
    if (rst) begin
      bc0_err_cnt <= '0;
      extra_cnt   <= '0;
    end else begin
      bc0_err_cnt <= bc0_err_cnt + 32'(bc0_err);
      extra_cnt   <= extra_cnt + 32'($countones(extra_edge));
    end
  end

  safety_logic u_safety (
    .clear_n(safety_clear_n), .ot(ot), .ov5(ov5), .oc5(oc5), .ov3(ov3),
    .ext_disable(ext_disable), .reg_en(reg_en), .mosfet_on(mosfet_on),
    .alarm(alarm)
  );

endmodule
