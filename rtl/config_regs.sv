// config_regs: configuration and monitoring registers of the FPGA logic.
//
// A 32-bit register file on a simple synchronous bus, meant to be driven by
// the slow-control link decoder. Read/write registers hold the settings of
// the other blocks; read-only registers show their counters; two registers
// per I2C bus issue commands and show status. Register map (word addresses):
//
//   0x00 RO  identifier 0x0BD7_0001
//   0x01 RW  [0] internal BC0, [7:4] link enables (reset 0xF), [8] periodic testpulse
//   0x02 RW  [11:0] latency threshold in bunch crossings (reset 128)
//   0x03 RW  [11:0] bunch-crossing number given to BC0 (reset 0)
//   0x04 RW  [11:0] testpulse bunch crossing      0x05 RW [15:0] testpulse period, orbits (reset 1)
//   0x06 RW  [7:0]  testpulse width (reset 4)     0x07 WO any write: one single testpulse
//   0x20+2i WO I2C bus i command: [7:0] byte, [10:8] command, [11] ack to send
//   0x21+2i RO I2C bus i status:  [0] busy, [1] ack received, [15:8] byte read
//           (i = 0..3 external buses, i = 4 the on-board bus)
//   0x10 orbits  0x11 BC0 errors  0x12 lost hits  0x13 dropped second edges
//   0x14+l hits sent on link l    0x18+l late hits dropped on link l
//   0x1C testpulses sent          0x1D current bunch crossing
//
// Timing: a write takes effect at the clock edge where wr is high; rdata
// holds the addressed register one cycle after rd. Command strobes
// (tp_fire, i2c_cmd_valid) are one cycle long, in the cycle after the write.
// Unmapped addresses read 0.
//
// The board has configuration registers in the FPGA; this map and the bus
// are this design's own.
module config_regs
  import obdt_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr,
  input  logic                   rd,
  input  logic [7:0]             addr,
  input  logic [31:0]            wdata,
  output logic [31:0]            rdata,
  // settings
  output logic                   bc0_internal,
  output logic [N_LINKS-1:0]     link_en,
  output logic [COARSE_W-1:0]    max_latency,
  output logic [COARSE_W-1:0]    bc0_offset,
  output logic                   tp_enable,
  output logic [COARSE_W-1:0]    tp_bx,
  output logic [15:0]            tp_period,
  output logic [7:0]             tp_width,
  output logic                   tp_fire,
  output logic [N_I2C-1:0]       i2c_cmd_valid,
  output logic [N_I2C-1:0][2:0]  i2c_cmd,
  output logic [N_I2C-1:0][7:0]  i2c_wdata,
  output logic [N_I2C-1:0]       i2c_ack_out,
  // status
  input  logic [N_I2C-1:0]       i2c_busy,
  input  logic [N_I2C-1:0]       i2c_ack_in,
  input  logic [N_I2C-1:0][7:0]  i2c_rdata,
  input  logic [31:0]            orbit_cnt,
  input  logic [31:0]            bc0_err_cnt,
  input  logic [31:0]            ovf_cnt,
  input  logic [31:0]            extra_cnt,
  input  logic [N_LINKS-1:0][31:0] n_sent,
  input  logic [N_LINKS-1:0][31:0] n_late,
  input  logic [31:0]            tp_cnt,
  input  logic [COARSE_W-1:0]    bx
);
  localparam logic [31:0] ID = 32'h0BD7_0001;

  always_ff @(posedge clk) begin
    if (rst) begin
      bc0_internal  <= 1'b0;
      link_en       <= '1;
      max_latency   <= COARSE_W'(128);
      bc0_offset    <= '0;
      tp_enable     <= 1'b0;
      tp_bx         <= '0;
      tp_period     <= 16'd1;
      tp_width      <= 8'd4;
      tp_fire       <= 1'b0;
      i2c_cmd_valid <= '0;
      i2c_cmd       <= '0;
      i2c_wdata     <= '0;
      i2c_ack_out   <= '0;
    end else begin
      tp_fire       <= 1'b0;
      i2c_cmd_valid <= '0;
      if (wr) begin
        unique case (addr)
          8'h01: begin
            bc0_internal <= wdata[0];
            link_en      <= wdata[4 +: N_LINKS];
            tp_enable    <= wdata[8];
          end
          8'h02: max_latency <= wdata[COARSE_W-1:0];
          8'h03: bc0_offset  <= wdata[COARSE_W-1:0];
          8'h04: tp_bx       <= wdata[COARSE_W-1:0];
          8'h05: tp_period   <= wdata[15:0];
          8'h06: tp_width    <= wdata[7:0];
          8'h07: tp_fire     <= 1'b1;
          default: begin
            for (int i = 0; i < N_I2C; i++) begin
              if (addr == 8'(8'h20 + 2*i)) begin
                i2c_wdata[i]     <= wdata[7:0];
                i2c_cmd[i]       <= wdata[10:8];
                i2c_ack_out[i]   <= wdata[11];
                i2c_cmd_valid[i] <= 1'b1;
              end
            end
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rdata <= '0;
    end else if (rd) begin
      rdata <= '0;
      unique case (addr)
        8'h00: rdata <= ID;
        8'h01: rdata <= 32'({tp_enable, link_en, 3'b0, bc0_internal});
        8'h02: rdata <= 32'(max_latency);
        8'h03: rdata <= 32'(bc0_offset);
        8'h04: rdata <= 32'(tp_bx);
        8'h05: rdata <= 32'(tp_period);
        8'h06: rdata <= 32'(tp_width);
        8'h10: rdata <= orbit_cnt;
        8'h11: rdata <= bc0_err_cnt;
        8'h12: rdata <= ovf_cnt;
        8'h13: rdata <= extra_cnt;
        8'h1C: rdata <= tp_cnt;
        8'h1D: rdata <= 32'(bx);
        default: begin
          for (int i = 0; i < N_I2C; i++)
            if (addr == 8'(8'h21 + 2*i))
              rdata <= {16'd0, i2c_rdata[i], 6'd0, i2c_ack_in[i], i2c_busy[i]};
          for (int l = 0; l < N_LINKS; l++) begin
            if (addr == 8'(8'h14 + l)) rdata <= n_sent[l];
            if (addr == 8'(8'h18 + l)) rdata <= n_late[l];
          end
        end
      endcase
    end
  end

endmodule
