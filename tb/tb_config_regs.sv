// tb_config_regs: checks the register map. Reset values, write/read-back of
// every read/write register and the settings outputs, one-cycle command
// strobes for the single testpulse and the I2C commands (with their
// fields), status and counter registers read from distinct input values,
// the identifier, and 0 for an unmapped address. Read data is checked one
// cycle after the read strobe.
`timescale 1ns/1ps
module tb_config_regs;
  import obdt_pkg::*;
  logic clk = 1'b0, rst = 1'b1, wr = 1'b0, rd = 1'b0;
  logic [7:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic bc0_internal, tp_enable, tp_fire;
  logic [3:0] link_en;
  logic [11:0] max_latency, bc0_offset, tp_bx, bx;
  logic [15:0] tp_period;
  logic [7:0]  tp_width;
  logic [4:0]  i2c_cmd_valid, i2c_ack_out, i2c_busy, i2c_ack_in;
  logic [4:0][2:0] i2c_cmd;
  logic [4:0][7:0] i2c_wdata, i2c_rdata;
  logic [31:0] orbit_cnt, bc0_err_cnt, ovf_cnt, extra_cnt, tp_cnt;
  logic [3:0][31:0] n_sent, n_late;
  int checks = 0, failures = 0;
  int nfire = 0;
  int ncmd [5];

  config_regs dut (.*);

  always #12.5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst) begin
      if (tp_fire) nfire++;
      for (int i = 0; i < 5; i++) if (i2c_cmd_valid[i]) ncmd[i]++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); wr = 1'b1; addr = a; wdata = d;
    @(negedge clk); wr = 1'b0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); rd = 1'b1; addr = a;
    @(negedge clk); rd = 1'b0; d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    // Distinct status values.
    i2c_busy = 5'b10101; i2c_ack_in = 5'b00011;
    for (int i = 0; i < 5; i++) begin
      i2c_rdata[i] = 8'(8'h10 + i);
      ncmd[i] = 0;
    end
    for (int i = 0; i < 4; i++) begin n_sent[i] = 32'(1000 + i); n_late[i] = 32'(2000 + i); end
    orbit_cnt = 32'd11; bc0_err_cnt = 32'd22; ovf_cnt = 32'd33; extra_cnt = 32'd44;
    tp_cnt = 32'd55; bx = 12'd1234;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    chk(!bc0_internal && link_en == 4'hF && max_latency == 12'd128 && bc0_offset == 0 &&
        !tp_enable && tp_period == 16'd1 && tp_width == 8'd4, "reset values");
    rreg(8'h00, d); chk(d == 32'h0BD7_0001, "identifier");
    wreg(8'h01, 32'h0000_0151);
    chk(bc0_internal && link_en == 4'h5 && tp_enable, "control fields");
    rreg(8'h01, d); chk(d == 32'h0000_0151, "control readback");
    wreg(8'h02, 32'd77);   rreg(8'h02, d); chk(d == 32'd77 && max_latency == 12'd77, "latency");
    wreg(8'h03, 32'd9);    rreg(8'h03, d); chk(d == 32'd9 && bc0_offset == 12'd9, "offset");
    wreg(8'h04, 32'd3000); rreg(8'h04, d); chk(d == 32'd3000 && tp_bx == 12'd3000, "tp bx");
    wreg(8'h05, 32'd500);  rreg(8'h05, d); chk(d == 32'd500 && tp_period == 16'd500, "tp period");
    wreg(8'h06, 32'd7);    rreg(8'h06, d); chk(d == 32'd7 && tp_width == 8'd7, "tp width");
    wreg(8'h07, 32'd1);
    @(negedge clk);
    chk(nfire == 1, "one single-pulse strobe");
    for (int i = 0; i < 5; i++) begin
      wreg(8'(8'h20 + 2 * i), 32'h0000_0B00 | 32'(8'hC0 + i));
      chk(i2c_cmd[i] == 3'd3 && i2c_wdata[i] == 8'(8'hC0 + i) && i2c_ack_out[i], "i2c fields");
      rreg(8'(8'h21 + 2 * i), d);
      chk(d == {16'd0, 8'(8'h10 + i), 6'd0, i2c_ack_in[i], i2c_busy[i]}, "i2c status");
    end
    @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      if (ncmd[i] != 1) $display("bus %0d strobes %0d", i, ncmd[i]);
      chk(ncmd[i] == 1, "one command strobe per bus");
    end
    rreg(8'h10, d); chk(d == 32'd11, "orbits");
    rreg(8'h11, d); chk(d == 32'd22, "bc0 errors");
    rreg(8'h12, d); chk(d == 32'd33, "lost");
    rreg(8'h13, d); chk(d == 32'd44, "extra edges");
    for (int l = 0; l < 4; l++) begin
      rreg(8'(8'h14 + l), d); chk(d == 32'(1000 + l), "sent");
      rreg(8'(8'h18 + l), d); chk(d == 32'(2000 + l), "late");
    end
    rreg(8'h1C, d); chk(d == 32'd55, "testpulses");
    rreg(8'h1D, d); chk(d == 32'd1234, "bx");
    rreg(8'h3F, d); chk(d == 32'd0, "unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 2000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
