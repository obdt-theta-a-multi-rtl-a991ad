// tb_i2c_master: runs the master against a behavioural I2C slave (address
// 0x50) on an open-drain bus. Checked: a write transaction (address and two
// data bytes acknowledged, bytes received by the slave), a read transaction
// with repeated start (two bytes read, acknowledge then not-acknowledge), a
// wrong address (not acknowledged), START/STOP seen by the slave, the bit
// time (4 x CLK_DIV clock cycles per bit: a byte command takes 36 x 100
// cycles at 40 MHz, i.e. 100 kHz) and a slave that stretches the clock.
`timescale 1ns/1ps
module tb_i2c_master;
  localparam logic [2:0] START = 3'd1, STOP = 3'd2, WRITE = 3'd3, READ = 3'd4;
  logic       clk = 1'b0, rst = 1'b1;
  logic       cmd_valid = 1'b0, ack_out = 1'b0;
  logic [2:0] cmd = '0;
  logic [7:0] wdata = '0;
  logic       busy, ack_in, scl_oe, sda_oe;
  logic [7:0] rdata;
  logic       scl, sda;
  logic       s_sda_low = 1'b0, s_scl_hold = 1'b0;
  int checks = 0, failures = 0;

  i2c_master dut (.clk(clk), .rst(rst), .cmd_valid(cmd_valid), .cmd(cmd), .wdata(wdata),
                  .ack_out(ack_out), .busy(busy), .rdata(rdata), .ack_in(ack_in),
                  .scl_oe(scl_oe), .sda_oe(sda_oe), .scl_i(scl), .sda_i(sda));

  always #12.5 clk = ~clk;

  // Open-drain bus with pull-ups.
  assign scl = !(scl_oe || s_scl_hold);
  assign sda = !(sda_oe || s_sda_low);

  // ---- behavioural slave ----
  typedef enum {SL_IDLE, SL_ADDR, SL_WR, SL_TX} sl_t;
  sl_t        st = SL_IDLE;
  int         cnt = 0, nstart = 0, nstop = 0, nstretch = 0;
  logic [7:0] sh, tx = 8'hA5;
  logic       rw, match, mack;
  logic [7:0] wr_bytes [$];
  bit         stretch_en = 0;

  always @(negedge sda) if (scl) begin st = SL_ADDR; cnt = 0; s_sda_low = 0; nstart++; end
  always @(posedge sda) if (scl) begin st = SL_IDLE; nstop++; end

  always @(posedge scl) begin
    if (st == SL_ADDR || st == SL_WR) begin
      if (cnt < 8) sh = {sh[6:0], sda};
      cnt++;
    end else if (st == SL_TX) begin
      cnt++;
      if (cnt == 9) mack = !sda;
    end
  end

  always @(negedge scl) begin
    if (st == SL_ADDR || st == SL_WR) begin
      if (cnt == 8) begin
        if (st == SL_ADDR) begin
          match = (sh[7:1] == 7'h50); rw = sh[0];
          s_sda_low = match;
        end else begin
          wr_bytes.push_back(sh);
          s_sda_low = 1;
        end
      end else if (cnt == 9) begin
        s_sda_low = 0; cnt = 0;
        if (st == SL_ADDR) begin
          if (!match) st = SL_IDLE;
          else if (rw) begin st = SL_TX; s_sda_low = !tx[7]; end
          else st = SL_WR;
          if (match && stretch_en) begin
            nstretch++;
            s_scl_hold = 1; #10000; s_scl_hold = 0;
          end
        end
      end
    end else if (st == SL_TX) begin
      if (cnt < 8) s_sda_low = !tx[7 - cnt];
      else if (cnt == 8) s_sda_low = 0;
      else begin
        cnt = 0;
        if (mack) begin tx = tx + 8'd1; s_sda_low = !tx[7]; end
        else begin st = SL_IDLE; s_sda_low = 0; end
      end
    end
  end

  // ---- master commands ----
  int t_cmd;
  task automatic do_cmd(input logic [2:0] c, input logic [7:0] d, input logic ao);
    @(negedge clk);
    cmd = c; wdata = d; ack_out = ao; cmd_valid = 1'b1;
    @(negedge clk);
    cmd_valid = 1'b0;
    t_cmd = 1;
    while (busy) begin @(negedge clk); t_cmd++; end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    chk(scl && sda, "bus idle after reset");
    // Write: address 0x50 + W, two bytes.
    do_cmd(START, 0, 0);
    do_cmd(WRITE, 8'hA0, 0); chk(ack_in, "address acknowledged");
    $display("write byte: %0d cycles", t_cmd);
    chk(t_cmd == 36 * 100 + 1, "byte takes 36 quarter periods, plus the accept cycle");
    do_cmd(WRITE, 8'h3C, 0); chk(ack_in, "data acknowledged");
    do_cmd(WRITE, 8'hC3, 0); chk(ack_in, "data acknowledged");
    do_cmd(STOP, 0, 0);
    chk(wr_bytes.size() == 2 && wr_bytes[0] == 8'h3C && wr_bytes[1] == 8'hC3, "slave received bytes");
    chk(nstart == 1 && nstop == 1, "start and stop seen");
    // Read with repeated start and clock stretching after the address.
    stretch_en = 1;
    do_cmd(START, 0, 0);
    do_cmd(WRITE, 8'hA0, 0); chk(ack_in, "address ack");
    do_cmd(START, 0, 0);
    do_cmd(WRITE, 8'hA1, 0); chk(ack_in, "read address ack");
    do_cmd(READ, 0, 1); chk(rdata == 8'hA5, "first byte read");
    $display("read byte after stretch: %0d cycles", t_cmd);
    chk(t_cmd > 36 * 100 + 1 + 150, "master waited for the stretched clock");
    do_cmd(READ, 0, 0); chk(rdata == 8'hA6, "second byte read");
    do_cmd(STOP, 0, 0);
    chk(nstart == 3 && nstop == 2, "repeated start seen");
    chk(nstretch >= 2, "clock stretched");
    stretch_en = 0;
    // Wrong address.
    do_cmd(START, 0, 0);
    do_cmd(WRITE, 8'h42, 0); chk(!ack_in, "wrong address not acknowledged");
    do_cmd(STOP, 0, 0);
    chk(scl && sda, "bus released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(25 * 200000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
