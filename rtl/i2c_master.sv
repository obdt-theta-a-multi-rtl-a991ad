// i2c_master: byte-level I2C bus master with open-drain outputs.
//
// The controller issues one command at a time: START (also a repeated
// start), STOP, WRITE (8 bits MSB first, then the slave's acknowledge is
// read back into ack_in, 1 = acknowledged) or READ (8 bits into rdata, then
// the master sends acknowledge when ack_out is 1, not-acknowledge when 0).
// Each bit takes four quarter periods of CLK_DIV clock cycles: data is set
// while SCL is low, SCL rises, SDA is sampled at the middle of the high
// phase, SCL falls. With a 40 MHz clock and CLK_DIV = 100 the bus runs at
// 100 kHz.
//
// Interface: cmd_valid starts cmd when busy is low; busy stays high until
// the command is complete. scl_oe/sda_oe pull the line low when 1
// (open drain); scl_i/sda_i read the lines.
//
// The board provides up to four such independent buses (front-end boards,
// pressure ADCs, alignment, RPC slow control). This design's choice: the
// command interface and the bus speed. A slave may stretch the clock (the
// master waits while SCL is released but still low); there is no
// multi-master arbitration.
module i2c_master #(
  parameter int CLK_DIV = 100
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       cmd_valid,
  input  logic [2:0] cmd,
  input  logic [7:0] wdata,
  input  logic       ack_out,
  output logic       busy,
  output logic [7:0] rdata,
  output logic       ack_in,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_i,
  input  logic       sda_i
);
  localparam logic [2:0] CMD_START = 3'd1,
                         CMD_STOP  = 3'd2,
                         CMD_WRITE = 3'd3,
                         CMD_READ  = 3'd4;

  typedef enum logic [2:0] {S_IDLE, S_START, S_STOP, S_BIT} state_t;

  state_t      state;
  logic [15:0] div;
  logic [1:0]  q;        // quarter of the current bit or condition
  logic [3:0]  nbit;     // bit of the byte, 8 = acknowledge
  logic        rd;       // current byte is a read
  logic [7:0]  sh;
  logic        scl, sda; // released (1) or pulled low (0)
  logic        tick;

  assign tick   = (div == 16'(CLK_DIV - 1));
  assign busy   = (state != S_IDLE);
  assign scl_oe = !scl;
  assign sda_oe = !sda;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      div    <= '0;
      q      <= '0;
      nbit   <= '0;
      rd     <= 1'b0;
      sh     <= '0;
      scl    <= 1'b1;
      sda    <= 1'b1;
      rdata  <= '0;
      ack_in <= 1'b0;
    end else if (state == S_IDLE) begin
      div <= '0;
      q   <= '0;
      if (cmd_valid) begin
        unique case (cmd)
          CMD_START: state <= S_START;
          CMD_STOP:  state <= S_STOP;
          CMD_WRITE: begin state <= S_BIT; rd <= 1'b0; sh <= wdata; nbit <= '0; end
          CMD_READ:  begin state <= S_BIT; rd <= 1'b1; sh <= '0;    nbit <= '0; end
          default:   state <= S_IDLE;
        endcase
      end
    end else if (scl && !scl_i) begin
      // A slave holds SCL low (clock stretching): wait.
      div <= div;
    end else begin
      div <= tick ? '0 : div + 1'b1;
      if (tick) begin
        q <= q + 1'b1;
        unique case (state)
          S_START: begin
            // SDA high, SCL high, SDA falls while SCL high, SCL low.
            unique case (q)
              2'd0: begin sda <= 1'b1; end
              2'd1: begin scl <= 1'b1; end
              2'd2: begin sda <= 1'b0; end
              2'd3: begin scl <= 1'b0; state <= S_IDLE; end
            endcase
          end
          S_STOP: begin
            // SDA low, SCL high, SDA rises while SCL high.
            unique case (q)
              2'd0: begin sda <= 1'b0; end
              2'd1: begin scl <= 1'b1; end
              2'd2: begin sda <= 1'b1; end
              2'd3: begin state <= S_IDLE; end
            endcase
          end
          S_BIT: begin
            unique case (q)
              2'd0: begin
                scl <= 1'b0;
                if (nbit == 4'd8) sda <= rd ? !ack_out : 1'b1;
                else              sda <= rd ? 1'b1 : sh[7];
              end
              2'd1: scl <= 1'b1;
              2'd2: begin
                if (nbit == 4'd8) begin
                  if (!rd) ack_in <= !sda_i;
                end else begin
                  sh <= {sh[6:0], rd ? sda_i : 1'b0};
                end
              end
              2'd3: begin
                scl <= 1'b0;
                if (nbit == 4'd8) begin
                  state <= S_IDLE;
                  if (rd) rdata <= sh;
                end
                nbit <= nbit + 1'b1;
              end
            endcase
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
