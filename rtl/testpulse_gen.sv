// testpulse_gen: schedules the calibration testpulse.
//
// The testpulse board turns one request into eight synchronous pulses for
// the front-end boards, whose responses are then time-tagged by the TDC.
// For the responses to be comparable from pulse to pulse, every request
// starts at the same bunch crossing of the orbit, tp_bx. In periodic mode
// (enable = 1) a request goes out once every 'period' orbits (period 0 or 1:
// every orbit); a 'fire' pulse (a fast command) asks for a single request at
// the next tp_bx. The request lasts 'width' bunch crossings (at least one).
//
// Interface: bx/bc0 from the bunch-crossing counter; tp_out is registered
// and rises one cycle after the cycle in which bx equals tp_bx; n_pulses
// counts requests.
//
// Following the board: the FPGA generates the testpulse and fast commands
// can activate the calibration. This design's choice: the orbit-synchronous
// scheduling and the registers that set it.
module testpulse_gen
  import obdt_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [COARSE_W-1:0] bx,
  input  logic                bc0,
  input  logic                enable,
  input  logic                fire,
  input  logic [COARSE_W-1:0] tp_bx,
  input  logic [15:0]         period,
  input  logic [7:0]          width,
  output logic                tp_out,
  output logic [31:0]         n_pulses
);
  logic [15:0] orbits;   // BC0s counted since the last periodic pulse
  logic        pending;  // single pulse requested
  logic [7:0]  left;     // bunch crossings of the pulse still to go
  logic        due, start;
  logic [16:0] seen;     // orbits since the last periodic pulse, this one included

  // The BC0 of this cycle is counted already.
  assign seen  = {1'b0, orbits} + 17'(bc0);
  assign due   = enable && (seen >= ((period == 0) ? 17'd1 : {1'b0, period}));
  assign start = (bx == tp_bx) && (due || pending || fire) && (left == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      orbits   <= '0;
      pending  <= 1'b0;
      left     <= '0;
      tp_out   <= 1'b0;
      n_pulses <= '0;
    end else begin
      if (fire) pending <= 1'b1;
      if (start) begin
        pending  <= 1'b0;
        left     <= (width == 0) ? 8'd0 : width - 8'd1;
        tp_out   <= 1'b1;
        n_pulses <= n_pulses + 1;
        if (due)                orbits <= '0;
        else if (bc0 && enable) orbits <= orbits + 1'b1;
      end else begin
        if (left != 0) left <= left - 1'b1;
        else           tp_out <= 1'b0;
        if (bc0 && enable) orbits <= orbits + 1'b1;
      end
    end
  end

endmodule
