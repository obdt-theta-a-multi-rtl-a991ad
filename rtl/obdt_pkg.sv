// obdt_pkg: constants and types shared by the OBDT-theta TDC and readout.
//
// The numbers that follow the board definition are the channel count (228),
// the 12-bit coarse counter that wraps after one LHC orbit of 3564 bunch
// crossings, the 5-bit fine time from 32 samples per 25 ns (640 MHz DDR),
// and the 25-bit hit word. The field order inside the hit word, the idle-slot
// code and the frame layout are this design's own choices. The 202-bit frame
// payload is the user-data width of an lpGBT-protocol uplink frame with FEC12
// (about 8.1 Gb/s at 40.078 MHz).
package obdt_pkg;

  localparam int N_CH       = 228;   // input channels
  localparam int CH_W       = 8;     // channel number bits
  localparam int COARSE_W   = 12;    // bunch-crossing counter bits
  localparam int FINE_W     = 5;     // fine time bits
  localparam int SAMPLES    = 32;    // deserializer samples per 25 ns
  localparam int HIT_W      = CH_W + COARSE_W + FINE_W;  // 25
  localparam int ORBIT_BX   = 3564;  // bunch crossings per LHC orbit
  localparam int USER_BITS  = 202;   // user payload per link frame (FEC12)
  localparam int SLOTS      = 8;     // hits per link frame (8 x 25 = 200 bits)
  localparam int N_LINKS    = 4;     // data links
  localparam int N_I2C      = 5;     // I2C buses: 0..3 external, 4 on-board

  // Channel number that marks an empty slot of a link frame.
  localparam logic [CH_W-1:0] IDLE_CH = '1;

  typedef struct packed {
    logic [CH_W-1:0]     ch;
    logic [COARSE_W-1:0] coarse;
    logic [FINE_W-1:0]   fine;
  } hit_t;

  // Bunch crossings between a hit's coarse time and now, modulo one orbit.
  function automatic logic [COARSE_W-1:0] bx_age(input logic [COARSE_W-1:0] now,
                                                 input logic [COARSE_W-1:0] then_bx);
    // Both inputs are below ORBIT_BX, so the wrapped sum fits in COARSE_W bits.
    if (now >= then_bx) return now - then_bx;
    else                return now + COARSE_W'(ORBIT_BX) - then_bx;
  endfunction

endpackage
