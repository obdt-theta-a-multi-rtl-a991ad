// safety_logic: always-on protection logic of the board.
//
// Analog comparators watch the board and present one digital flag each:
// over-temperature near the regulators and near the FPGA (ot[0], ot[1]),
// 5 V over-voltage and over-current (ov5, oc5), and 3 V input over-voltage
// (ov3, input above 6 V). This logic turns them into actions:
//   - over-temperature, 5 V over-voltage or over-current sets a fault latch
//     that removes the enable of the linear regulators until clear_n (the
//     power-on clear of the always-on supply) goes low;
//   - 3 V over-voltage acts straight on the input MOSFET, without latching,
//     so the regulators are protected for as long as it lasts;
//   - the optocoupler input ext_disable turns the regulators off while high;
//   - alarm is high while any fault is latched or active, for an external
//     system to see.
//
// This logic is not clocked: it must work with the FPGA and its clocks
// powered down. The fault memory is therefore a level-sensitive latch
// (set by a fault, reset by clear_n); the latch that the tools report here
// is intended.
//
// Following the board: which faults act on the regulators, the direct
// MOSFET path for 3 V over-voltage, the optocoupler disable and the ALARM
// output. This design's choice: latching the regulator faults.
module safety_logic (
  input  logic       clear_n,
  input  logic [1:0] ot,
  input  logic       ov5,
  input  logic       oc5,
  input  logic       ov3,
  input  logic       ext_disable,
  output logic       reg_en,
  output logic       mosfet_on,
  output logic       alarm
);
  logic fault_now;
  logic fault_latched;

  assign fault_now = |ot || ov5 || oc5;

  always_latch begin
    if (!clear_n)       fault_latched = 1'b0;
    else if (fault_now) fault_latched = 1'b1;
  end

  assign mosfet_on = !ov3;
  assign reg_en    = clear_n && !fault_latched && !fault_now && !ext_disable && !ov3;
  assign alarm     = fault_latched || fault_now || ov3;

endmodule
