// bx_counter: coarse time counter, synchronised to the LHC orbit by BC0.
//
// A 12-bit counter advances once per 25 ns bunch crossing and wraps from
// 3563 to 0, so it never reaches the top of its 4096-count range and stays in
// step with the orbit. BC0 (bunch crossing zero) marks the start of an orbit.
// It is taken either from the bc0_ext input (the timing and control system)
// or from an internal generator that fires every 3564 cycles, in step with
// the counter's own wrap when bc0_offset is 0 (first in the cycle after
// reset); bc0_internal
// selects the source. The crossing that carries BC0 is numbered bc0_offset
// (0 by default): the counter goes on with bc0_offset+1 in the next cycle, so
// once aligned it shows bc0_offset in every BC0 cycle.
//
// bc0_err is raised for one cycle when an external BC0 arrives while the
// counter did not show bc0_offset, i.e. the orbit was lost or
// shifted; the counter then realigns to the new BC0. orbit_cnt counts BC0s.
//
// Following the board: 12-bit counter at 40 MHz, orbit of 3564 crossings,
// external or internal BC0. This design's choice: the offset, the error flag
// and the orbit count.
module bx_counter #(
  parameter int ORBIT_BX = obdt_pkg::ORBIT_BX,
  parameter int COARSE_W = obdt_pkg::COARSE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                bc0_ext,
  input  logic                bc0_internal,
  input  logic [COARSE_W-1:0] bc0_offset,
  output logic [COARSE_W-1:0] bx,
  output logic                bc0,
  output logic                bc0_err,
  output logic [31:0]         orbit_cnt
);
  logic [COARSE_W-1:0] gen_cnt;  // internal orbit generator
  logic                gen_bc0;
  logic [COARSE_W-1:0] bx_next;

  assign gen_bc0 = (gen_cnt == '0);
  assign bc0     = bc0_internal ? gen_bc0 : bc0_ext;

  // Count the counter would reach without BC0.
  always_comb begin
    if (bx == COARSE_W'(ORBIT_BX - 1)) bx_next = '0;
    else                               bx_next = bx + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gen_cnt   <= '0;
      bx        <= '0;
      bc0_err   <= 1'b0;
      orbit_cnt <= '0;
    end else begin
      gen_cnt <= (gen_cnt == COARSE_W'(ORBIT_BX - 1)) ? '0 : gen_cnt + 1'b1;
      bc0_err <= 1'b0;
      if (bc0) begin
        bx        <= (bc0_offset == COARSE_W'(ORBIT_BX - 1)) ? '0 : bc0_offset + 1'b1;
        orbit_cnt <= orbit_cnt + 1;
        if (!bc0_internal && orbit_cnt != 0 && bx != bc0_offset) bc0_err <= 1'b1;
      end else begin
        bx <= bx_next;
      end
    end
  end

endmodule
