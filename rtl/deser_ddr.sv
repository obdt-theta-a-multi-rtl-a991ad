// deser_ddr: one channel of the 640 MHz double-data-rate deserializer.
//
// The input is sampled on the rising and on the falling edge of clk640, i.e.
// every 0.78 ns, which gives 32 samples per 25 ns bunch crossing. Rising-edge
// and falling-edge samples are shifted into two 16-bit registers; when the
// shared 'load' strobe is high (one clk640 cycle in 16) both are merged,
// interleaved, into the 32-bit output word, which then stays stable for a full
// 25 ns so that the 40 MHz domain can take it at any fixed phase.
//
// Interface: din is the (already differential-received) channel input; word
// bit 0 is the earliest sample of the 25 ns window, bit 31 the latest.
// Timing: word changes one clk640 cycle after load; it holds the 32 samples
// taken in the 16 clk640 periods before that edge.
//
// Following the board: 640 MHz DDR sampling on every channel, 0.78 ns bins.
// This design's choice: it is written as generic logic; in the FPGA the
// input-output deserializer block does the same job.
module deser_ddr #(
  parameter int SAMPLES = obdt_pkg::SAMPLES
) (
  input  logic               clk640,
  input  logic               rst,
  input  logic               din,
  input  logic               load,
  output logic [SAMPLES-1:0] word
);
  localparam int HALF = SAMPLES / 2;

  logic            s_neg;          // sample taken at the falling edge
  logic [HALF-1:0] sh_pos, sh_neg; // newest sample at the top bit

  always_ff @(negedge clk640) s_neg <= din;

  // At a rising edge: the falling-edge sample (half a period old) is earlier
  // than the sample taken now.
  always_ff @(posedge clk640) begin
    if (rst) begin
      sh_pos <= '0;
      sh_neg <= '0;
      word   <= '0;
    end else begin
      sh_pos <= {din,   sh_pos[HALF-1:1]};
      sh_neg <= {s_neg, sh_neg[HALF-1:1]};
      if (load) begin
        for (int i = 0; i < HALF - 1; i++) begin
          word[2*i]   <= sh_neg[i+1];
          word[2*i+1] <= sh_pos[i+1];
        end
        word[SAMPLES-2] <= s_neg;
        word[SAMPLES-1] <= din;
      end
    end
  end

endmodule
