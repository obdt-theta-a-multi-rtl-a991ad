// rr_arbiter: round-robin arbiter.
//
// Grants one of the requesting inputs per cycle when 'advance' is high. The
// search starts just after the input granted last, so every requester is
// served within N grants. grant is one-hot (or zero when nothing requests)
// and combinational from req and the stored pointer.
module rr_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] last;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = N; k >= 1; k--) begin
      logic [IW-1:0] j;
      j = IW'((int'(last) + k) % N);
      if (req[j]) begin
        grant     = '0;
        grant[j]  = 1'b1;
        grant_idx = j;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                 last <= IW'(N - 1);
    else if (advance && |req) last <= grant_idx;
  end

endmodule
