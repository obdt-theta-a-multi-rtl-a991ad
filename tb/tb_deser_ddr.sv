// tb_deser_ddr: checks that the deserializer word holds, in time order, the
// 32 input samples taken on both clock edges in the 16 clk640 periods that
// end with the load edge. The input changes at random between clock edges;
// the testbench records the level present at every edge and compares.
// The sampling clock here has a 1.562 ns period (whole picoseconds).
`timescale 1ps/1ps
module tb_deser_ddr;
  logic        clk640 = 1'b0;
  logic        rst = 1'b1;
  logic        din = 1'b0;
  logic        load;
  logic [31:0] word;
  logic [3:0]  cnt = '0;
  int          checks = 0, failures = 0;
  bit          samp [int];
  int          e = 0;       // edges seen
  int          e_load;
  int          nwords = 0;

  deser_ddr dut (.clk640(clk640), .rst(rst), .din(din), .load(load), .word(word));

  always #781 clk640 = ~clk640;

  assign load = (cnt == 4'd15);
  always @(posedge clk640) cnt <= cnt + 1'b1;

  // Record the input level at every edge.
  always @(clk640) begin
    e++;
    samp[e] = din;
    if (clk640 && load && !rst) e_load = e;
  end

  // Input changes half-way between edges.
  initial begin
    #390;
    forever begin
      din = ($urandom_range(0, 3) == 0) ? ~din : din;
      #781;
    end
  end

  // Check the word one edge after each load edge.
  always @(negedge clk640) begin
    if (!rst && e_load > 40 && e == e_load + 1) begin
      logic [31:0] exp;
      for (int i = 0; i < 32; i++) exp[i] = samp[e_load - 31 + i];
      checks++;
      nwords++;
      if (word !== exp) begin
        failures++;
        $display("FAIL word %h expected %h", word, exp);
      end
    end
  end

  initial begin
    e_load = 0;
    repeat (4) @(posedge clk640);
    rst = 1'b0;
    repeat (16 * 200) @(posedge clk640);
    if (nwords < 150) begin failures++; $display("FAIL only %0d words", nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1562 * 16 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
