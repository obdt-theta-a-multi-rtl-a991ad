// tb_safety_logic: checks the protection logic against a table of
// expected outputs: each regulator fault (two temperatures, 5 V
// over-voltage, 5 V over-current) removes the regulator enable and stays
// latched after it goes away until the clear; 3 V over-voltage opens the
// input MOSFET only while present; the optocoupler disable acts only while
// present and raises no alarm.
`timescale 1ns/1ps
module tb_safety_logic;
  logic       clear_n = 1'b0, ov5 = 1'b0, oc5 = 1'b0, ov3 = 1'b0, ext_disable = 1'b0;
  logic [1:0] ot = '0;
  logic       reg_en, mosfet_on, alarm;
  int checks = 0, failures = 0;

  safety_logic dut (.*);

  task automatic expect3(input bit e_reg, input bit e_mos, input bit e_al, input string what);
    #10;
    checks++;
    if (reg_en !== e_reg || mosfet_on !== e_mos || alarm !== e_al) begin
      failures++;
      $display("FAIL %s: reg_en %0b mosfet %0b alarm %0b", what, reg_en, mosfet_on, alarm);
    end
  endtask

  initial begin
    expect3(0, 1, 0, "held in clear");
    clear_n = 1'b1;
    expect3(1, 1, 0, "normal");
    for (int f = 0; f < 4; f++) begin
      case (f)
        0: ot[0] = 1'b1;
        1: ot[1] = 1'b1;
        2: ov5 = 1'b1;
        3: oc5 = 1'b1;
      endcase
      expect3(0, 1, 1, "fault active");
      ot = '0; ov5 = 1'b0; oc5 = 1'b0;
      expect3(0, 1, 1, "fault latched");
      clear_n = 1'b0;
      expect3(0, 1, 0, "clearing");
      clear_n = 1'b1;
      expect3(1, 1, 0, "cleared");
    end
    ov3 = 1'b1;
    expect3(0, 0, 1, "3 V over-voltage");
    ov3 = 1'b0;
    expect3(1, 1, 0, "3 V over-voltage gone, not latched");
    ext_disable = 1'b1;
    expect3(0, 1, 0, "external disable");
    ext_disable = 1'b0;
    expect3(1, 1, 0, "external disable released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
