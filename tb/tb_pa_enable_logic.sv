// tb_pa_enable_logic: self-checking test of the Gray-to-one-hot decoder.
//
// The test walks all eight Gray states in counting order, state k being
// k ^ (k >> 1). It expects register k mod 4 to be selected and the select
// to be one-hot.
`timescale 1ns/1ps
module tb_pa_enable_logic;
  import pa_pkg::*;

  gray_addr_t addr;
  sel_t sel;
  int checks = 0, failures = 0;

  pa_enable_logic dut (.addr, .sel);

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      addr = gray_addr_t'(k ^ (k >> 1));
      #1;
      checks++;
      if (sel != sel_t'(1 << (k % 4))) begin
        failures++;
        $display("FAIL: state %0d addr=%b sel=%b", k, addr, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
