// tb_pa_flag_logic: self-checking test of the FULL and EMPTY equations.
//
// The test covers all 64 pairs of Gray addresses, at positions i and o in
// the counting sequence. EMPTY must be high exactly when i == o. FULL must
// be high exactly when the input address leads by four: (i - o) mod 8 == 4.
`timescale 1ns/1ps
module tb_pa_flag_logic;
  import pa_pkg::*;

  gray_addr_t iaddr, oaddr;
  logic full, empty;
  int checks = 0, failures = 0;

  pa_flag_logic dut (.iaddr, .oaddr, .full, .empty);

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int o = 0; o < 8; o++) begin
        iaddr = gray_addr_t'(i ^ (i >> 1));
        oaddr = gray_addr_t'(o ^ (o >> 1));
        #1;
        checks += 2;
        if (empty != (i == o)) begin
          failures++;
          $display("FAIL: empty i=%0d o=%0d got %b", i, o, empty);
        end
        if (full != (((i - o + 8) % 8) == 4)) begin
          failures++;
          $display("FAIL: full i=%0d o=%0d got %b", i, o, full);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
