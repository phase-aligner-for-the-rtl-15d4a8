// tb_pa_output_regfile: self-checking test of the Output Register File.
//
// The test drives random input words and a random one-hot select, or an
// all-zero select one time in eight. After each clock edge the selected
// register must hold the same-numbered input word, and every other register
// must read zero.
`timescale 1ns/1ps
module tb_pa_output_regfile;
  import pa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  sel_t sel;
  logic [WIDTH-1:0] in_words [DEPTH];
  logic [WIDTH-1:0] words    [DEPTH];
  logic [WIDTH-1:0] expect_w [DEPTH];
  int checks = 0, failures = 0;

  pa_output_regfile dut (.clk, .rst_n, .sel, .in_words, .words);

  // Pulse the asynchronous reset: a falling edge starts it.
  initial #1 rst_n = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string when);
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (words[k] !== expect_w[k]) begin
        failures++;
        $display("FAIL: %s word %0d got %h expected %h", when, k, words[k], expect_w[k]);
      end
    end
  endtask

  initial begin
    sel = '0;
    for (int k = 0; k < DEPTH; k++) begin
      in_words[k] = '0;
      expect_w[k] = '0;
    end
    #5 compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      sel = ($urandom % 8 == 0) ? '0 : sel_t'(1 << ($urandom % DEPTH));
      for (int k = 0; k < DEPTH; k++) in_words[k] = WIDTH'($urandom) | 1;  // never zero
      #10 clk = 1'b1;
      for (int k = 0; k < DEPTH; k++) expect_w[k] = sel[k] ? in_words[k] : '0;
      #1 compare($sformatf("edge %0d", n));
      #9 clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
