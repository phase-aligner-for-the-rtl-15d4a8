// tb_pa_input_regfile: self-checking test of the Input Register File.
//
// The test applies 400 clock edges with random data. On each edge the select
// is one-hot at a random position, or all-zero one time in eight. A
// reference array is updated the same way: only the selected word takes the
// data. All four output words are compared with it after every edge. Reset
// must clear every word.
`timescale 1ns/1ps
module tb_pa_input_regfile;
  import pa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  sel_t sel;
  logic [WIDTH-1:0] din;
  logic [WIDTH-1:0] words [DEPTH];
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  pa_input_regfile dut (.clk, .rst_n, .sel, .din, .words);

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
      if (words[k] !== model[k]) begin
        failures++;
        $display("FAIL: %s word %0d got %h expected %h", when, k, words[k], model[k]);
      end
    end
  endtask

  initial begin
    sel = '0; din = '0;
    for (int k = 0; k < DEPTH; k++) model[k] = '0;
    #5 compare("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      sel = ($urandom % 8 == 0) ? '0 : sel_t'(1 << ($urandom % DEPTH));
      din = WIDTH'($urandom);
      #10 clk = 1'b1;
      for (int k = 0; k < DEPTH; k++) if (sel[k]) model[k] = din;
      #1 compare($sformatf("edge %0d", n));
      #9 clk = 1'b0;
    end
    rst_n = 1'b0;
    for (int k = 0; k < DEPTH; k++) model[k] = '0;
    #1 compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
