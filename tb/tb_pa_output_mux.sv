// tb_pa_output_mux: self-checking test of the OR-array Output Mux.
//
// The test first uses the FIFO's own operating case: exactly one non-zero
// word, at every position. The output must equal that word. It then uses
// random words in all four positions. Each output bit must be the OR of
// that bit across the words, computed here bit by bit.
`timescale 1ns/1ps
module tb_pa_output_mux;
  import pa_pkg::*;

  logic [WIDTH-1:0] words [DEPTH];
  logic [WIDTH-1:0] dout, ref_or;
  int checks = 0, failures = 0;

  pa_output_mux dut (.words, .dout);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      int pos = n % DEPTH;
      logic [WIDTH-1:0] w = WIDTH'($urandom);
      for (int k = 0; k < DEPTH; k++) words[k] = (k == pos) ? w : '0;
      #1 checks++;
      if (dout !== w) begin
        failures++;
        $display("FAIL: one-hot pos %0d got %h expected %h", pos, dout, w);
      end
    end
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < DEPTH; k++) words[k] = WIDTH'($urandom);
      for (int b = 0; b < WIDTH; b++)
        ref_or[b] = words[0][b] | words[1][b] | words[2][b] | words[3][b];
      #1 checks++;
      if (dout !== ref_or) begin
        failures++;
        $display("FAIL: random got %h expected %h", dout, ref_or);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
