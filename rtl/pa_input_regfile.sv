// pa_input_regfile: the Input Register File, four 20-bit data registers on
// INCLK.
//
// On each rising edge of clk, the one register whose Sel line is high loads
// din. The other registers hold. All four registers are always visible on
// words, which carries 80 bits to the Output Register File. Register k sits
// at word index k. The structure follows the specification: four registers
// with load enables, one clock, and no clock gating. The asynchronous reset
// to zero is this design's addition.
//
// Interface: clk is INCLK. sel is one-hot from the Enable Logic on IADDR.
// din is FIFO_IN. words[k] is register k. Writes take effect at the rising
// edge of clk.
module pa_input_regfile
  import pa_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  sel_t                   sel,
  input  logic [WIDTH-1:0]       din,
  output logic [WIDTH-1:0]       words [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) words[k] <= '0;
    end else begin
      for (int k = 0; k < DEPTH; k++)
        if (sel[k]) words[k] <= din;
    end
  end

endmodule
