// pa_output_mux: the Output Mux, an array of twenty 4-input OR gates.
//
// At most one output register holds a non-zero word. The mux therefore needs
// no select inputs, and each bit of dout is the OR of that bit across the
// four registers. This follows the specification, whose schematic labels
// the block as an OR array.
//
// Interface: words holds the four output registers. dout is FIFO_OUT. The
// block is purely combinational.
module pa_output_mux
  import pa_pkg::*;
(
  input  logic [WIDTH-1:0] words [DEPTH],
  output logic [WIDTH-1:0] dout
);

  always_comb begin
    dout = '0;
    for (int k = 0; k < DEPTH; k++) dout |= words[k];
  end

endmodule
