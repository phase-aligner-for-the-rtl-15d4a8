// pa_output_regfile: the Output Register File, four 20-bit data registers on
// OUTCLK.
//
// On each rising edge of clk, the register whose Sel line is high copies the
// same-numbered word of the Input Register File. Every other register loads
// zero. After an edge, only the word just retrieved is non-zero, so the
// Output Mux can be a plain OR of the four registers. The specification says
// that only the selected register responds and that "the outputs of the
// others are zero". Clearing the unselected registers on the same edge is
// this design's way of meeting both statements. The asynchronous reset to
// zero is also this design's addition. It makes FIFO_OUT read zero until the
// first retrieval.
//
// Interface: clk is OUTCLK. sel is one-hot from the Enable Logic on OADDR.
// in_words holds the four Input Register File words. words[k] is output
// register k, and it is valid right after the rising edge of clk.
module pa_output_regfile
  import pa_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  sel_t                   sel,
  input  logic [WIDTH-1:0]       in_words [DEPTH],
  output logic [WIDTH-1:0]       words    [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) words[k] <= '0;
    end else begin
      for (int k = 0; k < DEPTH; k++)
        words[k] <= sel[k] ? in_words[k] : '0;
    end
  end

endmodule
