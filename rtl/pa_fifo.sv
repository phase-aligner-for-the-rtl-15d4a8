// pa_fifo: the 4 x 20 Phase Aligner FIFO prototype.
//
// The FIFO is a dual-clock register file. Each rising edge of INCLK stores
// FIFO_IN in the next free data register. Each rising edge of OUTCLK places
// the oldest stored word on FIFO_OUT, so words leave in the order they came
// in. The structure follows the specification's block diagram:
//   - IADDR and OADDR are 3-bit Gray counters, one on each clock.
//   - Each counter drives an Enable Logic block, which produces the one-hot
//     Sel lines for its register file.
//   - The Input Register File runs on INCLK and the Output Register File on
//     OUTCLK.
//   - An OR-array Output Mux drives FIFO_OUT.
//   - Flag Logic derives FULL and EMPTY from the two addresses.
// No clock is gated. FULL rises after four INCLK edges with no OUTCLK edge
// between them. EMPTY is high when every stored word has been read.
//
// Timing: FIFO_IN is sampled at the INCLK edge. FIFO_OUT shows the
// retrieved word from the OUTCLK edge until the next OUTCLK edge. The flags
// are combinational from the two address registers, so they change just
// after the INCLK or OUTCLK edge that moved an address. The external logic
// must not clock INCLK while FULL is high, nor OUTCLK while EMPTY is high.
// Two assertions check these rules.
//
// The active-low asynchronous reset rst_n is this design's addition. The
// prototype has no reset pin: its 44 I/O pins are the 20 inputs, the 20
// outputs, the two clocks and the two flags. It relies on the FPGA clearing
// every flip-flop at configuration, and rst_n gives that same all-zero, empty
// state. The crossing between the two clocks is the specification's own: the
// flags compare Gray-coded addresses from both domains without
// synchronisers. The FIFO therefore suits clocks that come from a common
// system clock, as in the instrument. Two free-running unrelated clocks would
// need synchronised flags.
module pa_fifo
  import pa_pkg::*;
(
  input  logic             rst_n,
  input  logic             inclk,
  input  logic [WIDTH-1:0] fifo_in,
  output logic             full,
  input  logic             outclk,
  output logic [WIDTH-1:0] fifo_out,
  output logic             empty
);

  gray_addr_t       iaddr, oaddr;
  sel_t             isel, osel;
  logic [WIDTH-1:0] in_words  [DEPTH];
  logic [WIDTH-1:0] out_words [DEPTH];

  pa_addr_counter u_iaddr (.clk(inclk),  .rst_n, .q(iaddr));
  pa_addr_counter u_oaddr (.clk(outclk), .rst_n, .q(oaddr));

  pa_enable_logic u_ienable (.addr(iaddr), .sel(isel));
  pa_enable_logic u_oenable (.addr(oaddr), .sel(osel));

  pa_input_regfile u_infile (
    .clk(inclk), .rst_n, .sel(isel), .din(fifo_in), .words(in_words)
  );

  pa_output_regfile u_outfile (
    .clk(outclk), .rst_n, .sel(osel), .in_words(in_words), .words(out_words)
  );

  pa_output_mux u_mux (.words(out_words), .dout(fifo_out));

  pa_flag_logic u_flags (.iaddr, .oaddr, .full, .empty);

  // Usage rules from the specification: no store while FULL, no retrieval
  // while EMPTY.
  a_no_write_when_full: assert property (@(posedge inclk) disable iff (!rst_n) !full)
    else $error("pa_fifo: INCLK edge while FULL");
  a_no_read_when_empty: assert property (@(posedge outclk) disable iff (!rst_n) !empty)
    else $error("pa_fifo: OUTCLK edge while EMPTY");

endmodule
