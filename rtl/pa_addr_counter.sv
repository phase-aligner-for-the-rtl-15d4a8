// pa_addr_counter: the 3-bit Gray-code address register (IADDR or OADDR).
//
// Each rising edge of clk moves the register to the next state of the
// eight-state Gray sequence. Read as Q0 Q1 Q2, the sequence is 000, 100, 110,
// 010, 011, 111, 101, 001 and then back to 000. Consecutive states differ in
// one bit, so a reader in the other clock domain never sees a false
// intermediate count. The next-state table and the choice of Gray code follow
// the specification. The FIFO instantiates two of these counters: IADDR on
// INCLK and OADDR on OUTCLK.
//
// Interface: clk is the counting clock. rst_n is an asynchronous, active-low
// reset to state 000, and it is this design's addition. q is the present
// state. It changes only on the rising edge of clk.
module pa_addr_counter
  import pa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output gray_addr_t q
);

  gray_addr_t q_next;

  // Next-state table, written with Q0 Q1 Q2 as {q[0], q[1], q[2]}.
  always_comb begin
    unique case ({q[0], q[1], q[2]})
      3'b000:  {q_next[0], q_next[1], q_next[2]} = 3'b100;
      3'b100:  {q_next[0], q_next[1], q_next[2]} = 3'b110;
      3'b110:  {q_next[0], q_next[1], q_next[2]} = 3'b010;
      3'b010:  {q_next[0], q_next[1], q_next[2]} = 3'b011;
      3'b011:  {q_next[0], q_next[1], q_next[2]} = 3'b111;
      3'b111:  {q_next[0], q_next[1], q_next[2]} = 3'b101;
      3'b101:  {q_next[0], q_next[1], q_next[2]} = 3'b001;
      default: {q_next[0], q_next[1], q_next[2]} = 3'b000;  // 001
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= q_next;

endmodule
