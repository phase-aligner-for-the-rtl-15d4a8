// pa_enable_logic: decodes a 3-bit Gray address into the one-hot Sel lines.
//
// The eight Gray states form two laps over the four data registers. A state
// that is k steps from 000 selects register k mod 4. The specification calls
// this decoder a straightforward decode from Gray to one-hot. The rule
// k mod 4 is this design's choice: it is the mapping under which the flag
// equations mark four writes without a read as FULL. The decoder converts
// the address to binary (b2 = q2, b1 = q2^q1, b0 = q2^q1^q0) and decodes the
// two low bits. The code has been checked against the Q0 Q1 Q2 table.
//
// Interface: addr is the Gray address, with q[0] = Q0. sel is the one-hot
// select, and sel[k] enables data register k. The block is purely
// combinational.
module pa_enable_logic
  import pa_pkg::*;
(
  input  gray_addr_t addr,
  output sel_t       sel
);

  logic [1:0] slot;

  always_comb begin
    slot[1] = addr[2] ^ addr[1];
    slot[0] = addr[2] ^ addr[1] ^ addr[0];
    sel       = '0;
    sel[slot] = 1'b1;
  end

endmodule
