// pa_flag_logic: the FULL and EMPTY flags, computed from IADDR and OADDR.
//
// EMPTY is high when the two Gray addresses are equal. FULL is high when the
// addresses are four steps apart. In Table-1 Gray code that means Q0 is
// equal while Q1 and Q2 both differ. Both equations follow the
// specification. They are combinational, so each flag follows the edge of
// whichever clock moved an address.
//
// Interface: iaddr and oaddr are the two address registers, with q[0] = Q0.
// full and empty are active high. External logic must not pulse INCLK while
// full is high, and must not pulse OUTCLK while empty is high.
module pa_flag_logic
  import pa_pkg::*;
(
  input  gray_addr_t iaddr,
  input  gray_addr_t oaddr,
  output logic       full,
  output logic       empty
);

  gray_addr_t d;  // bitwise difference of the two addresses

  always_comb begin
    d     = iaddr ^ oaddr;
    empty = ~d[0] & ~d[1] & ~d[2];
    full  = ~d[0] &  d[1] &  d[2];
  end

endmodule
