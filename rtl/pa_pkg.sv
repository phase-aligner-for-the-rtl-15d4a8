// pa_pkg: constants and types shared by the Phase Aligner FIFO and its parts.
//
// The FIFO is four words deep and 20 bits wide, and it addresses its words
// with 3-bit Gray-code counters. The third bit distinguishes a full FIFO from
// an empty one. Bit q[0] of an address is the code's Q0 column and q[2] its
// Q2 column. The counting order is 000, 100, 110, 010, 011, 111, 101, 001,
// read as Q0 Q1 Q2. Read as q[2:0], this is the ordinary reflected Gray code
// with q[2] as the most significant bit. All of these numbers follow the
// prototype's specification.
package pa_pkg;

  localparam int unsigned WIDTH  = 20;  // data word width (FIFO_IN / FIFO_OUT)
  localparam int unsigned DEPTH  = 4;   // number of data registers per file
  localparam int unsigned ADDR_W = 3;   // Gray address register width

  typedef logic [ADDR_W-1:0] gray_addr_t;  // q[0] = Q0, q[1] = Q1, q[2] = Q2
  typedef logic [DEPTH-1:0]  sel_t;        // one-hot register select

endpackage
