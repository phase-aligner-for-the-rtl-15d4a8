// phase_aligner: the four-leg Phase Aligner around the correlator CPU.
//
// Each leg of the antenna cross delivers its samples over its own Data Bus.
// Samples from distant front-end modules arrive later than samples from
// nearby ones. The Phase Aligner holds the early words until every leg has
// delivered the same sample time. The CPU then retrieves all legs with one
// clock edge, so the samples it correlates are in phase.
//
// Structure: each leg is FIFOS_PER_LEG side-by-side 4 x 20 FIFOs (pa_fifo),
// together LEGS * FIFOS_PER_LEG FIFOs. The full deployment has 4 legs of
// 160 bits each, so 32 FIFOs. The reduced deployment has 80 bits per leg
// (FIFOS_PER_LEG = 4). A leg's FIFOs share that leg's store clock
// leg_clk[l], which is the Data Bus's INCLK. Every FIFO shares the single
// retrieval clock cpu_clk, which is the CPU's OUTCLK. The leg count, the
// FIFO count and the single CPU retrieval clock follow the specification.
// The following are this design's choices:
//   - one store clock per leg, rather than one per bus chip;
//   - the flag combining below.
//
// Flags: leg_full[l] is the OR of the FULL flags of leg l's FIFOs. The leg's
// Data Bus must stop clocking while it is high. leg_empty[l] is the OR of
// that leg's EMPTY flags. data_ready is high when no FIFO is empty, which
// means the oldest sample time has arrived from every leg. The CPU should
// clock cpu_clk only while data_ready is high.
//
// Timing: leg_data[l] is sampled on the rising edge of leg_clk[l].
// cpu_data shows the retrieved sample of every leg from one rising edge of
// cpu_clk until the next. The flags are combinational from the FIFO
// addresses. rst_n is an asynchronous, active-low reset that empties every
// FIFO.
module phase_aligner #(
  parameter int unsigned LEGS          = 4,
  parameter int unsigned FIFOS_PER_LEG = 8,
  parameter int unsigned WIDTH         = pa_pkg::WIDTH,
  localparam int unsigned LEG_W        = FIFOS_PER_LEG * WIDTH
) (
  input  logic                        rst_n,
  // Data Bus side, one store clock per leg
  input  logic [LEGS-1:0]             leg_clk,
  input  logic [LEGS-1:0][LEG_W-1:0]  leg_data,
  output logic [LEGS-1:0]             leg_full,
  // CPU side, one retrieval clock for all legs
  input  logic                        cpu_clk,
  output logic [LEGS-1:0][LEG_W-1:0]  cpu_data,
  output logic [LEGS-1:0]             leg_empty,
  output logic                        data_ready
);

  if (WIDTH != pa_pkg::WIDTH) begin : g_width_check
    $error("phase_aligner: WIDTH must equal the FIFO word width");
  end

  logic [LEGS-1:0][FIFOS_PER_LEG-1:0] f_full, f_empty;

  for (genvar l = 0; l < LEGS; l++) begin : g_leg
    for (genvar f = 0; f < FIFOS_PER_LEG; f++) begin : g_fifo
      pa_fifo u_fifo (
        .rst_n,
        .inclk   (leg_clk[l]),
        .fifo_in (leg_data[l][f*WIDTH +: WIDTH]),
        .full    (f_full[l][f]),
        .outclk  (cpu_clk),
        .fifo_out(cpu_data[l][f*WIDTH +: WIDTH]),
        .empty   (f_empty[l][f])
      );
    end
    assign leg_full[l]  = |f_full[l];
    assign leg_empty[l] = |f_empty[l];
  end

  assign data_ready = ~|leg_empty;

endmodule
