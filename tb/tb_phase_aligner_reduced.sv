// tb_phase_aligner_reduced: end-to-end test of the Phase Aligner in the reduced
// deployment: 4 legs of 4 FIFOs, 80 bits per leg, 16 FIFOs. It repeats the
// full-size test (tb_phase_aligner) with FIFOS_PER_LEG = 4.
//
// A 25 MHz system clock, period 40 ns, times everything. Each leg's Data
// Bus clocks its samples in at its own phase in the period, 2 to 27 ns after
// the system edge. This models a propagation delay of up to one leg's
// 25 ns. Legs 1 to 3 also start one to three sample periods late, as on a
// faster system clock. A bus pauses one period in ten at random, and all
// buses pause together for 64 periods in every 320. A bus must stop
// while its leg_full is high. The CPU clocks cpu_clk at 35 ns into a
// period, and only while data_ready is high. It stalls on purpose for
// stretches, so that the legs fill up.
//
// Every word carries {leg, FIFO index, sample number}. Each retrieval must
// deliver the same sample number, in sequence, on all 16 FIFOs at once. The
// flags are checked every period against the counts sent and retrieved.
// The following mechanisms are counted, and each must occur:
//   - a leg FULL stalling its bus;
//   - the CPU waiting for a late leg (phase alignment);
//   - a CPU stall with data ready;
//   - the aligner empty on all legs.
`timescale 1ns/1ps
module tb_phase_aligner_reduced;
  localparam int LEGS = 4, FPL = 4, W = 20, LEG_W = FPL * W;
  localparam int NSAMP = 3000;

  logic rst_n = 1'b1, sysclk = 1'b0, cpu_clk = 1'b0;
  logic [LEGS-1:0] leg_clk = '0, leg_full, leg_empty;
  logic [LEGS-1:0][LEG_W-1:0] leg_data = '0, cpu_data;
  logic data_ready;

  int sent [LEGS];
  int rcv = 0;
  int checks = 0, failures = 0;
  int n_full_stall = 0, n_align_wait = 0, n_cpu_stall = 0, n_all_empty = 0;
  bit started = 1'b0;

  phase_aligner #(.FIFOS_PER_LEG(FPL)) dut (
    .rst_n, .leg_clk, .leg_data, .leg_full,
    .cpu_clk, .cpu_data, .leg_empty, .data_ready
  );

  always #20 sysclk = ~sysclk;

  // System clock periods since time 0; the buses all go quiet for 64 periods
  // in every 320, so the correlator drains the aligner.
  int syscyc = 0;
  always @(posedge sysclk) syscyc++;

  function automatic logic [W-1:0] enc(int l, int f, int n);
    return {2'(l), 3'(f), 15'(n)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #(NSAMP * 40 * 20);
    failures++;
    $display("FAIL: watchdog, %0d samples retrieved", rcv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < LEGS; l++) sent[l] = 0;
    #1 rst_n = 1'b0;
    #30 rst_n = 1'b1;
    started = 1'b1;
  end

  // One Data Bus per leg.
  for (genvar g = 0; g < LEGS; g++) begin : g_bus
    initial begin
      automatic int phase = 2 + 8 * g + (g == 3 ? 1 : 0);  // 2, 10, 18, 27 ns
      wait (started);
      repeat (g) @(posedge sysclk);  // start skew of g sample periods
      while (sent[g] < NSAMP) begin
        @(posedge sysclk);
        #(phase);
        if ($urandom % 10 == 0 || (syscyc / 64) % 5 == 3) continue;  // bus gap
        if (leg_full[g]) begin
          n_full_stall++;
          continue;
        end
        for (int f = 0; f < FPL; f++) leg_data[g][f*W +: W] = enc(g, f, sent[g]);
        #1 leg_clk[g] = 1'b1;
        sent[g]++;
        #8 leg_clk[g] = 1'b0;
      end
    end
  end

  // CPU: one retrieval clock for all legs.
  initial begin
    int cyc = 0;
    wait (started);
    while (rcv < NSAMP) begin
      int min_sent;
      bit stall;
      @(posedge sysclk);
      #35;
      cyc++;
      min_sent = sent[0];
      for (int l = 1; l < LEGS; l++) if (sent[l] < min_sent) min_sent = sent[l];
      for (int l = 0; l < LEGS; l++) begin
        check(leg_full[l]  == (sent[l] - rcv == 4), $sformatf("leg %0d FULL", l));
        check(leg_empty[l] == (sent[l] == rcv),     $sformatf("leg %0d EMPTY", l));
      end
      check(data_ready == (min_sent > rcv), "data_ready");
      if (&leg_empty) n_all_empty++;
      if (!data_ready && !(&leg_empty)) n_align_wait++;
      stall = ((cyc / 50) % 4 == 1) || ($urandom % 8 == 0);
      if (data_ready && stall) n_cpu_stall++;
      if (data_ready && !stall) begin
        cpu_clk = 1'b1;
        #1;
        for (int l = 0; l < LEGS; l++)
          for (int f = 0; f < FPL; f++)
            check(cpu_data[l][f*W +: W] == enc(l, f, rcv),
                  $sformatf("sample %0d leg %0d FIFO %0d got %h", rcv, l, f, cpu_data[l][f*W +: W]));
        rcv++;
        #2 cpu_clk = 1'b0;
      end
    end
    check(n_full_stall > 0, "a leg filled and stalled its bus");
    check(n_align_wait > 0, "the CPU waited for a late leg");
    check(n_cpu_stall  > 0, "the CPU stalled with data ready");
    check(n_all_empty  > 0, "the aligner ran empty");
    $display("samples=%0d full_stalls=%0d align_waits=%0d cpu_stalls=%0d all_empty=%0d",
             rcv, n_full_stall, n_align_wait, n_cpu_stall, n_all_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
