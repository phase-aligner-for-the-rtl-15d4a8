// tb_pa_fifo: self-checking test of the 4 x 20 Phase Aligner FIFO.
//
// Both clocks run at the prototype's 25 MHz rate, with a 40 ns period. Each
// period can hold an INCLK edge at +5 ns and an OUTCLK edge at +15 ns, or
// either one alone. The test has a directed part and a random part.
//   - Directed: after reset, the FIFO must show EMPTY, not FULL, and a zero
//     FIFO_OUT. One INCLK edge must clear EMPTY at once. Exactly four stores
//     must raise FULL, and three must not. Four retrievals must return the
//     words in the order they were stored, each on FIFO_OUT 1 ns after its
//     OUTCLK edge. The first retrieval must drop FULL and the fourth must
//     raise EMPTY.
//   - Random: 3000 periods of stores and retrievals, each permitted by the
//     flags. Every retrieved word is checked against a queue model, and both
//     flags against the model's occupancy. The run must reach FULL and EMPTY
//     several times.
`timescale 1ns/1ps
module tb_pa_fifo;
  import pa_pkg::*;

  logic rst_n = 1'b1, inclk = 1'b0, outclk = 1'b0;
  logic [WIDTH-1:0] fifo_in = '0, fifo_out;
  logic full, empty;
  logic [WIDTH-1:0] q [$];
  logic [WIDTH-1:0] w;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_both = 0;

  pa_fifo dut (.rst_n, .inclk, .fifo_in, .full, .outclk, .fifo_out, .empty);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic store(input logic [WIDTH-1:0] d);
    fifo_in = d;
    #5 inclk = 1'b1;
    q.push_back(d);
    #1 check(!empty, "EMPTY clear right after a store");
    #19 inclk = 1'b0;
    #15;
  endtask

  task automatic retrieve();
    #15 outclk = 1'b1;
    w = q.pop_front();
    #1 check(fifo_out == w, $sformatf("FIFO_OUT %h expected %h", fifo_out, w));
    check(!full, "FULL clear right after a retrieval");
    #19 outclk = 1'b0;
    #5;
  endtask

  // Pulse the asynchronous reset: a falling edge starts it.
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    check(empty && !full && fifo_out == '0, "reset state");
    rst_n = 1'b1;
    #20;
    // Fill: FULL only after the fourth store.
    for (int k = 0; k < 4; k++) begin
      check(!full, $sformatf("not FULL before store %0d", k + 1));
      store(WIDTH'(32'hA0000 + k));
    end
    check(full, "FULL after four stores");
    // Drain in order: EMPTY only after the fourth retrieval.
    for (int k = 0; k < 4; k++) begin
      check(!empty, $sformatf("not EMPTY before retrieval %0d", k + 1));
      retrieve();
    end
    check(empty, "EMPTY after four retrievals");

    // Random traffic with both clocks active in the same period.
    for (int n = 0; n < 3000; n++) begin
      bit do_w, do_r;
      int bias;
      bias = (n / 300) % 2 == 0 ? 3 : 1;  // alternate fill-heavy and drain-heavy phases
      do_w = !full  && ($urandom % 4 < bias + 0);
      do_r = !empty && ($urandom % 4 < 4 - bias);
      check(full  == (q.size() == DEPTH), "FULL matches the model");
      check(empty == (q.size() == 0),     "EMPTY matches the model");
      if (full)  n_full++;
      if (empty) n_empty++;
      if (do_w && do_r) n_both++;
      fifo_in = WIDTH'($urandom);
      #5 if (do_w) begin
        inclk = 1'b1;
        q.push_back(fifo_in);
      end
      #10 if (do_r) begin
        outclk = 1'b1;
        w = q.pop_front();
      end
      #1 if (do_r) check(fifo_out == w, $sformatf("random FIFO_OUT %h expected %h", fifo_out, w));
      #9 inclk = 1'b0;
      #10 outclk = 1'b0;
      #5;
    end
    check(n_full  > 10, $sformatf("FULL reached %0d times", n_full));
    check(n_empty > 10, $sformatf("EMPTY reached %0d times", n_empty));
    check(n_both  > 10, $sformatf("simultaneous store and retrieve %0d times", n_both));
    $display("periods FULL=%0d EMPTY=%0d store+retrieve=%0d", n_full, n_empty, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
