// tb_pa_addr_counter: self-checking test of the 3-bit Gray address register.
//
// The reference is the reflected Gray code of a free-running binary count k,
// g = k ^ (k >> 1), with q[2] as the most significant bit. The test resets
// the counter, checks state 000, then clocks it through three full laps.
// After each edge it checks the state against the reference and checks that
// exactly one bit changed. A reset in mid-count must return the counter to
// 000.
`timescale 1ns/1ps
module tb_pa_addr_counter;
  import pa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  gray_addr_t q, prev;
  int checks = 0, failures = 0;

  pa_addr_counter dut (.clk, .rst_n, .q);

  always #20 clk = ~clk;  // 25 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Pulse the asynchronous reset: a falling edge starts it.
  initial #1 rst_n = 1'b0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 check(q == 3'b000, "reset state");
    rst_n = 1'b1;
    for (int k = 1; k <= 24; k++) begin
      prev = q;
      @(posedge clk); #1;
      check(q == gray_addr_t'((k % 8) ^ ((k % 8) >> 1)),
            $sformatf("step %0d: q=%b", k, q));
      check($countones(q ^ prev) == 1, $sformatf("step %0d: one bit changes", k));
    end
    // Spot-check two rows of the Q0 Q1 Q2 table directly.
    rst_n = 1'b0; #1 rst_n = 1'b1;
    check(q == 3'b000, "mid-count reset");
    @(posedge clk); #1 check({q[0], q[1], q[2]} == 3'b100, "000 -> 100");
    repeat (3) @(posedge clk);
    #1 check({q[0], q[1], q[2]} == 3'b011, "010 -> 011");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
