// tb_lfsr4: self-checking testbench for the 4-bit LFSR cell.
//
// Checks the counting sequence from the cleared state against a table worked
// out by hand for XNOR feedback of stages 3 and 4 (15 states, never 4'b1111,
// back to 4'b0000 after 15 steps), that each clock input counts only when it
// is selected, that shift mode loads the serial input and presents it at
// dout four clocks later, and the asynchronous clear.
module tb_lfsr4;
  timeunit 1ns;
  timeprecision 1ps;

  logic       clk_a = 0, clk_b = 0, sel_a = 0, shift = 0, din = 0, clr = 0;
  initial #0.5 clr = 1;
  logic [3:0] q;
  logic       dout;
  int         checks = 0, failures = 0;

  // Counting sequence from 4'b0000, one entry per clock.
  localparam logic [3:0] SEQ [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000
  };

  lfsr4 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (q=%b dout=%b)", what, q, dout);
    end
  endtask

  task automatic pulse_a(); #2 clk_a = 1; #2 clk_a = 0; endtask
  task automatic pulse_b(); #5 clk_b = 1; #5 clk_b = 0; endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3 check(q == 4'b0000, "cleared by clr");
    clr = 0;
    // Count on the slow clock, two full cycles.
    for (int i = 1; i <= 30; i++) begin
      pulse_b();
      check(q == SEQ[i % 15], $sformatf("slow count step %0d", i));
      check(q != 4'b1111, "dead state never reached");
      check(dout == q[3], "dout is the last stage");
    end
    // The unselected fast clock must not count.
    pulse_a();
    check(q == SEQ[0], "clk_a ignored while clk_b selected");
    // Select the fast clock; the slow clock is now ignored.
    sel_a = 1;
    for (int i = 1; i <= 7; i++) begin
      pulse_a();
      check(q == SEQ[i], $sformatf("fast count step %0d", i));
    end
    pulse_b();
    check(q == SEQ[7], "clk_b ignored while clk_a selected");
    // Shift mode: load 1,0,1,1 then shift zeros and watch dout.
    sel_a = 0;
    shift = 1;
    din = 1; pulse_b();
    din = 0; pulse_b();
    din = 1; pulse_b();
    din = 1; pulse_b();
    check(q == 4'b1011, "shift loads serial input");
    check(dout == 1'b1, "first bit shifted in reaches dout after four clocks");
    din = 0; pulse_b();
    check(dout == 1'b0, "second bit at dout");
    pulse_b();
    check(dout == 1'b1, "third bit at dout");
    pulse_b();
    check(dout == 1'b1, "fourth bit at dout");
    pulse_b();
    check(q == 4'b0000, "zeros shifted in");
    // Asynchronous clear from a counting state.
    shift = 0;
    pulse_b(); pulse_b(); pulse_b();
    check(q == SEQ[3], "count again after shift");
    #1 clr = 1;
    #1 check(q == 4'b0000, "asynchronous clear");
    clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
