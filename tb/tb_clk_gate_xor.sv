// tb_clk_gate_xor: exhaustive check of the per-flip-flop clock gate.
//
// All eight combinations of clk, op and i are applied, in several orders.
// The expected local clock is worked out here from the gating rule: the
// gate is open only when op and i differ, and an open gate passes the
// inverted clock; a closed gate holds the local clock at 1.
`timescale 1ns / 1ps

module tb_clk_gate_xor;

  logic clk, op, i, oclk;
  int   checks   = 0;
  int   failures = 0;

  clk_gate_xor dut (.clk(clk), .op(op), .i(i), .oclk(oclk));

  function automatic logic expected(logic c, logic o, logic d);
    if (o == d) return 1'b1;   // nothing would change: clock held high
    return c ? 1'b0 : 1'b1;    // open: inverted clock
  endfunction

  task automatic apply(logic c, logic o, logic d);
    clk = c; op = o; i = d;
    #1;
    checks++;
    if (oclk !== expected(c, o, d)) begin
      failures++;
      $display("FAIL clk=%0b op=%0b i=%0b oclk=%0b", c, o, d, oclk);
    end
  endtask

  initial begin
    // Ascending, then descending, then random order.
    for (int v = 0; v < 8; v++) apply(v[2], v[1], v[0]);
    for (int v = 7; v >= 0; v--) apply(v[2], v[1], v[0]);
    for (int n = 0; n < 64; n++) begin
      logic [2:0] r;
      r = 3'($urandom_range(7));
      apply(r[2], r[1], r[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
