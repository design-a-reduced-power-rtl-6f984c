// gated_shift_reg: serial-in serial-out shift-left register with a
// data-driven clock gate on every flip-flop.
//
// The chain is WIDTH flip-flops long (8 by default). Stage k holds bit k;
// its data input is bit k-1, and stage 0 takes the serial input si. The
// last stage drives the serial output so. Each stage has its own
// clk_gate_xor that compares the stage's data input with its stored value
// and passes the clock only when they differ. A stage whose next value
// equals its present value receives no clock edge at all, which is where
// the clock power is saved: long runs of equal bits stop most of the
// chain's clock.
//
// Timing: with its NAND gate, an enabled local clock is the inverse of clk,
// so every stage that changes does so at the FALLING edge of clk. The
// serial input must be set up before that edge and must only change while
// clk is low (a change while clk is high would move stage 0's local clock);
// an assertion checks this. A bit presented on si before falling edge n
// appears on so right after falling edge n+WIDTH-1, i.e. a latency of WIDTH
// clock cycles, one bit in and one bit out per cycle.
//
// The shift direction, the per-stage XOR/NAND gate and the width of 8
// follow the design this register is built from. The asynchronous reset
// rst_n (active low, clears every stage) is this design's addition.
//
// Ports: clk - global clock; rst_n - asynchronous reset, active low;
// si - serial input; so - serial output.
`timescale 1ns / 1ps

module gated_shift_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic si,
  output logic so
);

  // d[k] is the data input of stage k, d[k+1] its output.
  logic [WIDTH:0]   d;
  logic [WIDTH-1:0] gclk;

  assign d[0] = si;

  for (genvar k = 0; k < WIDTH; k++) begin : g_stage
    clk_gate_xor u_gate (
      .clk  (clk),
      .op   (d[k+1]),
      .i    (d[k]),
      .oclk (gclk[k])
    );

    shift_dff u_ff (
      .c     (gclk[k]),
      .rst_n (rst_n),
      .i     (d[k]),
      .o     (d[k+1])
    );
  end

  assign so = d[WIDTH];

  // The serial input feeds stage 0's clock gate directly: it may only
  // change while clk is low.
  always @(si) begin
    assert (!clk)
      else $error("gated_shift_reg: si changed while clk was high");
  end

endmodule
