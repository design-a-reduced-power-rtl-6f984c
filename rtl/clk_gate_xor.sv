// clk_gate_xor: data-driven clock gate for one flip-flop of the shift chain.
//
// The gate compares the flip-flop's data input (i) with its stored output
// (op). Their XOR is the enable: it is 1 only when the next clock edge would
// change the stored bit. The enable is NANDed with the global clock, so
//   oclk = ~((op ^ i) & clk).
// While the enable is 0 the local clock rests at 1 and the flip-flop sees no
// edge at all; while it is 1 the local clock is the inverted global clock, so
// a positive-edge flip-flop on oclk captures at the FALLING edge of clk.
//
// The XOR-then-NAND structure is the one the design is built from; the
// port names (clk, op, i, oclk) follow it too.
//
// Timing rule: the enable must only change while clk is low. A change while
// clk is high moves oclk and can make a false edge. Inside the shift chain
// this holds by construction (every flip-flop updates at the falling clk
// edge, when oclk is already forced high); the serial input of the chain
// has to respect it as well (checked in gated_shift_reg).
//
// Ports: clk - global clock; op - flip-flop output; i - flip-flop data input;
// oclk - gated clock for that flip-flop. Purely combinational.
`timescale 1ns / 1ps

module clk_gate_xor (
  input  logic clk,
  input  logic op,
  input  logic i,
  output logic oclk
);

  logic en;

  always_comb begin
    en   = op ^ i;
    oclk = ~(en & clk);
  end

endmodule
