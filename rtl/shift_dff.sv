// shift_dff: one stage of the shift chain, a positive-edge D flip-flop.
//
// On each rising edge of its clock c the stage copies its data input i to
// its output o. In the gated register c is the local clock produced by
// clk_gate_xor, so the stage is only clocked when i differs from o.
//
// The asynchronous active-low reset rst_n is an addition of this design:
// it clears the stage to 0 independently of the (possibly stopped) local
// clock, so the register has a known state after power-up.
//
// Ports: c - stage clock; rst_n - asynchronous reset, active low;
// i - data in; o - data out, valid after the rising edge of c.
`timescale 1ns / 1ps

module shift_dff (
  input  logic c,
  input  logic rst_n,
  input  logic i,
  output logic o
);

  always_ff @(posedge c or negedge rst_n) begin
    if (!rst_n) o <= 1'b0;
    else        o <= i;
  end

endmodule
