`timescale 1ns/1ps
// async_detff_reg -- data register of one asynchronous pipeline stage.
//
// The register is built from flip-flops and is loaded by the stage
// controller: every transition of the controller output ro, rising or
// falling, stores the data input. Two flip-flop banks capture on the rising
// and the falling edge. Each bank stores the new data XORed with the other
// bank, and the output is the XOR of the two banks, so q changes only when
// a bank is written and never on the ro edge alone (no select glitch that
// could hand a stale word to the next stage). This gives a double-edge
// register out of ordinary FPGA flip-flops, which matches 2-phase
// signalling: each transition of the request carries one token.
//
// Interface: rst (active-high, clears both banks), ro (load event), d, q.
// Timing: q shows the value of d at the latest transition of ro.
module async_detff_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             rst,
  input  logic             ro,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] q_rise, q_fall;

  always_ff @(posedge ro or posedge rst)
    if (rst) q_rise <= '0;
    else     q_rise <= d ^ q_fall;

  always_ff @(negedge ro or posedge rst)
    if (rst) q_fall <= '0;
    else     q_fall <= d ^ q_rise;

  assign q = q_rise ^ q_fall;
endmodule
