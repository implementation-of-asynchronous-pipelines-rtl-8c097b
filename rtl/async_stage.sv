`timescale 1ns/1ps
// async_stage -- one stage of the proposed 2-phase bundled-data pipeline.
//
// The stage pairs a DLQ controller with a flip-flop register that the
// controller loads. While the stage is empty (ro == ao) a request transition
// on rin passes to ro; that transition both loads din into the register and
// acknowledges the previous stage (ain = ro). The stage then stays closed
// until the next stage acknowledges with a transition on ao.
//
// Interface: rst; rin/ain with din on the input side (ain is the acknowledge
// to the sender); ro/ao with dout on the output side.
// Timing: din must be stable when rin toggles (bundled-data rule); dout is
// valid from the ro transition on. The register holds until the next token.
// Tools report a combinational loop through ro: it is the controller's latch
// feedback (ro sets its own enable), which is how this self-timed control
// works, and it is deliberate.
module async_stage #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             rst,
  input  logic             rin,
  output logic             ain,
  input  logic [WIDTH-1:0] din,
  output logic             ro,
  input  logic             ao,
  output logic [WIDTH-1:0] dout
);
  async_dlq u_ctrl (
    .rst (rst),
    .rin (rin),
    .ao  (ao),
    .ro  (ro)
  );

  async_detff_reg #(.WIDTH(WIDTH)) u_reg (
    .rst (rst),
    .ro  (ro),
    .d   (din),
    .q   (dout)
  );

  assign ain = ro;
endmodule
