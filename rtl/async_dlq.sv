`timescale 1ns/1ps
// async_dlq -- stage controller ("DLQ") of the 2-phase asynchronous pipeline.
//
// The controller is one level-sensitive latch whose enable is derived from
// its own output: the latch is transparent while the stage is empty, that is
// while its request output ro equals the acknowledge ao coming back from the
// next stage. A transition on rin then passes straight to ro, which makes
// ro differ from ao and closes the latch, so the stage holds its token and
// blocks further requests until the next stage answers with a transition on
// ao. The output ro doubles as the acknowledge sent to the previous stage.
// The enable comparison and the latch fit in one LUT with feedback, which is
// what keeps the control small.
//
// Interface: rst (active-high, clears ro), rin (request in), ao (acknowledge
// from the next stage), ro (request out and acknowledge to the previous
// stage). All handshakes use transition (2-phase) signalling.
//
// The latch is intentional: it is the storage element of the controller.
// Because its enable is computed from its own output, lint and synthesis
// report a latch and a logic loop here; both are the circuit as intended.
// The equality test follows the "stage empty" condition of the handshake;
// reset behaviour is this design's own choice.
module async_dlq (
  input  logic rst,
  input  logic rin,
  input  logic ao,
  output logic ro
);
  always_latch begin
    if (rst)
      ro = 1'b0;
    else if (ro == ao)
      ro = rin;
  end
endmodule
