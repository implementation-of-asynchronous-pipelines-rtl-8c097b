`timescale 1ns/1ps
// async_pipeline -- linear 2-phase bundled-data micropipeline.
//
// STAGES stages of async_stage are chained. The request out of each stage
// reaches the next one through a matched delay element, the acknowledge
// comes straight back, and the data goes from register to register. With no
// processing between the registers the pipeline is an elastic FIFO: tokens
// move forward as far as they can, bunch up behind a slow or stalled
// receiver, and every stage is idle when no token is moving. Flow control
// is automatic: a full pipeline holds rin's transition unacknowledged.
//
// Interface: rst; rin, ain, din from the sender; rout, aout, dout towards
// the receiver. All handshakes are transition signalled (each toggle of a
// request is one data item, each toggle of an acknowledge frees a slot).
// Timing: rout follows the last stage's controller after one matched delay,
// so dout is settled when rout toggles. Default size: three 8-bit stages.
// Reported loops through the stage controllers (ro -> own latch enable, and
// ro -> delay -> next stage -> acknowledge) are the handshake itself and
// are deliberate; there is no clock.
module async_pipeline #(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned STAGES   = 3,
  parameter realtime     DELAY_NS = 1.0
) (
  input  logic             rst,
  input  logic             rin,
  output logic             ain,
  input  logic [WIDTH-1:0] din,
  output logic             rout,
  input  logic             aout,
  output logic [WIDTH-1:0] dout
);
  logic             req_in [STAGES];
  logic             ro     [STAGES];
  logic             ao     [STAGES];
  logic [WIDTH-1:0] data   [STAGES+1];

  assign data[0] = din;
  assign req_in[0] = rin;
  assign ain = ro[0];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic unused_ain;

    async_stage #(.WIDTH(WIDTH)) u_stage (
      .rst  (rst),
      .rin  (req_in[s]),
      .ain  (unused_ain),
      .din  (data[s]),
      .ro   (ro[s]),
      .ao   (ao[s]),
      .dout (data[s+1])
    );

    if (s + 1 < STAGES) begin : g_link
      async_delay #(.DELAY_NS(DELAY_NS)) u_delay (.a(ro[s]), .z(req_in[s+1]));
      assign ao[s] = ro[s+1];
    end else begin : g_last
      async_delay #(.DELAY_NS(DELAY_NS)) u_delay (.a(ro[s]), .z(rout));
      assign ao[s] = aout;
    end
  end

  assign dout = data[STAGES];
endmodule
