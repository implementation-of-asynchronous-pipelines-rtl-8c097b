`timescale 1ns/1ps
// async_delay -- behavioural model of the matched delay element of a
// bundled-data micropipeline (not synthesizable logic).
//
// A request wire between two stages passes through a delay that is at least
// as long as the worst-case delay of the data path it travels beside, so
// that the data is settled before the receiving stage sees the request
// transition. In an FPGA this is a chain of LUTs or a routed net sized from
// timing analysis; here it is a plain transport of the input to the output
// after DELAY_NS nanoseconds.
//
// Interface: a (request in), z (delayed request out).
// Timing: z follows a after DELAY_NS. The value of DELAY_NS is this design's
// choice; the pipeline only needs it to exceed the data-path delay.
module async_delay #(
  parameter realtime DELAY_NS = 1.0
) (
  input  logic a,
  output logic z
);
  assign #(DELAY_NS * 1ns) z = a;
endmodule
