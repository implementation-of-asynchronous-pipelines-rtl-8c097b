`timescale 1ns/1ps
// uart_transmitter -- UART transmitter: FIFO -> THR -> TSR.
//
// Bytes written with wr enter the FIFO. The THR pulls the head byte as soon
// as it is empty, and hands it to the TSR the moment the TSR can start a new
// frame, so a full FIFO drains as an unbroken stream of back-to-back frames.
// This staging of FIFO, hold register and shift register is what raises the
// transmit throughput: the line never waits for the host between frames.
//
// Interface: clock, reset (synchronous, active high); start (unit enable);
// tx_in/wr (write a byte); enable, prty (even parity on), stop (two stop
// bits); fifo_empty, ff (FIFO full), lsr (THR empty), temp (frame being
// shifted), tx_out (serial line, idle high).
module uart_transmitter
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned CLKS_PER_BIT_P = CLKS_PER_BIT
) (
  input  logic                  clock,
  input  logic                  reset,
  input  logic                  start,
  input  logic [DATA_BITS-1:0]  tx_in,
  input  logic                  wr,
  input  logic                  enable,
  input  logic                  prty,
  input  logic                  stop,
  output logic                  fifo_empty,
  output logic                  ff,
  output logic                  lsr,
  output logic [FRAME_BITS-1:0] temp,
  output logic                  tx_out
);
  logic [DATA_BITS-1:0] fifo_out, thr_out;
  logic check, send, tsr_empty;

  uart_fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (  // T1
    .clk(clock), .rst(reset), .datain(tx_in), .write_en(wr), .read_en(send),
    .ff_out(fifo_out), .check(check), .fifo_empty(fifo_empty), .full(ff)
  );

  uart_thr #(.WIDTH(DATA_BITS)) u_thr (  // T2
    .clk(clock), .rst(reset), .start(start), .ff_in(fifo_out), .check(check),
    .empty(tsr_empty), .thr_out(thr_out), .send(send), .lsr(lsr)
  );

  uart_tsr #(.CLKS_PER_BIT_P(CLKS_PER_BIT_P)) u_tsr (  // T3
    .clk(clock), .rst(reset), .start(start), .enable(enable), .prty(prty),
    .stop(stop), .thr_in(thr_out), .thr_valid(!lsr), .tsr_empty(tsr_empty),
    .temp(temp), .tx_out(tx_out)
  );
endmodule
