`timescale 1ns/1ps
// uart_receiver -- UART receiver: sampling block -> RHR -> receive FIFO,
// with a status register for parity and framing errors.
//
// The sampling block turns the serial line into words; each finished word is
// loaded into the RHR and from there written into the receive FIFO, from
// which the host reads with rd (the head word is always shown on rx_out).
// The check bits of every frame go to the status register.
//
// Interface: clock, reset (synchronous, active high); start (unit enable);
// rx_in (serial line); enable (status updates), prty, stop (must match the
// transmitter); rd; rx_out, fifo_empty, ff (FIFO full), rhr_empty,
// error_signal ({framing, parity} of the latest frame).
module uart_receiver
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH     = 16,
  parameter int unsigned CLKS_PER_BIT_P = CLKS_PER_BIT
) (
  input  logic                 clock,
  input  logic                 reset,
  input  logic                 start,
  input  logic                 rx_in,
  input  logic                 enable,
  input  logic                 prty,
  input  logic                 stop,
  input  logic                 rd,
  output logic [DATA_BITS-1:0] rx_out,
  output logic                 fifo_empty,
  output logic                 ff,
  output logic                 rhr_empty,
  output logic [1:0]           error_signal
);
  logic [DATA_BITS-1:0] samp_data, rhr_out;
  logic [2:0]           stat;
  logic                 done, push, unused_check;

  uart_sampler #(.CLKS_PER_BIT_P(CLKS_PER_BIT_P)) u_sampler (  // R1
    .clk(clock), .rst(reset), .start(start), .rx_in(rx_in), .prty(prty),
    .stop(stop), .data_out(samp_data), .stat(stat), .done(done)
  );

  uart_rhr #(.WIDTH(DATA_BITS)) u_rhr (  // R3
    .clk(clock), .rst(reset), .start(start), .rhr_in(samp_data), .load(done),
    .send(!ff), .rhr_out(rhr_out), .push(push), .rhr_empty(rhr_empty)
  );

  uart_status_reg u_status (  // R4
    .clk(clock), .rst(reset), .enable(enable), .prty(prty), .stop(stop),
    .error_data(stat), .error_valid(done), .error_signal(error_signal)
  );

  uart_fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (  // R5
    .clk(clock), .rst(reset), .datain(rhr_out), .write_en(push), .read_en(rd),
    .ff_out(rx_out), .check(unused_check), .fifo_empty(fifo_empty), .full(ff)
  );
endmodule
