`timescale 1ns/1ps
// async_system_top -- the asynchronous pipeline and its two applications.
//
// Path 1, the FIR application: samples enter a self-timed 2-phase
// micropipeline (async_pipeline) on in_req/in_ack/in_data. The pipeline's
// output handshake drives the FIR filter's input handshake directly, so
// samples travel through the pipeline without a clock and are taken into the
// clocked multiply-accumulate filter; results leave on y_req/y_ack/y_data,
// again transition signalled. Coefficients are written on coef_*.
// Path 2, the UART: a transmitter (FIFO -> THR -> TSR) and a receiver
// (sampler -> RHR -> FIFO, status register) share clk and rst; their serial
// pins tx_out and rx_in are brought out, so they can be looped or wired to
// another device.
//
// All handshakes are 2-phase: each toggle of a request is one item, each
// toggle of an acknowledge frees the sender. rst is active high; it clears
// the self-timed pipeline asynchronously (it has no clock) and the clocked
// parts synchronously, so rst must be held for at least two clock cycles.
module async_system_top
  import uart_pkg::*;
#(
  parameter int unsigned PIPE_STAGES = 3,
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned FIR_TAPS    = 60,
  parameter int unsigned COEF_W      = 8,
  parameter int unsigned FIR_ACC_W   = DATA_W + COEF_W + $clog2(FIR_TAPS),
  parameter int unsigned UART_FIFO_DEPTH = 16,
  parameter int unsigned UART_CLKS_PER_BIT = CLKS_PER_BIT
) (
  input  logic                          clk,
  input  logic                          rst,
  // sample input into the asynchronous pipeline
  input  logic                          in_req,
  output logic                          in_ack,
  input  logic [DATA_W-1:0]             in_data,
  // FIR coefficients
  input  logic                          coef_we,
  input  logic [$clog2(FIR_TAPS)-1:0]   coef_addr,
  input  logic signed [COEF_W-1:0]      coef_data,
  // FIR results
  output logic                          y_req,
  input  logic                          y_ack,
  output logic signed [FIR_ACC_W-1:0]   y_data,
  // UART transmitter
  input  logic                          tx_start,
  input  logic [DATA_BITS-1:0]          tx_in,
  input  logic                          tx_wr,
  input  logic                          tx_enable,
  input  logic                          tx_prty,
  input  logic                          tx_stop,
  output logic                          tx_fifo_empty,
  output logic                          tx_ff,
  output logic                          tx_lsr,
  output logic [FRAME_BITS-1:0]         tx_temp,
  output logic                          tx_out,
  // UART receiver
  input  logic                          rx_start,
  input  logic                          rx_in,
  input  logic                          rx_enable,
  input  logic                          rx_prty,
  input  logic                          rx_stop,
  input  logic                          rx_rd,
  output logic [DATA_BITS-1:0]          rx_out,
  output logic                          rx_fifo_empty,
  output logic                          rx_ff,
  output logic                          rx_rhr_empty,
  output logic [1:0]                    rx_error_signal
);
  logic              pipe_req, fir_ack;
  logic [DATA_W-1:0] pipe_data;

  async_pipeline #(.WIDTH(DATA_W), .STAGES(PIPE_STAGES)) u_pipe (
    .rst(rst), .rin(in_req), .ain(in_ack), .din(in_data),
    .rout(pipe_req), .aout(fir_ack), .dout(pipe_data)
  );

  fir_filter #(.TAPS(FIR_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(FIR_ACC_W)) u_fir (
    .clk(clk), .rst(rst),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .x_req(pipe_req), .x_ack(fir_ack), .x_data(pipe_data),
    .y_req(y_req), .y_ack(y_ack), .y_data(y_data)
  );

  uart_transmitter #(.FIFO_DEPTH(UART_FIFO_DEPTH), .CLKS_PER_BIT_P(UART_CLKS_PER_BIT)) u_tx (
    .clock(clk), .reset(rst), .start(tx_start), .tx_in(tx_in), .wr(tx_wr),
    .enable(tx_enable), .prty(tx_prty), .stop(tx_stop),
    .fifo_empty(tx_fifo_empty), .ff(tx_ff), .lsr(tx_lsr), .temp(tx_temp),
    .tx_out(tx_out)
  );

  uart_receiver #(.FIFO_DEPTH(UART_FIFO_DEPTH), .CLKS_PER_BIT_P(UART_CLKS_PER_BIT)) u_rx (
    .clock(clk), .reset(rst), .start(rx_start), .rx_in(rx_in),
    .enable(rx_enable), .prty(rx_prty), .stop(rx_stop), .rd(rx_rd),
    .rx_out(rx_out), .fifo_empty(rx_fifo_empty), .ff(rx_ff),
    .rhr_empty(rx_rhr_empty), .error_signal(rx_error_signal)
  );
endmodule
