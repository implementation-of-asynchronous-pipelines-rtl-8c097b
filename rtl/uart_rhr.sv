`timescale 1ns/1ps
// uart_rhr -- receiver hold register (RHR).
//
// The RHR takes each word the sampling block finishes (load) and offers it
// to the receive FIFO. It pushes the word (push, the FIFO's write enable)
// while it holds one and the FIFO can take it (send), then reports empty
// again. A new word arriving while the old one is still held overwrites it.
//
// Interface: clk, rst (synchronous); start (unit enable); rhr_in, load;
// send (the FIFO has room); rhr_out, push, rhr_empty.
// Timing: a word loaded in cycle t is pushed in cycle t+1 at the earliest.
module uart_rhr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] rhr_in,
  input  logic             load,
  input  logic             send,
  output logic [WIDTH-1:0] rhr_out,
  output logic             push,
  output logic             rhr_empty
);
  assign push = start && !rhr_empty && send;

  always_ff @(posedge clk) begin
    if (rst) begin
      rhr_out   <= '0;
      rhr_empty <= 1'b1;
    end else if (load) begin
      rhr_out   <= rhr_in;
      rhr_empty <= 1'b0;
    end else if (push) begin
      rhr_empty <= 1'b1;
    end
  end
endmodule
