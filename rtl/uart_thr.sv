`timescale 1ns/1ps
// uart_thr -- transmitter hold register (THR) with its LSR empty flag.
//
// The THR holds the next byte for the transmit shift register. Its line
// status bit lsr is 1 while the THR is empty and drops to 0 as soon as a
// byte is loaded from the FIFO. The byte is handed to the TSR when the TSR
// signals that it can take one (empty input); in that same cycle the THR
// can already reload from the FIFO, so frames follow each other without a
// gap.
//
// Interface: clk, rst (synchronous); start (unit enable); ff_in, check
// (FIFO has a word) and send (FIFO read strobe, combinational); empty (TSR
// takes the held byte this cycle); thr_out, lsr.
// The pairing of check/send/empty into a valid/ready exchange is this
// design's reading of the schematic.
module uart_thr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] ff_in,
  input  logic             check,
  input  logic             empty,
  output logic [WIDTH-1:0] thr_out,
  output logic             send,
  output logic             lsr
);
  logic handed_over;

  assign handed_over = !lsr && empty;
  assign send        = start && check && (lsr || handed_over);

  always_ff @(posedge clk) begin
    if (rst) begin
      thr_out <= '0;
      lsr     <= 1'b1;
    end else if (send) begin
      thr_out <= ff_in;
      lsr     <= 1'b0;
    end else if (handed_over) begin
      lsr     <= 1'b1;
    end
  end

  // a byte is only read from the FIFO when there is one and the THR is free
  a_send_rule: assert property (@(posedge clk) disable iff (rst)
    send |-> (check && (lsr || empty)));
endmodule
