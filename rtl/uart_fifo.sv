`timescale 1ns/1ps
// uart_fifo -- byte FIFO of the UART transmitter (ahead of the THR) and
// receiver (behind the RHR).
//
// A circular buffer of DEPTH words with read and write pointers and an
// occupancy count. The head word is always visible on ff_out
// (first-word-fall-through), so a reader takes it in the same cycle it
// raises read_en. A write to a full FIFO and a read from an empty one are
// ignored, which is the overflow and underflow protection. Writing and
// reading in the same cycle is allowed.
//
// Interface: clk, rst (synchronous, active high); datain/write_en;
// read_en/ff_out; check (a word is available), fifo_empty, full.
// DEPTH and the first-word-fall-through read are this design's choices.
module uart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] datain,
  input  logic             write_en,
  input  logic             read_en,
  output logic [WIDTH-1:0] ff_out,
  output logic             check,
  output logic             fifo_empty,
  output logic             full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign fifo_empty = (count == '0);
  assign full       = (count == (AW+1)'(DEPTH));
  assign check      = !fifo_empty;
  assign do_wr      = write_en && !full;
  assign do_rd      = read_en && !fifo_empty;
  assign ff_out     = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= datain;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (rst)
    count <= (AW+1)'(DEPTH));
endmodule
