`timescale 1ns/1ps
// uart_tsr -- transmit shift register (TSR): parallel to serial.
//
// When idle, or in the last clock of the last stop bit of the frame being
// sent, the TSR reports tsr_empty; if the THR holds a byte it is loaded at
// once, so frames go out back to back. The loaded frame is start bit (0),
// data LSB first, an even parity bit when prty is set, then stop bits (1).
// The frame register (temp) shifts right once per bit time and fills with
// ones, so the line idles high. stop selects one or two stop bits.
//
// Interface: clk, rst (synchronous); start and enable (both must be high
// to begin a frame; a frame in progress always completes); prty, stop;
// thr_in, thr_valid; tsr_empty (the TSR takes thr_in this cycle when
// thr_valid is high); temp (frame register); tx_out (serial line).
// Timing: one bit lasts CLKS_PER_BIT clocks; a frame of N bits takes
// N*CLKS_PER_BIT clocks from the load.
module uart_tsr
  import uart_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT_P = CLKS_PER_BIT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic                  enable,
  input  logic                  prty,
  input  logic                  stop,
  input  logic [DATA_BITS-1:0]  thr_in,
  input  logic                  thr_valid,
  output logic                  tsr_empty,
  output logic [FRAME_BITS-1:0] temp,
  output logic                  tx_out
);
  localparam int unsigned CW = (CLKS_PER_BIT_P > 1) ? $clog2(CLKS_PER_BIT_P) : 1;

  tsr_state_e  state;
  logic [CW-1:0] clk_cnt;
  logic [3:0]    bits_left;
  logic          bit_end, last_bit, load;

  assign bit_end   = (clk_cnt == CW'(CLKS_PER_BIT_P - 1));
  assign last_bit  = (bits_left == 4'd1);
  assign tsr_empty = start && enable && (state == TSR_IDLE || (bit_end && last_bit));
  assign load      = tsr_empty && thr_valid;
  assign tx_out    = temp[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= TSR_IDLE;
      clk_cnt   <= '0;
      bits_left <= '0;
      temp      <= '1;
    end else if (load) begin
      state     <= TSR_SHIFT;
      clk_cnt   <= '0;
      temp      <= prty ? {1'b1, even_parity(thr_in), thr_in, 1'b0}
                        : {1'b1, 1'b1, thr_in, 1'b0};
      bits_left <= 4'(DATA_BITS + 2) + 4'(prty) + 4'(stop);
    end else if (state == TSR_SHIFT) begin
      if (bit_end) begin
        clk_cnt   <= '0;
        temp      <= {1'b1, temp[FRAME_BITS-1:1]};
        bits_left <= bits_left - 1'b1;
        if (last_bit) state <= TSR_IDLE;
      end else begin
        clk_cnt <= clk_cnt + 1'b1;
      end
    end
  end
endmodule
