`timescale 1ns/1ps
// uart_pkg -- constants and state types shared by the UART blocks.
//
// The frame is start bit, 8 data bits (LSB first), an even parity bit when
// parity is enabled, and one or two stop bits: 11 bits with parity and one
// stop bit. CLKS_PER_BIT, the number of system clocks per bit time, is this
// design's choice (the bit rate is Clock / CLKS_PER_BIT).
package uart_pkg;
  localparam int unsigned DATA_BITS    = 8;
  localparam int unsigned FRAME_BITS   = 11;
  localparam int unsigned CLKS_PER_BIT = 16;

  typedef enum logic [0:0] {TSR_IDLE, TSR_SHIFT} tsr_state_e;
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_BITS} rx_state_e;

  // even parity bit of a data word
  function automatic logic even_parity(input logic [DATA_BITS-1:0] d);
    return ^d;
  endfunction
endpackage
