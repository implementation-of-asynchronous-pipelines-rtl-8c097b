`timescale 1ns/1ps
// uart_sampler -- receiver sampling block with the receive shift register.
//
// The serial input is first passed through two flip-flops against
// metastability. In idle the block waits for the line to go low; half a bit
// time later it checks the start bit is still low (a shorter pulse is
// rejected as noise) and from then on samples the line in the middle of
// every bit: 8 data bits (shifted into the RSR, LSB first), the parity bit
// when prty is set, and one or two stop bits (stop). In the middle of the
// last stop bit it presents the word on data_out and the frame's check bits
// on stat, pulses done (the acknowledgement that a frame has been taken in)
// and returns to idle, ready for a back-to-back frame.
//
// stat[0]: received parity bit XOR data parity (1 = even parity violated,
//          0 when parity is off);
// stat[1]: value of the first stop bit (must be 1);
// stat[2]: value of the second stop bit (1 when only one is used).
// Interface: clk, rst (synchronous); start (unit enable); rx_in; prty,
// stop; data_out, stat, done. One bit is CLKS_PER_BIT_P clocks.
// The prty and stop inputs and the done strobe are this design's additions
// so that the block knows the frame length and can tell the next registers
// when a word is ready.
module uart_sampler
  import uart_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT_P = CLKS_PER_BIT
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 rx_in,
  input  logic                 prty,
  input  logic                 stop,
  output logic [DATA_BITS-1:0] data_out,
  output logic [2:0]           stat,
  output logic                 done
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT_P + 1);

  rx_state_e             state;
  logic [1:0]            sync;
  logic                  rx;
  logic [CW-1:0]         clk_cnt;
  logic [3:0]            bit_idx;      // index of the bit after the start bit
  logic [DATA_BITS-1:0]  rsr;
  logic                  par_bit, stop1;
  logic [3:0]            last_idx;
  logic                  mid;

  assign rx       = sync[1];
  assign last_idx = 4'(DATA_BITS) + 4'(prty) + 4'(stop);
  assign mid      = (clk_cnt == CW'(CLKS_PER_BIT_P - 1));

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx_in};
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      state    <= RX_IDLE;
      clk_cnt  <= '0;
      bit_idx  <= '0;
      rsr      <= '0;
      par_bit  <= 1'b0;
      stop1    <= 1'b1;
      data_out <= '0;
      stat     <= 3'b110;
    end else begin
      unique case (state)
        RX_IDLE: begin
          clk_cnt <= '0;
          if (start && !rx) state <= RX_START;
        end
        RX_START: begin
          if (clk_cnt == CW'(CLKS_PER_BIT_P / 2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            par_bit <= 1'b0;
            state   <= rx ? RX_IDLE : RX_BITS;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        RX_BITS: begin
          if (mid) begin
            clk_cnt <= '0;
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx < 4'(DATA_BITS))
              rsr <= {rx, rsr[DATA_BITS-1:1]};
            else if (prty && bit_idx == 4'(DATA_BITS))
              par_bit <= rx;
            else if (bit_idx == 4'(DATA_BITS) + 4'(prty))
              stop1 <= rx;
            if (bit_idx == last_idx) begin
              data_out <= rsr;
              if (stop)
                stat <= {rx, stop1, prty & (par_bit ^ even_parity(rsr))};
              else
                stat <= {1'b1, rx, prty & (par_bit ^ even_parity(rsr))};
              done  <= 1'b1;
              state <= RX_IDLE;
            end
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end
endmodule
