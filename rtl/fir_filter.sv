`timescale 1ns/1ps
// fir_filter -- TAPS-tap FIR filter, y[n] = sum_{i=0}^{TAPS-1} x[n-i] * h[i],
// with 2-phase bundled-data handshakes on its input and output.
//
// The filter is a multiply-accumulate loop around a sample delay line:
//   Delay[i]    a shift register of the last TAPS input samples;
//   H[i]        a coefficient store, written through coef_we/addr/data;
//   Multiplier  one signed multiplier, x[n-i] * h[i];
//   Accumulator sums the TAPS products of one output sample;
//   Buffer      holds y[n] until the receiver acknowledges it, and only then
//               enables the delay line to take the next sample.
// So one sample is in flight at a time; the buffer's enable is the flow
// control back to the input.
//
// Handshakes are transition signalled: a toggle of x_req announces a stable
// x_data, a toggle of x_ack answers it; a toggle of y_req announces y_data,
// a toggle of y_ack frees the buffer. x_req and y_ack are synchronised to
// clk with two flip-flops each, so the requester may be self-timed logic.
// Timing: after x_req is seen (2 clocks of synchronisation) the filter takes
// 1 clock to shift the sample in, TAPS clocks of multiply-accumulate and 1
// clock to fill the buffer: y_req toggles TAPS+4 clocks after x_req.
// Coefficients and samples are two's complement. Widths, the coefficient
// write port, the synchroniser and the single shared multiplier are this
// design's choices.
module fir_filter #(
  parameter int unsigned TAPS   = 60,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + $clog2(TAPS)
) (
  input  logic                      clk,
  input  logic                      rst,
  // coefficient store H[i]
  input  logic                      coef_we,
  input  logic [$clog2(TAPS)-1:0]   coef_addr,
  input  logic signed [COEF_W-1:0]  coef_data,
  // sample input, 2-phase
  input  logic                      x_req,
  output logic                      x_ack,
  input  logic signed [DATA_W-1:0]  x_data,
  // result output, 2-phase
  output logic                      y_req,
  input  logic                      y_ack,
  output logic signed [ACC_W-1:0]   y_data
);
  localparam int unsigned IW = $clog2(TAPS);

  typedef enum logic [1:0] {FIR_IDLE, FIR_MAC, FIR_OUT} fir_state_e;

  fir_state_e               state;
  logic signed [DATA_W-1:0] delay_line [TAPS];
  logic signed [COEF_W-1:0] h [TAPS];
  logic [IW-1:0]            idx;
  logic signed [ACC_W-1:0]  acc;
  logic signed [DATA_W+COEF_W-1:0] product;
  logic [1:0]               x_req_sync, y_ack_sync;
  logic                     sample_waiting, buffer_free;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_req_sync <= '0;
      y_ack_sync <= '0;
    end else begin
      x_req_sync <= {x_req_sync[0], x_req};
      y_ack_sync <= {y_ack_sync[0], y_ack};
    end
  end

  assign sample_waiting = (x_req_sync[1] != x_ack);
  assign buffer_free    = (y_ack_sync[1] == y_req);   // Buffer -> Delay enable
  assign product        = delay_line[idx] * h[idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS; i++) h[i] <= '0;
    end else if (coef_we && coef_addr < IW'(TAPS)) begin
      h[coef_addr] <= coef_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= FIR_IDLE;
      idx    <= '0;
      acc    <= '0;
      x_ack  <= 1'b0;
      y_req  <= 1'b0;
      y_data <= '0;
      for (int i = 0; i < TAPS; i++) delay_line[i] <= '0;
    end else begin
      unique case (state)
        FIR_IDLE: begin
          if (sample_waiting && buffer_free) begin
            delay_line[0] <= x_data;
            for (int i = 1; i < TAPS; i++) delay_line[i] <= delay_line[i-1];
            x_ack <= ~x_ack;
            idx   <= '0;
            acc   <= '0;
            state <= FIR_MAC;
          end
        end
        FIR_MAC: begin
          acc <= acc + ACC_W'(product);
          if (idx == IW'(TAPS - 1)) state <= FIR_OUT;
          else                      idx   <= idx + 1'b1;
        end
        FIR_OUT: begin
          y_data <= acc;
          y_req  <= ~y_req;
          state  <= FIR_IDLE;
        end
        default: state <= FIR_IDLE;
      endcase
    end
  end

  // 2-phase rules: a new result is only announced into a free buffer, and a
  // sample is only acknowledged when one is waiting.
  a_buffer_free: assert property (@(posedge clk) disable iff (rst)
    (y_req != y_ack_sync[1]) |=> $stable(y_req));
  a_ack_waiting: assert property (@(posedge clk) disable iff (rst)
    (x_ack == x_req_sync[1]) |=> $stable(x_ack));
endmodule
