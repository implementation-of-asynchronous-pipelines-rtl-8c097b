`timescale 1ns/1ps
// uart_status_reg -- receiver status register.
//
// For every frame the sampling block reports (error_valid), the register
// turns the frame's check bits into error flags and holds them until the
// next frame: error_signal[0] is a parity error (parity enabled and the
// received parity bit does not give even parity), error_signal[1] a framing
// error (a stop bit read as 0; the second stop bit counts only when stop
// selects two). With enable low the flags are left as they are.
//
// Interface: clk, rst (synchronous); enable, prty, stop; error_data (the
// sampler's stat bits), error_valid (the sampler's done strobe);
// error_signal. Timing: flags change one clock after error_valid.
module uart_status_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       prty,
  input  logic       stop,
  input  logic [2:0] error_data,
  input  logic       error_valid,
  output logic [1:0] error_signal
);
  always_ff @(posedge clk) begin
    if (rst)
      error_signal <= 2'b00;
    else if (enable && error_valid)
      error_signal <= {!error_data[1] || (stop && !error_data[2]),
                       prty && error_data[0]};
  end
endmodule
