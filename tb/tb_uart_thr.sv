`timescale 1ns/1ps
// tb_uart_thr -- drives the hold register with a model FIFO (a queue) and a
// model TSR that takes a byte at random times. Checks the LSR flag, that
// bytes reach the TSR side in order, and that a handover and a reload from
// the FIFO happen in the same cycle (no gap between frames).
module tb_uart_thr;
  logic clk = 0, rst, start, check_i, empty, send, lsr;
  logic [7:0] ff_in, thr_out;
  int checks = 0, failures = 0, same_cycle_reloads = 0;
  logic [7:0] src[$];
  int taken;
  bit was_send;

  uart_thr #(.WIDTH(8)) dut (
    .clk(clk), .rst(rst), .start(start), .ff_in(ff_in), .check(check_i),
    .empty(empty), .thr_out(thr_out), .send(send), .lsr(lsr)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign check_i = (src.size() != 0);
  assign ff_in   = (src.size() != 0) ? src[0] : 8'h00;

  initial begin
    rst = 1; start = 0; empty = 0; taken = 0;
    for (int k = 0; k < 60; k++) src.push_back(8'(k * 7 + 3));
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(lsr == 1, "THR empty after reset");
    check(send == 0, "no read while start is low");
    start = 1;
    while (taken < 60) begin
      empty = ($urandom_range(0, 2) == 0);
      #1;
      if (empty && !lsr) begin
        check(thr_out == 8'(taken * 7 + 3), $sformatf("byte %0d handed over %0h", taken, thr_out));
        taken++;
        if (send) same_cycle_reloads++;
      end
      if (send) check(check_i && (lsr || empty), "read only when FIFO has data and THR frees");
      was_send = send;
      @(posedge clk);
      #1;
      if (was_send) void'(src.pop_front());
      #1;
      if (taken < 60 && src.size() < 60 - taken) check(!lsr, "LSR cleared after a load");
      @(negedge clk);
    end
    @(negedge clk);
    empty = 1;
    @(negedge clk);
    check(lsr == 1, "THR empty at the end");
    check(same_cycle_reloads > 10, "back-to-back reloads happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
