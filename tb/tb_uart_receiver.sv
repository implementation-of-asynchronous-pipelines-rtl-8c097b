`timescale 1ns/1ps
// tb_uart_receiver -- a line driver sends a burst of back-to-back frames
// (11 bits: start, 8 data, even parity, stop) while the host does not read,
// so the receive FIFO fills up and reports full; the host then drains it.
// A frame with a wrong parity bit and one with a broken stop bit must raise
// the matching error flag, and a good frame must clear them again.
module tb_uart_receiver;
  localparam int unsigned CPB = 16, DEPTH = 4;
  logic clk = 0, rst, start, rx_in, enable, prty, stop, rd;
  logic fifo_empty, ff, rhr_empty;
  logic [7:0] rx_out;
  logic [1:0] err;
  int checks = 0, failures = 0, full_seen = 0;
  logic [7:0] sent[$];

  uart_receiver #(.FIFO_DEPTH(DEPTH), .CLKS_PER_BIT_P(CPB)) dut (
    .clock(clk), .reset(rst), .start(start), .rx_in(rx_in), .enable(enable),
    .prty(prty), .stop(stop), .rd(rd), .rx_out(rx_out), .fifo_empty(fifo_empty),
    .ff(ff), .rhr_empty(rhr_empty), .error_signal(err)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (ff) full_seen++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bit_time(logic v);
    rx_in = v;
    repeat (CPB) @(negedge clk);
  endtask

  task automatic frame(logic [7:0] d, bit bad_par, bit bad_stop);
    bit_time(0);
    for (int b = 0; b < 8; b++) bit_time(d[b]);
    bit_time((^d) ^ bad_par);
    bit_time(!bad_stop);
  endtask

  task automatic drain();
    while (!fifo_empty) begin
      check(sent.size() != 0 && rx_out == sent[0], $sformatf("read %0h expected %0h", rx_out, sent.size() ? sent[0] : 8'h0));
      if (sent.size() != 0) void'(sent.pop_front());
      rd = 1;
      @(negedge clk);
      rd = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; start = 0; rx_in = 1; enable = 1; prty = 1; stop = 0; rd = 0;
    repeat (3) @(negedge clk);
    rst = 0; start = 1;
    bit_time(1);
    // burst: FIFO depth + the hold register, no reads
    for (int k = 0; k < DEPTH + 1; k++) begin
      logic [7:0] d = 8'($urandom);
      sent.push_back(d);
      frame(d, 0, 0);
    end
    bit_time(1);
    check(ff && !rhr_empty, "FIFO full and RHR holding after the burst");
    check(err == 2'b00, "no error on good frames");
    drain();
    repeat (4) @(negedge clk);
    check(sent.size() == 0 && fifo_empty && rhr_empty, "all words read");
    // parity error
    sent.push_back(8'h3C);
    frame(8'h3C, 1, 0);
    bit_time(1);
    check(err == 2'b01, "parity error flagged");
    // framing error
    sent.push_back(8'h81);
    frame(8'h81, 0, 1);
    bit_time(1);
    bit_time(1);
    check(err == 2'b10, "framing error flagged");
    sent.push_back(8'h77);
    frame(8'h77, 0, 0);
    bit_time(1);
    check(err == 2'b00, "good frame clears the flags");
    drain();
    check(full_seen > 0, "FIFO full was reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
