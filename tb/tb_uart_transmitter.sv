`timescale 1ns/1ps
// tb_uart_transmitter -- writes a burst of bytes into the transmitter
// (filling the FIFO until it reports full) and decodes the serial line with
// an independent sampler. Checks every byte, parity and stop bit, the FIFO
// and LSR flags, and that the burst leaves as back-to-back frames (11 bit
// times per frame with parity and one stop bit).
module tb_uart_transmitter;
  localparam int unsigned CPB = 8, DEPTH = 16, N = 24;
  logic clk = 0, rst, start, wr, enable, prty, stop;
  logic fifo_empty, ff, lsr, tx_out;
  logic [7:0] tx_in;
  logic [10:0] temp;
  int checks = 0, failures = 0, full_seen = 0;
  logic [7:0] written[$];
  longint cycle = 0;

  uart_transmitter #(.FIFO_DEPTH(DEPTH), .CLKS_PER_BIT_P(CPB)) dut (
    .clock(clk), .reset(rst), .start(start), .tx_in(tx_in), .wr(wr),
    .enable(enable), .prty(prty), .stop(stop), .fifo_empty(fifo_empty),
    .ff(ff), .lsr(lsr), .temp(temp), .tx_out(tx_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer: pushes N bytes, waiting while the FIFO is full
  initial begin
    rst = 1; start = 0; wr = 0; tx_in = 0; enable = 1; prty = 1; stop = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(fifo_empty && lsr && tx_out, "empty and idle after reset");
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while (ff) begin
        full_seen++;
        wr = 0;
        @(negedge clk);
      end
      tx_in = 8'($urandom);
      wr = 1;
      written.push_back(tx_in);
      if (k == 2) start = 1;
    end
    @(negedge clk);
    wr = 0;
  end

  // line decoder
  initial begin
    logic [7:0] d;
    longint t0, t_prev;
    for (int f = 0; f < N; f++) begin
      @(negedge tx_out);
      t0 = cycle;
      if (f > 0)
        check(t0 - t_prev == longint'(11 * CPB), $sformatf("frame %0d gap: %0d cycles", f, t0 - t_prev));
      t_prev = t0;
      repeat (CPB / 2) @(posedge clk);
      check(tx_out == 0, "start bit");
      for (int b = 0; b < 8; b++) begin
        repeat (CPB) @(posedge clk);
        d[b] = tx_out;
      end
      repeat (CPB) @(posedge clk);
      check(tx_out == ^d, "parity bit");
      repeat (CPB) @(posedge clk);
      check(tx_out == 1, "stop bit");
      check(written.size() != 0 && d == written[0], $sformatf("frame %0d data %0h", f, d));
      if (written.size() != 0) void'(written.pop_front());
    end
    repeat (2 * CPB) @(posedge clk);
    check(fifo_empty && lsr && tx_out, "empty and idle at the end");
    check(full_seen > 0, "FIFO full was reached");
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
