`timescale 1ns/1ps
// tb_uart_fifo -- random writes and reads checked against a queue model:
// head word, empty/check/full flags, ignored writes when full (overflow)
// and ignored reads when empty (underflow).
module tb_uart_fifo;
  localparam int unsigned W = 8, D = 16;
  logic clk = 0, rst;
  logic [W-1:0] datain, ff_out;
  logic write_en, read_en, check_o, fifo_empty, full;
  int checks = 0, failures = 0, overflows = 0;
  logic [W-1:0] q[$];
  bit was_full;

  uart_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .datain(datain), .write_en(write_en), .read_en(read_en),
    .ff_out(ff_out), .check(check_o), .fifo_empty(fifo_empty), .full(full)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; write_en = 0; read_en = 0; datain = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2000; k++) begin
      // write-heavy first, read-heavy afterwards, mixed at the end
      int wp = (k < 500) ? 80 : (k < 1000) ? 20 : 50;
      @(negedge clk);
      check(fifo_empty == (q.size() == 0), "fifo_empty flag");
      check(check_o == (q.size() != 0), "check flag");
      check(full == (q.size() == D), "full flag");
      if (q.size() != 0) check(ff_out == q[0], $sformatf("head %0h expected %0h", ff_out, q[0]));
      write_en = ($urandom_range(0, 99) < wp);
      read_en  = ($urandom_range(0, 99) < 100 - wp);
      datain   = W'($urandom);
      was_full = (q.size() == D);
      @(posedge clk);
      if (read_en && q.size() != 0) void'(q.pop_front());
      if (write_en) begin
        if (!was_full) q.push_back(datain);
        else           overflows++;
      end
    end
    check(overflows > 0, "an overflow was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
