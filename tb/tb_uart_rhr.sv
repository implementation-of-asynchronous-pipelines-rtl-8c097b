`timescale 1ns/1ps
// tb_uart_rhr -- loads words into the receiver hold register and lets a
// model FIFO accept them at random (send). Checks that every word is pushed
// exactly once and in order, that nothing is pushed while empty or while
// send is low, and that a word arriving over a held one replaces it.
module tb_uart_rhr;
  logic clk = 0, rst, start, load, send, push, rhr_empty;
  logic [7:0] rhr_in, rhr_out;
  int checks = 0, failures = 0;
  logic [7:0] expect_q[$];

  uart_rhr #(.WIDTH(8)) dut (
    .clk(clk), .rst(rst), .start(start), .rhr_in(rhr_in), .load(load),
    .send(send), .rhr_out(rhr_out), .push(push), .rhr_empty(rhr_empty)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic held_valid, pushed;
  logic [7:0] held;

  initial begin
    rst = 1; start = 1; load = 0; send = 0; rhr_in = 0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    held_valid = 0;
    check(rhr_empty, "empty after reset");
    for (int k = 0; k < 500; k++) begin
      load   = ($urandom_range(0, 3) == 0);
      send   = ($urandom_range(0, 2) != 0);
      rhr_in = 8'($urandom);
      #1;
      check(push == (held_valid && send), "push only when holding and send");
      if (push) check(rhr_out == held, $sformatf("pushed %0h expected %0h", rhr_out, held));
      pushed = push;
      @(negedge clk);
      if (load) begin
        held = rhr_in; held_valid = 1;
      end else if (pushed) begin
        held_valid = 0;
      end
      check(rhr_empty == !held_valid, "empty flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
