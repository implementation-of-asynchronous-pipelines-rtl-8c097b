`timescale 1ns/1ps
// tb_uart_status_reg -- applies every combination of check bits, prty, stop
// and enable with a valid strobe and compares the error flags with the
// rule: parity error = prty & stat[0]; framing error = !stat[1] |
// (stop & !stat[2]); flags hold when enable or the strobe is low.
module tb_uart_status_reg;
  logic clk = 0, rst, enable, prty, stop, valid;
  logic [2:0] data;
  logic [1:0] err, expect_err;
  int checks = 0, failures = 0;

  uart_status_reg dut (
    .clk(clk), .rst(rst), .enable(enable), .prty(prty), .stop(stop),
    .error_data(data), .error_valid(valid), .error_signal(err)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; enable = 0; prty = 0; stop = 0; valid = 0; data = 0;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    check(err == 2'b00, "reset clears the flags");
    expect_err = 2'b00;
    for (int k = 0; k < 400; k++) begin
      {enable, prty, stop} = 3'($urandom);
      valid = $urandom_range(0, 1);
      data  = 3'($urandom);
      @(negedge clk);
      if (enable && valid)
        expect_err = {!data[1] || (stop && !data[2]), prty && data[0]};
      check(err == expect_err, $sformatf("step %0d: err %b expected %b", k, err, expect_err));
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
