`timescale 1ns/1ps
// tb_async_detff_reg -- checks that the register takes d on both edges of
// ro, holds it between edges whatever d does, and resets to zero.
module tb_async_detff_reg;
  localparam int unsigned W = 8;
  logic rst, ro;
  logic [W-1:0] d, q, expect_q;
  int checks = 0, failures = 0;

  async_detff_reg #(.WIDTH(W)) dut (.rst(rst), .ro(ro), .d(d), .q(q));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 0; ro = 0; d = 8'hA5;
    #1 rst = 1;
    #1;
    check(q == 0, "reset value");
    rst = 0;
    #1;
    for (int k = 0; k < 100; k++) begin
      d = W'($urandom);
      expect_q = d;
      #1 ro = ~ro;
      #1;
      check(q == expect_q, $sformatf("edge %0d: q=%0h expected %0h", k, q, expect_q));
      d = W'($urandom);
      #1;
      check(q == expect_q, $sformatf("edge %0d: q changed without an edge", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
