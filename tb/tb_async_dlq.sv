`timescale 1ns/1ps
// tb_async_dlq -- checks the 2-phase stage controller against the rule
// "ro takes rin while ro == ao, and holds otherwise", including the reset
// value, a blocked second request and its release by an acknowledge.
module tb_async_dlq;
  logic rst, rin, ao, ro;
  logic model;
  int checks = 0, failures = 0;

  async_dlq dut (.rst(rst), .rin(rin), .ao(ao), .ro(ro));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1; rin = 1; ao = 0;
    #1;
    check(ro == 0, "reset clears ro");
    rin = 0;
    rst = 0;
    #1;
    check(ro == 0, "idle after reset");
    // first request passes
    rin = 1; #1;
    check(ro == 1, "first request passes an empty stage");
    // second request is blocked until acknowledged
    rin = 0; #1;
    check(ro == 1, "second request blocked while stage is full");
    ao = 1; #1;
    check(ro == 0, "acknowledge releases the waiting request");
    // random sequence against the rule
    model = ro;
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(0, 1)) rin = ~rin;
      else                      ao  = ~ao;
      #1;
      if (model == ao) model = rin;
      check(ro == model, $sformatf("step %0d: ro=%0b expected %0b", k, ro, model));
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
