`timescale 1ns/1ps
// tb_async_delay -- checks that the delay model holds every request
// transition back by DELAY_NS and passes it on unchanged afterwards.
module tb_async_delay;
  logic a, z;
  int checks = 0, failures = 0;

  async_delay #(.DELAY_NS(2.0)) dut (.a(a), .z(z));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    a = 0;
    #10;
    check(z == 0, "settled low");
    for (int k = 0; k < 8; k++) begin
      a = ~a;
      #1.5;
      check(z == ~a, $sformatf("toggle %0d passed too early", k));
      #1.0;
      check(z == a, $sformatf("toggle %0d not passed after the delay", k));
      #($urandom_range(1, 4));
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
