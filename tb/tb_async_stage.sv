`timescale 1ns/1ps
// tb_async_stage -- one pipeline stage between a test sender and receiver:
// checks that a request is acknowledged at once when the stage is empty,
// that the data is captured with it, that a second request waits for the
// receiver's acknowledge, and that the held data does not change meanwhile.
module tb_async_stage;
  localparam int unsigned W = 8;
  logic rst, rin, ain, ro, ao;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  async_stage #(.WIDTH(W)) dut (
    .rst(rst), .rin(rin), .ain(ain), .din(din), .ro(ro), .ao(ao), .dout(dout)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [W-1:0] first, second;

  initial begin
    rst = 1; rin = 0; ao = 0; din = '0;
    #2 rst = 0;
    for (int k = 0; k < 30; k++) begin
      first  = W'($urandom);
      second = W'($urandom);
      din = first;
      #1 rin = ~rin;
      #1;
      check(ain == rin && ro == rin, "empty stage acknowledges a request");
      check(dout == first, $sformatf("item %0d captured", 2 * k));
      din = second;
      #1 rin = ~rin;
      #2;
      check(ain != rin, "full stage holds the next request");
      check(dout == first, "held data stays while the stage is full");
      ao = ~ao;              // receiver takes the first item
      #1;
      check(ain == rin && dout == second, $sformatf("item %0d enters after acknowledge", 2 * k + 1));
      ao = ~ao;              // receiver takes the second item
      #1;
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
