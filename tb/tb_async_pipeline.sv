`timescale 1ns/1ps
// tb_async_pipeline -- self-checking test of the 2-phase micropipeline.
//
// A sender process writes a sequence of bytes with transition signalling and
// a receiver process reads them, checking order and values against its own
// copy of the sequence. Three phases: a stalled receiver (the pipeline must
// accept exactly STAGES items and then hold the next request unacknowledged,
// i.e. overflow protection), a free-running receiver, and a slow receiver
// with random pauses. The first token's latency through the empty pipeline
// must be one matched delay per stage. A time-based watchdog ends a hung run.
module tb_async_pipeline;
  localparam int unsigned WIDTH  = 8;
  localparam int unsigned STAGES = 3;
  localparam int unsigned N      = 40;

  logic rst, rin, ain, rout, aout;
  logic [WIDTH-1:0] din, dout;
  int checks, failures;
  int received;
  bit stall;

  async_pipeline #(.WIDTH(WIDTH), .STAGES(STAGES), .DELAY_NS(1.0)) dut (
    .rst(rst), .rin(rin), .ain(ain), .din(din),
    .rout(rout), .aout(aout), .dout(dout)
  );

  function automatic logic [WIDTH-1:0] item(int k);
    return WIDTH'((k * 37 + 11) ^ (k >> 1));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int sent;
  // sender
  initial begin
    rst = 0; rin = 0; din = '0; aout = 0; stall = 1; sent = 0;
    #1 rst = 1;
    #5 rst = 0;
    #5;
    for (int k = 0; k < N; k++) begin
      din = item(k);
      #0.5 rin = ~rin;
      wait (ain == rin);
      sent++;
      #($urandom_range(0, 3));
    end
  end

  // receiver
  initial begin
    received = 0;
    checks = 0; failures = 0;
    // phase 1: stalled receiver, pipeline fills up
    #200;
    check(sent == STAGES, $sformatf("stalled pipeline accepted %0d items, expected %0d", sent, STAGES));
    check(ain != rin, "request beyond capacity must stay unacknowledged");
    stall = 0;
    while (received < N) begin
      wait (rout != aout);
      check(dout == item(received),
            $sformatf("item %0d: got %0h expected %0h", received, dout, item(received)));
      received++;
      if (received > N / 2) #($urandom_range(0, 8));
      aout = ~aout;
    end
    #20;
    check(rout == aout && received == N, "pipeline drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // forward latency of an empty pipeline: one matched delay per stage
  realtime t_in, t_out;
  initial begin
    @(posedge rin);
    t_in = $realtime;
    @(posedge rout);
    t_out = $realtime;
    check(t_out - t_in == STAGES * 1.0ns,
          $sformatf("empty-pipeline latency %0t, expected %0d x 1 ns", t_out - t_in, STAGES));
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
