`timescale 1ns/1ps
// tb_uart_tsr -- the shift register sends bytes offered by a model THR; an
// independent line decoder samples tx_out in the middle of every bit and
// checks start bit, data (LSB first), even parity, stop bits and the frame
// period (frames must follow back to back: (10 + prty + stop) bit times
// from one start bit to the next). All four prty/stop settings are run.
module tb_uart_tsr;
  localparam int unsigned CPB = 8;
  logic clk = 0, rst, start, enable, prty, stop, thr_valid, tsr_empty, tx_out;
  logic [7:0] thr_in;
  logic [10:0] temp;
  int checks = 0, failures = 0;
  logic [7:0] src[$];
  logic [7:0] sent[$];
  longint cycle = 0;

  uart_tsr #(.CLKS_PER_BIT_P(CPB)) dut (
    .clk(clk), .rst(rst), .start(start), .enable(enable), .prty(prty), .stop(stop),
    .thr_in(thr_in), .thr_valid(thr_valid), .tsr_empty(tsr_empty), .temp(temp),
    .tx_out(tx_out)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign thr_valid = (src.size() != 0);
  assign thr_in    = thr_valid ? src[0] : 8'h00;
  // the model THR: a byte counts as taken if the TSR took it at this edge
  always @(posedge clk) begin
    automatic bit took = tsr_empty && thr_valid;
    #1;
    if (took) sent.push_back(src.pop_front());
  end

  // decode one frame; returns the cycle of its start edge
  task automatic decode(output longint t0);
    logic [7:0] d;
    logic p;
    @(negedge tx_out);
    t0 = cycle;
    repeat (CPB / 2) @(posedge clk);
    check(tx_out == 0, "start bit low at mid-bit");
    for (int b = 0; b < 8; b++) begin
      repeat (CPB) @(posedge clk);
      d[b] = tx_out;
    end
    if (prty) begin
      repeat (CPB) @(posedge clk);
      p = tx_out;
      check(p == ^d, "even parity bit");
    end
    repeat (CPB) @(posedge clk);
    check(tx_out == 1, "first stop bit high");
    if (stop) begin
      repeat (CPB) @(posedge clk);
      check(tx_out == 1, "second stop bit high");
    end
    check(sent.size() != 0 && d == sent[0], $sformatf("data %0h expected %0h", d, sent.size() ? sent[0] : 8'h0));
    if (sent.size() != 0) void'(sent.pop_front());
  endtask

  initial begin
    longint t_prev, t_now;
    rst = 1; start = 0; enable = 0; prty = 0; stop = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    check(tx_out == 1, "line idles high");
    for (int cfg = 0; cfg < 4; cfg++) begin
      prty = cfg[0]; stop = cfg[1];
      start = 1; enable = 1;
      for (int k = 0; k < 6; k++) src.push_back(8'($urandom));
      decode(t_prev);
      for (int k = 1; k < 6; k++) begin
        decode(t_now);
        check(t_now - t_prev == longint'((10 + prty + stop) * CPB),
              $sformatf("frame period %0d cycles, expected %0d", t_now - t_prev, (10 + prty + stop) * CPB));
        t_prev = t_now;
      end
      repeat (3 * CPB) @(posedge clk);
      check(tx_out == 1 && tsr_empty, "idle after the burst");
      enable = 0;
      @(negedge clk);
      check(!tsr_empty, "disabled TSR does not take a byte");
    end
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
