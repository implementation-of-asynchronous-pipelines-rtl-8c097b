`timescale 1ns/1ps
// tb_uart_sampler -- a line driver sends frames (back to back, with every
// prty/stop setting, with wrong parity and with a broken stop bit, and one
// short noise pulse) and the test checks the word and the stat bits the
// sampling block reports with each done pulse, and that the noise pulse is
// not taken as a frame.
module tb_uart_sampler;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst, start, rx_in, prty, stop, done;
  logic [7:0] data_out;
  logic [2:0] stat;
  int checks = 0, failures = 0, frames_done = 0;

  uart_sampler #(.CLKS_PER_BIT_P(CPB)) dut (
    .clk(clk), .rst(rst), .start(start), .rx_in(rx_in), .prty(prty), .stop(stop),
    .data_out(data_out), .stat(stat), .done(done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (done) frames_done++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bit_time(logic v);
    rx_in = v;
    repeat (CPB) @(negedge clk);
  endtask

  // send one frame and check what the sampler reports for it
  task automatic frame(logic [7:0] d, bit bad_par, bit bad_stop1, bit bad_stop2);
    logic [2:0] exp_stat;
    int n_before;
    n_before = frames_done;
    bit_time(0);
    for (int b = 0; b < 8; b++) bit_time(d[b]);
    if (prty) bit_time((^d) ^ bad_par);
    fork
      begin
        bit_time(!bad_stop1);
        if (stop) bit_time(!bad_stop2);
      end
      begin
        @(posedge done);
        #1;
        exp_stat = {stop ? !bad_stop2 : 1'b1, !bad_stop1, prty & bad_par};
        check(data_out == d, $sformatf("data %0h expected %0h", data_out, d));
        check(stat == exp_stat, $sformatf("stat %b expected %b", stat, exp_stat));
      end
    join
    check(frames_done == n_before + 1, "exactly one done per frame");
  endtask

  initial begin
    rst = 1; start = 0; rx_in = 1; prty = 0; stop = 0;
    repeat (3) @(negedge clk);
    rst = 0; start = 1;
    repeat (CPB) @(negedge clk);
    // noise: a low pulse shorter than half a bit
    rx_in = 0;
    repeat (CPB / 4) @(negedge clk);
    rx_in = 1;
    repeat (3 * CPB) @(negedge clk);
    check(frames_done == 0, "noise pulse rejected");
    for (int cfg = 0; cfg < 4; cfg++) begin
      prty = cfg[0]; stop = cfg[1];
      for (int k = 0; k < 5; k++) frame(8'($urandom), 0, 0, 0);   // back to back
      frame(8'h5A, 1, 0, 0);
      frame(8'hC3, 0, 1, 0);
      frame(8'h0F, 0, 0, 1);
      bit_time(1);
      bit_time(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
