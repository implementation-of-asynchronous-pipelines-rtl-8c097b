`timescale 1ns/1ps
// tb_fir_filter -- 60-tap filter at its default size. Loads coefficients,
// sends samples with 2-phase handshakes and compares every result with a
// direct evaluation of y[n] = sum x[n-i] h[i] in the testbench. Covers the
// impulse response (a 1 followed by zeros must play back h[0..59]), random
// data, the latency from request to result (TAPS+4 clocks) and the buffer
// stall: while a result is not acknowledged, the next sample must not be
// taken.
module tb_fir_filter;
  localparam int unsigned TAPS = 60, DW = 8, CW = 8;
  localparam int unsigned AW = DW + CW + $clog2(TAPS);
  logic clk = 0, rst;
  logic coef_we;
  logic [$clog2(TAPS)-1:0] coef_addr;
  logic signed [CW-1:0] coef_data;
  logic x_req, x_ack, y_req, y_ack;
  logic signed [DW-1:0] x_data;
  logic signed [AW-1:0] y_data;
  int checks = 0, failures = 0, stalls = 0;
  longint cycle = 0;
  logic signed [AW-1:0] last_y;

  logic signed [CW-1:0] h[TAPS];
  logic signed [DW-1:0] xs[$];

  fir_filter #(.TAPS(TAPS), .DATA_W(DW), .COEF_W(CW)) dut (
    .clk(clk), .rst(rst), .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .x_req(x_req), .x_ack(x_ack), .x_data(x_data),
    .y_req(y_req), .y_ack(y_ack), .y_data(y_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint model_y();
    longint s = 0;
    for (int i = 0; i < TAPS; i++)
      if (i < xs.size()) s += longint'(xs[xs.size() - 1 - i]) * longint'(h[i]);
    return s;
  endfunction

  // one sample in, one result out; hold_ack delays the acknowledge
  task automatic sample(logic signed [DW-1:0] x, int hold_ack);
    longint t0;
    @(negedge clk);
    x_data = x;
    xs.push_back(x);
    x_req = ~x_req;
    t0 = cycle;
    wait (y_req != y_ack);
    check(cycle - t0 == longint'(TAPS + 4), $sformatf("latency %0d cycles, expected %0d", cycle - t0, TAPS + 4));
    check(x_ack == x_req, "sample acknowledged");
    check(longint'(y_data) == model_y(), $sformatf("y=%0d expected %0d", y_data, model_y()));
    last_y = y_data;
    if (hold_ack > 0) begin
      // next sample offered while the buffer is still full
      @(negedge clk);
      x_data = x + 1'b1;
      x_req = ~x_req;
      repeat (hold_ack) @(negedge clk);
      check(x_ack != x_req, "buffer full holds the next sample back");
      stalls++;
      y_ack = ~y_ack;
      xs.push_back(x_data);
      wait (y_req != y_ack);
      check(longint'(y_data) == model_y(), $sformatf("after stall y=%0d expected %0d", y_data, model_y()));
    end
    @(negedge clk);
    y_ack = ~y_ack;
  endtask

  initial begin
    rst = 1; coef_we = 0; coef_addr = 0; coef_data = 0; x_req = 0; y_ack = 0; x_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < TAPS; i++) begin
      h[i] = CW'($urandom_range(0, 255)) - 8'sd128;
      coef_we = 1; coef_addr = 6'(i); coef_data = h[i];
      @(negedge clk);
    end
    coef_we = 0;
    // impulse response
    sample(8'sd1, 0);
    check(longint'(last_y) == longint'(h[0]), "impulse response h[0]");
    for (int i = 1; i < TAPS; i++) begin
      sample(8'sd0, 0);
      check(longint'(last_y) == longint'(h[i]), $sformatf("impulse response h[%0d]", i));
    end
    // random samples, some with a stalled output
    for (int k = 0; k < 80; k++)
      sample(DW'($urandom), (k % 10 == 3) ? 100 : 0);
    // extremes
    for (int k = 0; k < 70; k++) sample(-8'sd128, 0);
    check(stalls > 0, "buffer stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
