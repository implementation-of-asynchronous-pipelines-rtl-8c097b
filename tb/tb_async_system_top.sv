`timescale 1ns/1ps
// tb_async_system_top -- end-to-end test of the whole design at its default
// parameters (3-stage pipeline, 60-tap filter, 16-deep UART FIFOs, 16
// clocks per bit).
//
// FIR path: coefficients are written, then samples are sent into the
// self-timed pipeline with 2-phase handshakes; every filter result is
// compared with y[n] = sum x[n-i] h[i] computed here. The result receiver
// stalls now and then, so the filter buffer holds, the filter stops taking
// samples and the pipeline fills up until the sender is held back.
// UART path: tx_out is looped into rx_in. A burst larger than the transmit
// FIFO goes out back to back (the FIFO reports full); the host does not
// read until the receive FIFO reports full, then reads faster than the line
// delivers; every byte must arrive.
// Then the loop is broken and the test drives frames with a wrong parity
// bit and a broken stop bit into the receiver, which must flag them.
// Each mechanism is counted and one that never happened is a failure.
module tb_async_system_top;
  import uart_pkg::*;
  localparam int unsigned TAPS = 60, DW = 8, CW = 8, STAGES = 3;
  localparam int unsigned AW = DW + CW + $clog2(TAPS);
  localparam int unsigned CPB = CLKS_PER_BIT, DEPTH = 16;
  localparam int unsigned NSAMP = 90, NBYTES = 40;

  logic clk = 0, rst;
  logic in_req, in_ack;
  logic [DW-1:0] in_data;
  logic coef_we;
  logic [$clog2(TAPS)-1:0] coef_addr;
  logic signed [CW-1:0] coef_data;
  logic y_req, y_ack;
  logic signed [AW-1:0] y_data;
  logic tx_start, tx_wr, tx_enable, tx_prty, tx_stop;
  logic [7:0] tx_in;
  logic tx_fifo_empty, tx_ff, tx_lsr, tx_out;
  logic [10:0] tx_temp;
  logic rx_start, rx_in, rx_enable, rx_prty, rx_stop, rx_rd;
  logic [7:0] rx_out;
  logic rx_fifo_empty, rx_ff, rx_rhr_empty;
  logic [1:0] rx_error_signal;
  logic loop_back, line_drive;

  async_system_top dut (
    .clk(clk), .rst(rst),
    .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .y_req(y_req), .y_ack(y_ack), .y_data(y_data),
    .tx_start(tx_start), .tx_in(tx_in), .tx_wr(tx_wr), .tx_enable(tx_enable),
    .tx_prty(tx_prty), .tx_stop(tx_stop), .tx_fifo_empty(tx_fifo_empty),
    .tx_ff(tx_ff), .tx_lsr(tx_lsr), .tx_temp(tx_temp), .tx_out(tx_out),
    .rx_start(rx_start), .rx_in(rx_in), .rx_enable(rx_enable), .rx_prty(rx_prty),
    .rx_stop(rx_stop), .rx_rd(rx_rd), .rx_out(rx_out), .rx_fifo_empty(rx_fifo_empty),
    .rx_ff(rx_ff), .rx_rhr_empty(rx_rhr_empty), .rx_error_signal(rx_error_signal)
  );

  always #5 clk = ~clk;
  assign rx_in = loop_back ? tx_out : line_drive;

  int checks = 0, failures = 0;
  int n_pipe_full = 0, n_fir_stall = 0, n_tx_full = 0, n_rx_full = 0;
  int n_back_to_back = 0, n_parity_err = 0, n_framing_err = 0, n_fir_out = 0;
  bit fir_done = 0, uart_done = 0, reset_done = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- FIR path ----------------
  logic signed [CW-1:0] h[TAPS];
  logic signed [DW-1:0] xs[$];

  function automatic longint model_y(int n);
    longint s = 0;
    for (int i = 0; i < TAPS; i++)
      if (n - i >= 0) s += longint'(xs[n - i]) * longint'(h[i]);
    return s;
  endfunction

  // sample sender (self-timed side)
  initial begin
    in_req = 0; in_data = '0;
    wait (reset_done);
    @(negedge coef_we);
    for (int n = 0; n < NSAMP; n++) begin
      in_data = DW'($urandom);
      xs.push_back(in_data);
      #1 in_req = ~in_req;
      #30;
      if (in_ack != in_req) begin
        n_pipe_full++;     // pipeline holding the request: flow control
        wait (in_ack == in_req);
      end
      #($urandom_range(1, 40));
    end
  end

  // result receiver with occasional long stalls
  initial begin
    y_ack = 0;
    wait (reset_done);
    for (int n = 0; n < NSAMP; n++) begin
      wait (y_req != y_ack);
      check(longint'(y_data) == model_y(n), $sformatf("y[%0d]=%0d expected %0d", n, y_data, model_y(n)));
      n_fir_out++;
      if (n % 15 == 7) begin
        repeat (400) @(posedge clk);
        n_fir_stall++;
      end
      #3 y_ack = ~y_ack;
    end
    fir_done = 1;
  end

  // ---------------- UART path ----------------
  logic [7:0] tx_sent[$];
  longint cycle = 0, last_start = -1;
  always @(posedge clk) begin
    cycle++;
    if (tx_ff && tx_wr) n_tx_full++;
    if (rx_ff) n_rx_full++;
  end
  // back-to-back frames: the shift register loads a new frame exactly one
  // frame time (11 bits) after the previous load
  always @(posedge clk) begin
    if (dut.u_tx.u_tsr.load) begin
      if (last_start >= 0 && cycle - last_start == longint'(11 * CPB)) n_back_to_back++;
      last_start = cycle;
    end
  end

  task automatic bit_time(logic v);
    line_drive = v;
    repeat (CPB) @(negedge clk);
  endtask

  task automatic bad_frame(logic [7:0] d, bit bad_par, bit bad_stop);
    bit_time(0);
    for (int b = 0; b < 8; b++) bit_time(d[b]);
    bit_time((^d) ^ bad_par);
    bit_time(!bad_stop);
    bit_time(1);
    bit_time(1);
  endtask

  initial begin
    tx_start = 0; tx_wr = 0; tx_in = 0; tx_enable = 1; tx_prty = 1; tx_stop = 0;
    rx_start = 0; rx_enable = 1; rx_prty = 1; rx_stop = 0; rx_rd = 0;
    loop_back = 1; line_drive = 1;
    wait (reset_done);
    @(negedge clk);
    tx_start = 1; rx_start = 1;
    // burst into the transmitter, in parallel with the reader below
    fork
      for (int k = 0; k < NBYTES; k++) begin
        while (tx_ff) begin
          tx_wr = 1;            // a write while full is refused
          @(negedge clk);
        end
        tx_in = 8'($urandom);
        tx_wr = 1;
        tx_sent.push_back(tx_in);
        @(negedge clk);
        tx_wr = 0;
      end
    join_none
    // let the receive FIFO fill before reading
    wait (rx_ff);
    @(negedge clk);
    for (int got = 0; got < NBYTES; ) begin
      if (!rx_fifo_empty) begin
        got++;
        check(rx_out == tx_sent[0], $sformatf("UART byte %0h expected %0h", rx_out, tx_sent[0]));
        check(rx_error_signal == 2'b00, "no UART error on good frames");
        void'(tx_sent.pop_front());
        rx_rd = 1;
        @(negedge clk);
        rx_rd = 0;
      end
      @(negedge clk);
    end
    check(tx_fifo_empty && tx_lsr, "transmitter drained");
    // error frames driven straight into the receiver
    repeat (4 * CPB) @(negedge clk);
    loop_back = 0;
    bad_frame(8'h96, 1, 0);
    if (rx_error_signal == 2'b01) n_parity_err++;
    check(rx_error_signal == 2'b01, "parity error flagged");
    bad_frame(8'h69, 0, 1);
    if (rx_error_signal == 2'b10) n_framing_err++;
    check(rx_error_signal == 2'b10, "framing error flagged");
    bad_frame(8'h55, 0, 0);
    check(rx_error_signal == 2'b00, "good frame clears the flags");
    uart_done = 1;
  end

  initial begin
    rst = 0; coef_we = 0; coef_addr = 0; coef_data = 0;
    #1 rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    reset_done = 1;
    for (int i = 0; i < TAPS; i++) begin
      h[i] = CW'($urandom_range(0, 255)) - 8'sd128;
      coef_we = 1; coef_addr = 6'(i); coef_data = h[i];
      @(negedge clk);
    end
    coef_we = 0;
    wait (fir_done && uart_done);
    check(n_fir_out == NSAMP, "all filter results received");
    check(n_pipe_full > 0,    "pipeline back-pressure (full pipeline) happened");
    check(n_fir_stall > 0,    "filter output buffer stall happened");
    check(n_tx_full > 0,      "transmit FIFO full happened");
    check(n_rx_full > 0,      "receive FIFO full happened");
    check(n_back_to_back > 0, "back-to-back UART frames happened");
    check(n_parity_err > 0,   "parity error detected");
    check(n_framing_err > 0,  "framing error detected");
    $display("mechanisms: pipe_full=%0d fir_stall=%0d tx_full=%0d rx_full=%0d back_to_back=%0d parity_err=%0d framing_err=%0d",
             n_pipe_full, n_fir_stall, n_tx_full, n_rx_full, n_back_to_back, n_parity_err, n_framing_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
