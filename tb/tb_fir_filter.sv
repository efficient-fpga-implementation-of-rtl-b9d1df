// Self-checking testbench for fir_filter (defaults: N = 16, TAPS = 4).
//
// 1. The design's example: coefficients 1, 2, 3, 4 and a constant input of
//    21 from reset must give 21, 63, 126, 210 on the first four clocks and
//    then stay at 210. The first value appearing one clock after the first
//    sample checks the one-cycle latency.
// 2. Random signed samples and coefficients (including the most negative
//    values), compared every clock with a reference model that keeps its own
//    sample history and computes y[n] = sum coef[k] * x[n-k].
// 3. A reset in the middle of a stream must clear output and history.
// Inputs change on the falling edge; outputs are read after the rising edge.
module tb_fir_filter;

  localparam int unsigned N = 16;
  localparam int unsigned TAPS = 4;
  localparam int unsigned YW = 2 * N + $clog2(TAPS);

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  logic clk = 1'b0;
  logic rst;
  logic signed [N-1:0]  x_in;
  logic signed [N-1:0]  coef [TAPS];
  logic signed [YW-1:0] y_out;

  longint hist [TAPS]; // hist[k] = x[n-k] of the reference model

  fir_filter dut (.clk(clk), .rst(rst), .x_in(x_in), .coef(coef), .y_out(y_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one sample, clock it in, and compare with the reference.
  task automatic step(logic signed [N-1:0] x);
    longint e;
    @(negedge clk);
    x_in = x;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(x);
    e = 0;
    for (int k = 0; k < TAPS; k++) e += longint'(coef[k]) * hist[k];
    @(posedge clk);
    #1;
    checks++;
    if (longint'(y_out) != e) begin
      failures++;
      $display("FAIL cycle %0d x=%0d: y=%0d expected %0d", cycles, x, y_out, e);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (y_out != '0) begin failures++; $display("FAIL y not cleared by reset"); end
    rst = 1'b0; // released acc_before the next rising edge
    hist = '{default: 0};
  endtask

  initial begin
    automatic int expect_paper [4] = '{21, 63, 126, 210};
    rst = 1'b1;
    x_in = '0;
    for (int k = 0; k < TAPS; k++) coef[k] = N'(k + 1);
    hist = '{default: 0};
    do_reset();

    // 1. Worked example: latency one clock, then the step response.
    for (int i = 0; i < 6; i++) begin
      step(16'sd21);
      checks++;
      if (y_out != YW'(expect_paper[(i < 4) ? i : 3])) begin
        failures++;
        $display("FAIL example clock %0d: y=%0d expected %0d", i + 1, y_out, expect_paper[(i < 4) ? i : 3]);
      end
    end

    // 2. Random streams with random coefficients.
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < TAPS; k++) coef[k] = N'($urandom);
      if (r == 0) for (int k = 0; k < TAPS; k++) coef[k] = 16'sh8000;
      for (int i = 0; i < 200; i++) step((r == 0 && i < 8) ? 16'sh8000 : N'($urandom));
      // 3. Reset in the middle of the stream every few runs.
      if (r % 5 == 4) do_reset();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
