// End-to-end testbench for radix8_dsp_top at its default parameters
// (N = 16, TAPS = 4, ACC_W = 40).
//
// All three datapaths run at once, each against its own reference model:
//   * stand-alone multiplier: the worked example 85 * 211 = 17935, corners
//     and random operands, compared with a signed multiply;
//   * FIR filter: the worked example (coefficients 1, 2, 3, 4, constant input
//     21 gives 21, 63, 126, 210), then random samples and coefficients against
//     a reference with its own sample history;
//   * MAC unit: the worked example (341 * 683 accumulated every clock), then
//     random operands, then a run of most-negative products that wraps the
//     accumulator.
// The testbench counts how often each mechanism of the design occurred and
// fails if one never did: every Booth digit value -4..+4 (recoded here from
// the multiplier operand independently of the RTL), a negative top digit
// (correction bit going to the correction word), FIR outputs with a full
// four-sample history, FIR and MAC resets, MAC accumulation steps and an
// accumulator wrap-around.
module tb_radix8_dsp_top;

  localparam int unsigned N = 16;
  localparam int unsigned TAPS = 4;
  localparam int unsigned ACC_W = 2 * N + 8;
  localparam int unsigned YW = 2 * N + $clog2(TAPS);
  localparam int TABLE1 [16] = '{0, 1, 1, 2, 2, 3, 3, 4, -4, -3, -3, -2, -2, -1, -1, 0};

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst;
  logic [N-1:0]              mul_a, mul_b;
  logic [2*N-1:0]            mul_p;
  logic signed [N-1:0]       fir_x;
  logic signed [N-1:0]       fir_coef [TAPS];
  logic signed [YW-1:0]      fir_y;
  logic signed [N-1:0]       mac_x, mac_y;
  logic signed [2*N-1:0]     mac_product;
  logic signed [ACC_W-1:0]   mac_acc;

  radix8_dsp_top dut (
    .clk, .rst, .mul_a, .mul_b, .mul_p, .fir_x, .fir_coef, .fir_y,
    .mac_x, .mac_y, .mac_product, .mac_acc
  );

  // Reference state.
  longint hist [TAPS];
  int fir_filled;
  logic signed [ACC_W-1:0] ref_acc;

  // Mechanism counters.
  int digit_seen [9];     // index = digit value + 4
  int top_neg = 0;
  int fir_full = 0;
  int fir_resets = 0;
  int mac_resets = 0;
  int mac_steps = 0;
  int mac_wraps = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count_digits(logic [N-1:0] b);
    for (int j = 0; j < (N + 2) / 3; j++) begin
      int grp = 0;
      for (int t = 0; t < 4; t++) begin
        int i = 3 * j - 1 + t;
        grp |= ((i < 0) ? 0 : int'(b[(i >= N) ? N - 1 : i])) << t;
      end
      digit_seen[TABLE1[grp] + 4]++;
      if (j == (N + 2) / 3 - 1 && TABLE1[grp] < 0) top_neg++;
    end
  endfunction

  // One clock of the whole design: new operands on the falling edge, the
  // combinational product checked before the rising edge, registers after.
  task automatic cycle(logic [N-1:0] ma, logic [N-1:0] mb,
                       logic signed [N-1:0] fx,
                       logic signed [N-1:0] mx, logic signed [N-1:0] my);
    longint e, p;
    logic signed [ACC_W-1:0] acc_prev;
    @(negedge clk);
    mul_a = ma; mul_b = mb;
    fir_x = fx;
    mac_x = mx; mac_y = my;
    #1;
    count_digits(mb);
    count_digits(my);
    checks++;
    if (mul_p !== 32'(signed'(ma)) * 32'(signed'(mb))) begin
      failures++;
      $display("FAIL mul %0d * %0d = %0d", signed'(ma), signed'(mb), signed'(mul_p));
    end
    p = longint'(mx) * longint'(my);
    checks++;
    if (longint'(mac_product) != p) begin
      failures++;
      $display("FAIL mac product %0d * %0d = %0d", mx, my, mac_product);
    end
    // Reference models advance.
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(fx);
    if (fir_filled < TAPS) fir_filled++;
    if (fir_filled == TAPS) fir_full++;
    e = 0;
    for (int k = 0; k < TAPS; k++) e += longint'(fir_coef[k]) * hist[k];
    acc_prev = ref_acc;
    ref_acc = ref_acc + ACC_W'(p);
    if ((p < 0 && ref_acc > acc_prev) || (p > 0 && ref_acc < acc_prev)) mac_wraps++;
    mac_steps++;
    @(posedge clk);
    #1;
    checks += 2;
    if (longint'(fir_y) != e) begin
      failures++;
      $display("FAIL fir y=%0d expected %0d", fir_y, e);
    end
    if (mac_acc != ref_acc) begin
      failures++;
      $display("FAIL mac acc=%0d expected %0d", mac_acc, ref_acc);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (fir_y != '0 || mac_acc != '0) begin
      failures++;
      $display("FAIL reset did not clear fir_y / mac_acc");
    end
    rst = 1'b0;
    hist = '{default: 0};
    fir_filled = 0;
    ref_acc = '0;
    fir_resets++;
    mac_resets++;
  endtask

  initial begin
    automatic int fir_example [4] = '{21, 63, 126, 210};
    rst = 1'b1;
    mul_a = '0; mul_b = '0; fir_x = '0; mac_x = '0; mac_y = '0;
    for (int k = 0; k < TAPS; k++) fir_coef[k] = N'(k + 1);
    digit_seen = '{default: 0};
    do_reset();

    // The three worked examples, all at once.
    for (int i = 1; i <= 6; i++) begin
      cycle(16'd85, 16'd211, 16'sd21, 16'sd341, 16'sd683);
      checks += 3;
      if (mul_p != 32'd17935) begin failures++; $display("FAIL example product %0d", mul_p); end
      if (fir_y != YW'(fir_example[(i < 4) ? i - 1 : 3])) begin
        failures++;
        $display("FAIL example fir clock %0d: %0d", i, fir_y);
      end
      if (mac_acc != ACC_W'(232903 * i)) begin
        failures++;
        $display("FAIL example mac clock %0d: %0d", i, mac_acc);
      end
    end

    // Random traffic, with coefficient changes and resets along the way.
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < TAPS; k++) fir_coef[k] = N'($urandom);
      for (int i = 0; i < 500; i++)
        cycle(N'($urandom), N'($urandom), N'($urandom), N'($urandom), N'($urandom));
      if (r % 3 == 2) do_reset();
    end

    // Corner operands on every path.
    for (int i = 0; i < 4; i++) fir_coef[i] = 16'sh8000;
    cycle(16'h8000, 16'h8000, 16'sh8000, 16'sh8000, 16'sh8000);
    cycle(16'h7FFF, 16'h8000, 16'sh7FFF, 16'sh7FFF, 16'sh8000);
    cycle(16'h0007, 16'h7777, 16'sh8000, 16'sh0007, 16'sh7777);

    // Accumulator wrap: 2^30 per clock against a 2^39 range.
    do_reset();
    for (int i = 0; i < 600; i++) cycle(N'($urandom), 16'h8888, 16'sd1, 16'sh8000, 16'sh8000);

    // Every mechanism must have happened.
    for (int v = -4; v <= 4; v++) begin
      checks++;
      if (digit_seen[v + 4] == 0) begin failures++; $display("FAIL Booth digit %0d never seen", v); end
    end
    checks += 6;
    if (top_neg == 0)    begin failures++; $display("FAIL no negative top digit"); end
    if (fir_full == 0)   begin failures++; $display("FAIL FIR history never full"); end
    if (fir_resets == 0) begin failures++; $display("FAIL no FIR reset"); end
    if (mac_resets == 0) begin failures++; $display("FAIL no MAC reset"); end
    if (mac_steps == 0)  begin failures++; $display("FAIL no MAC step"); end
    if (mac_wraps == 0)  begin failures++; $display("FAIL MAC never wrapped"); end
    for (int v = -4; v <= 4; v++) $display("Booth digit %0d seen %0d times", v, digit_seen[v + 4]);
    $display("negative top digit %0d, full FIR windows %0d, resets %0d, MAC steps %0d, MAC wraps %0d",
             top_neg, fir_full, fir_resets, mac_steps, mac_wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
