// Self-checking testbench for mac_unit (defaults: N = 16, ACC_W = 40).
//
// 1. The design's example: x = 341, y = 683 held constant after reset; the
//    accumulator must read 232903, 465806, 698709, ... one more product per
//    clock, the first one clock after the operands are applied.
// 2. Random signed operands, checked every clock against a reference
//    accumulator (modulo 2^ACC_W), with the combinational product checked too.
// 3. Reset in mid-stream clears the accumulator.
// 4. A long run of most-negative products drives the accumulator past its
//    range to check that it wraps like a two's complement register.
module tb_mac_unit;

  localparam int unsigned N = 16;
  localparam int unsigned ACC_W = 2 * N + 8;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst;
  logic signed [N-1:0]     x, y;
  logic signed [2*N-1:0]   product;
  logic signed [ACC_W-1:0] acc_out;
  logic signed [ACC_W-1:0] ref_acc;
  int wraps = 0;

  mac_unit dut (.clk(clk), .rst(rst), .x(x), .y(y), .product(product), .acc_out(acc_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic signed [N-1:0] xv, logic signed [N-1:0] yv);
    longint p;
    logic signed [ACC_W-1:0] acc_before;
    @(negedge clk);
    x = xv;
    y = yv;
    #1;
    p = longint'(xv) * longint'(yv);
    checks++;
    if (longint'(product) != p) begin
      failures++;
      $display("FAIL product %0d * %0d = %0d", xv, yv, product);
    end
    acc_before = ref_acc;
    ref_acc = ref_acc + ACC_W'(p);
    if ((p < 0) && (ref_acc > acc_before) || (p > 0) && (ref_acc < acc_before)) wraps++;
    @(posedge clk);
    #1;
    checks++;
    if (acc_out != ref_acc) begin
      failures++;
      $display("FAIL acc=%0d expected %0d", acc_out, ref_acc);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (acc_out != '0) begin failures++; $display("FAIL reset did not clear acc"); end
    rst = 1'b0; // released acc_before the next rising edge
    ref_acc = '0;
  endtask

  initial begin
    rst = 1'b1;
    x = '0;
    y = '0;
    ref_acc = '0;
    do_reset();

    // 1. Worked example.
    for (int i = 1; i <= 8; i++) begin
      step(16'sd341, 16'sd683);
      checks++;
      if (acc_out != ACC_W'(232903 * i)) begin
        failures++;
        $display("FAIL example clock %0d: acc=%0d", i, acc_out);
      end
    end

    // 2./3. Random operands, reset in the middle.
    for (int i = 0; i < 3000; i++) begin
      step(N'($urandom), N'($urandom));
      if (i == 1500) do_reset();
    end

    // 4. Overflow: (-32768) * (-32768) = 2^30 per clock, 2^39 is the limit.
    do_reset();
    for (int i = 0; i < 600; i++) step(16'sh8000, 16'sh8000);
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL accumulator never wrapped"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
