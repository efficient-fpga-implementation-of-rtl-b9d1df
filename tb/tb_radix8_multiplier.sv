// Self-checking testbench for radix8_multiplier.
//
// The default 16 x 16 instance gets the two worked examples of the design
// (85 * 211 = 17935 and 341 * 683 = 232903), the signed corners and 20000
// random operand pairs. A second instance at N = 8 is checked exhaustively
// over all 65536 operand pairs. Reference: the simulator's own signed
// multiply.
module tb_radix8_multiplier;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;

  radix8_multiplier dut16 (.a(a16), .b(b16), .p(p16));
  radix8_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  task automatic check16(logic [15:0] a, logic [15:0] b);
    logic signed [31:0] e;
    a16 = a;
    b16 = b;
    #1;
    e = 32'(signed'(a)) * 32'(signed'(b));
    checks++;
    if (p16 !== e) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d",
               signed'(a), signed'(b), signed'(p16), e);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'd85, 16'd211);
    checks++;
    if (p16 != 32'd17935) begin failures++; $display("FAIL 85 * 211 = %0d", p16); end
    check16(16'd341, 16'd683);
    checks++;
    if (p16 != 32'd232903) begin failures++; $display("FAIL 341 * 683 = %0d", p16); end
    check16(16'h8000, 16'h8000);
    check16(16'h8000, 16'h7FFF);
    check16(16'h7FFF, 16'h7FFF);
    check16(16'hFFFF, 16'h8000);
    check16(16'h0000, 16'hFFFF);
    check16(16'h1234, 16'h0000);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        logic signed [15:0] e8;
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        e8 = 16'(signed'(a8)) * 16'(signed'(b8));
        checks++;
        if (p8 !== e8) begin
          failures++;
          if (failures < 20) $display("FAIL N=8 %0d * %0d: got %0d", signed'(a8), signed'(b8), signed'(p8));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
