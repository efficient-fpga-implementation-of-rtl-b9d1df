// Self-checking testbench for wallace_adder.
//
// Three instances cover the multiplier's case (7 rows of 32 bits) and two
// other tree shapes (3 rows and 10 rows of 16 bits). Random rows, all-ones
// rows (every carry propagates) and single-bit patterns are applied, and the
// result is compared with the plain sum of the rows modulo 2^W.
module tb_wallace_adder;

  int checks = 0;
  int failures = 0;

  logic [31:0] r7  [7];
  logic [31:0] s7;
  logic [15:0] r3  [3];
  logic [15:0] s3;
  logic [15:0] r10 [10];
  logic [15:0] s10;

  wallace_adder #(.ROWS(7),  .W(32)) dut7  (.rows(r7),  .sum(s7));
  wallace_adder #(.ROWS(3),  .W(16)) dut3  (.rows(r3),  .sum(s3));
  wallace_adder #(.ROWS(10), .W(16)) dut10 (.rows(r10), .sum(s10));

  task automatic check_all();
    logic [31:0] e7;
    logic [15:0] e3, e10;
    #1;
    e7 = '0; e3 = '0; e10 = '0;
    foreach (r7[i])  e7  += r7[i];
    foreach (r3[i])  e3  += r3[i];
    foreach (r10[i]) e10 += r10[i];
    checks += 3;
    if (s7 != e7)   begin failures++; $display("FAIL 7 rows: got %h expected %h", s7, e7); end
    if (s3 != e3)   begin failures++; $display("FAIL 3 rows: got %h expected %h", s3, e3); end
    if (s10 != e10) begin failures++; $display("FAIL 10 rows: got %h expected %h", s10, e10); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (r7[i])  r7[i]  = '1;
    foreach (r3[i])  r3[i]  = '1;
    foreach (r10[i]) r10[i] = '1;
    check_all();
    for (int b = 0; b < 32; b++) begin
      foreach (r7[i])  r7[i]  = 32'(1) << b;
      foreach (r3[i])  r3[i]  = 16'(1) << (b % 16);
      foreach (r10[i]) r10[i] = 16'(1) << (b % 16);
      check_all();
    end
    for (int n = 0; n < 3000; n++) begin
      foreach (r7[i])  r7[i]  = $urandom;
      foreach (r3[i])  r3[i]  = 16'($urandom);
      foreach (r10[i]) r10[i] = 16'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
