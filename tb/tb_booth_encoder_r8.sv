// Self-checking testbench for booth_encoder_r8.
//
// Two instances, N = 16 (6 digits) and N = 8 (3 digits), are driven with
// corner values and random multipliers; the N = 8 one is also swept over all
// 256 inputs. For every digit the testbench cuts the 4-bit group out of the
// multiplier itself (zero appended below the LSB, sign bit repeated above the
// MSB) and looks up the expected digit in the radix-8 recoding table. It then
// checks that the one-hot selects are legal, that the digit matches the
// table, and that sum_j d_j * 8^j equals the signed multiplier.
module tb_booth_encoder_r8;
  import radix8_pkg::*;

  localparam int TABLE1 [16] = '{0, 1, 1, 2, 2, 3, 3, 4, -4, -3, -3, -2, -2, -1, -1, 0};

  int checks = 0;
  int failures = 0;

  logic [15:0] b16;
  logic [7:0]  b8;
  booth_digit_t d16 [num_groups(16)];
  booth_digit_t d8  [num_groups(8)];

  booth_encoder_r8 #(.N(16)) dut16 (.b(b16), .digit(d16));
  booth_encoder_r8 #(.N(8))  dut8  (.b(b8),  .digit(d8));

  function automatic int digit_value(booth_digit_t d);
    int m;
    m = d.one ? 1 : d.two ? 2 : d.three ? 3 : d.four ? 4 : 0;
    return d.neg ? -m : m;
  endfunction

  function automatic bit onehot_ok(booth_digit_t d);
    int n;
    n = int'(d.one) + int'(d.two) + int'(d.three) + int'(d.four);
    return (n <= 1) && !(d.neg && n == 0);
  endfunction

  // Bit i of the multiplier as seen by the recoder (i = -1 is the appended 0).
  function automatic bit ext_bit(longint v, int n, int i);
    if (i < 0) return 1'b0;
    if (i >= n) i = n - 1;
    return v[i];
  endfunction

  task automatic check16(logic [15:0] v);
    longint recon;
    int g;
    b16 = v;
    #1;
    recon = 0;
    for (int j = 0; j < num_groups(16); j++) begin
      g = int'({ext_bit(longint'(v), 16, 3*j+2), ext_bit(longint'(v), 16, 3*j+1),
           ext_bit(longint'(v), 16, 3*j), ext_bit(longint'(v), 16, 3*j-1)});
      checks++;
      if (!onehot_ok(d16[j]) || digit_value(d16[j]) != TABLE1[g]) begin
        failures++;
        $display("FAIL N=16 b=%h digit %0d group %b: got %0d expected %0d",
                 v, j, g[3:0], digit_value(d16[j]), TABLE1[g]);
      end
      recon += longint'(digit_value(d16[j])) * (longint'(1) << (3 * j));
    end
    checks++;
    if (recon != longint'(signed'(v))) begin
      failures++;
      $display("FAIL N=16 b=%h: digits sum to %0d", v, recon);
    end
  endtask

  task automatic check8(logic [7:0] v);
    longint recon;
    int g;
    b8 = v;
    #1;
    recon = 0;
    for (int j = 0; j < num_groups(8); j++) begin
      g = int'({ext_bit(longint'(v), 8, 3*j+2), ext_bit(longint'(v), 8, 3*j+1),
           ext_bit(longint'(v), 8, 3*j), ext_bit(longint'(v), 8, 3*j-1)});
      checks++;
      if (!onehot_ok(d8[j]) || digit_value(d8[j]) != TABLE1[g]) begin
        failures++;
        $display("FAIL N=8 b=%h digit %0d: got %0d expected %0d",
                 v, j, digit_value(d8[j]), TABLE1[g]);
      end
      recon += longint'(digit_value(d8[j])) * (longint'(1) << (3 * j));
    end
    checks++;
    if (recon != longint'(signed'(v))) begin
      failures++;
      $display("FAIL N=8 b=%h: digits sum to %0d", v, recon);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Values from the design's worked examples, and corners.
    check16(16'd211);
    check16(16'd683);
    check16(16'd0);
    check16(16'hFFFF);
    check16(16'h8000);
    check16(16'h7FFF);
    check16(16'h5555);
    check16(16'hAAAA);
    for (int i = 0; i < 16; i++) check16(16'(i) << 12 | 16'(i) << 4);
    for (int i = 0; i < 4000; i++) check16(16'($urandom));
    for (int i = 0; i < 256; i++) check8(8'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
