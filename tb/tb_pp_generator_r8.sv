// Self-checking testbench for pp_generator_r8 (N = 16 and N = 8).
//
// The testbench recodes the multiplier itself (radix-8 table) and drives the
// digits straight into the generator, so the encoder is not involved. Each
// aligned row is compared with a value computed arithmetically: d_j * A minus
// the negation bit (which is the one's complement of |d_j| * A for a
// negative digit), cut to N+2 bits, with the sign prefix (~s s s s on row 0,
// 1 1 ~s on the others) above it, shifted by 3j. The correction word must
// hold the negation bits at 3j. Finally all rows plus the correction word
// must add up to A * B, which shows the arrangement as a whole is right.
// For 341 * 683 the prefixes must read 1000, 110, 111, 111 on rows 0..3,
// the values of the worked example.
module tb_pp_generator_r8;
  import radix8_pkg::*;

  localparam int TABLE1 [16] = '{0, 1, 1, 2, 2, 3, 3, 4, -4, -3, -3, -2, -2, -1, -1, 0};
  localparam int unsigned G16 = num_groups(16);
  localparam int unsigned G8  = num_groups(8);

  int checks = 0;
  int failures = 0;

  logic [15:0]  a16;
  booth_digit_t d16 [G16];
  logic [31:0]  r16 [G16];
  logic [31:0]  e16;
  logic [7:0]   a8;
  booth_digit_t d8 [G8];
  logic [15:0]  r8 [G8];
  logic [15:0]  e8;

  pp_generator_r8 #(.N(16)) dut16 (.a(a16), .digit(d16), .row(r16), .ecw(e16));
  pp_generator_r8 #(.N(8))  dut8  (.a(a8),  .digit(d8),  .row(r8),  .ecw(e8));

  function automatic booth_digit_t make_digit(int v);
    booth_digit_t d;
    int m;
    d = '0;
    d.neg = (v < 0);
    m = (v < 0) ? -v : v;
    d.one = (m == 1); d.two = (m == 2); d.three = (m == 3); d.four = (m == 4);
    return d;
  endfunction

  // Generic check for operand width n; rows passed as 64-bit values.
  task automatic check_rows(int n, longint av, longint bv, const ref longint rows [8],
                            input longint ecw);
    int g, w, p;
    int dig [8];
    longint exp_row, v, total, k, prod_mask;
    g = (n + 2) / 3;
    w = n + 2;
    p = 2 * n;
    prod_mask = (longint'(1) << p) - 1;
    for (int j = 0; j < g; j++) begin
      int grp = 0;
      for (int t = 0; t < 4; t++) begin
        int i = 3 * j - 1 + t;
        bit bitv = (i < 0) ? 1'b0 : bv[(i >= n) ? n - 1 : i];
        grp |= int'(bitv) << t;
      end
      dig[j] = TABLE1[grp];
    end
    total = 0;
    k = 0;
    for (int j = 0; j < g; j++) begin
      bit negj = dig[j] < 0;
      bit sgn;
      v = longint'(dig[j]) * av - longint'(negj);
      v &= (longint'(1) << w) - 1;
      sgn = v[w-1];
      if (j == 0)
        v |= (longint'(sgn) << w) | (longint'(sgn) << (w + 1)) | (longint'(sgn) << (w + 2)) |
             (longint'(!sgn) << (w + 3));
      else
        v |= (longint'(!sgn) << w) | (longint'(1) << (w + 1)) | (longint'(1) << (w + 2));
      exp_row = (v << (3 * j)) & prod_mask;
      checks++;
      if (rows[j] != exp_row) begin
        failures++;
        $display("FAIL N=%0d A=%0d B=%0d row %0d: got %h expected %h", n, av, bv, j, rows[j], exp_row);
      end
      total += rows[j];
      if (negj) k |= longint'(1) << (3 * j);
    end
    checks++;
    if (ecw != k) begin
      failures++;
      $display("FAIL N=%0d B=%0d ecw=%h expected %h", n, bv, ecw, k);
    end
    total += ecw;
    checks++;
    if ((total & prod_mask) != ((av * bv) & prod_mask)) begin
      failures++;
      $display("FAIL N=%0d A=%0d B=%0d: rows sum to %h", n, av, bv, total & prod_mask);
    end
  endtask

  task automatic run16(logic [15:0] a, logic [15:0] b);
    longint rows [8];
    a16 = a;
    for (int j = 0; j < G16; j++) begin
      int grp = 0;
      for (int t = 0; t < 4; t++) begin
        int i = 3 * j - 1 + t;
        grp |= ((i < 0) ? 0 : int'(b[(i >= 16) ? 15 : i])) << t;
      end
      d16[j] = make_digit(TABLE1[grp]);
    end
    #1;
    rows = '{default: 0};
    for (int j = 0; j < G16; j++) rows[j] = longint'(r16[j]);
    check_rows(16, longint'(signed'(a)), longint'(signed'(b)), rows, longint'(e16));
  endtask

  task automatic run8(logic [7:0] a, logic [7:0] b);
    longint rows [8];
    a8 = a;
    for (int j = 0; j < G8; j++) begin
      int grp = 0;
      for (int t = 0; t < 4; t++) begin
        int i = 3 * j - 1 + t;
        grp |= ((i < 0) ? 0 : int'(b[(i >= 8) ? 7 : i])) << t;
      end
      d8[j] = make_digit(TABLE1[grp]);
    end
    #1;
    rows = '{default: 0};
    for (int j = 0; j < G8; j++) rows[j] = longint'(r8[j]);
    check_rows(8, longint'(signed'(a)), longint'(signed'(b)), rows, longint'(e8));
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run16(16'd85, 16'd211);
    run16(16'd341, 16'd683);
    checks++;
    if (r16[0][21:18] != 4'b1000 || r16[1][23:21] != 3'b110 ||
        r16[2][26:24] != 3'b111 || r16[3][29:27] != 3'b111) begin
      failures++;
      $display("FAIL 341 * 683 prefixes: %b %b %b %b", r16[0][21:18], r16[1][23:21],
               r16[2][26:24], r16[3][29:27]);
    end
    run16(16'h8000, 16'h8000);
    run16(16'h8000, 16'h7FFF);
    run16(16'h7FFF, 16'h8000);
    run16(16'hFFFF, 16'hFFFF);
    run16(16'h8000, 16'h0007);   // top digits +4 on the most negative A
    run16(16'h8000, 16'h0008);   // digit -4 on the most negative A
    for (int i = 0; i < 5000; i++) run16(16'($urandom), 16'($urandom));
    for (int i = 0; i < 3000; i++) run8(8'($urandom), 8'($urandom));
    run8(8'h80, 8'h80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
