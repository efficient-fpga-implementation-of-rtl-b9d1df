// Radix-8 Booth multiplier with its two DSP applications, side by side.
//
// Three independent datapaths share only the clock and reset:
//   * mul_*: a stand-alone N x N signed radix-8 Booth multiplier
//     (radix8_multiplier), combinational, p = a * b.
//   * fir_*: a TAPS-tap direct-form FIR filter (fir_filter) whose taps are
//     radix-8 multipliers; one sample in and one output out per clock, with
//     one clock of latency.
//   * mac_*: a multiply-accumulate unit (mac_unit) that adds x * y to its
//     accumulator on every clock.
// rst is synchronous and active high for the two clocked parts.
// Defaults are N = 16, TAPS = 4, as in the design's source; the accumulator
// width is this design's choice (see mac_unit).
module radix8_dsp_top #(
  parameter int unsigned N     = 16,
  parameter int unsigned TAPS  = 4,
  parameter int unsigned ACC_W = 2 * N + 8,
  localparam int unsigned P    = 2 * N,
  localparam int unsigned YW   = P + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst,
  // stand-alone multiplier
  input  logic [N-1:0]            mul_a,
  input  logic [N-1:0]            mul_b,
  output logic [P-1:0]            mul_p,
  // FIR filter
  input  logic signed [N-1:0]     fir_x,
  input  logic signed [N-1:0]     fir_coef [TAPS],
  output logic signed [YW-1:0]    fir_y,
  // MAC unit
  input  logic signed [N-1:0]     mac_x,
  input  logic signed [N-1:0]     mac_y,
  output logic signed [P-1:0]     mac_product,
  output logic signed [ACC_W-1:0] mac_acc
);

  radix8_multiplier #(.N(N)) u_mul (
    .a (mul_a),
    .b (mul_b),
    .p (mul_p)
  );

  fir_filter #(.N(N), .TAPS(TAPS)) u_fir (
    .clk   (clk),
    .rst   (rst),
    .x_in  (fir_x),
    .coef  (fir_coef),
    .y_out (fir_y)
  );

  mac_unit #(.N(N), .ACC_W(ACC_W)) u_mac (
    .clk     (clk),
    .rst     (rst),
    .x       (mac_x),
    .y       (mac_y),
    .product (mac_product),
    .acc_out (mac_acc)
  );

endmodule
