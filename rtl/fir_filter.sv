// Direct-form FIR filter whose taps are radix-8 Booth multipliers.
//
//   y[n] = sum_{k=0}^{TAPS-1} coef[k] * x[n-k]
//
// A new sample x_in is taken on every rising clock edge. The current sample
// and the last TAPS-1 samples (held in a shift register) are multiplied by
// their coefficients in TAPS radix8_multiplier instances, the products are
// summed, and the sum is registered into y_out. So y_out shows y[n] one clock
// after x[n] was presented, and a new output appears every clock.
//
// Interface: x_in and coef[] are N-bit two's complement inputs; coef[] is
// read continuously, so it can be changed between samples. y_out is
// 2N + clog2(TAPS) bits wide, enough for the sum never to overflow.
// rst (synchronous, active high) clears the delay line and y_out.
//
// The four taps, 16-bit data and the use of the Booth multiplier follow the
// design's source (its example: coefficients 1, 2, 3, 4 and a constant input
// of 21 give 21, 63, 126, 210). The direct-form structure, the one-cycle
// latency, the output width and the synchronous reset are this design's
// choices.
module fir_filter #(
  parameter int unsigned N    = 16, // sample and coefficient width
  parameter int unsigned TAPS = 4,  // number of taps
  localparam int unsigned P   = 2 * N,
  localparam int unsigned YW  = P + $clog2(TAPS)
) (
  input  logic                clk,
  input  logic                rst,         // synchronous, active high
  input  logic signed [N-1:0] x_in,        // input sample x[n]
  input  logic signed [N-1:0] coef [TAPS], // coef[k] multiplies x[n-k]
  output logic signed [YW-1:0] y_out       // y[n], one clock after x[n]
);

  logic signed [N-1:0]  tap  [TAPS]; // tap[k] = x[n-k]
  logic signed [N-1:0]  dly  [TAPS]; // dly[k] = x[n-1-k]; the last is unused
  logic        [P-1:0]  prod [TAPS];
  logic signed [YW-1:0] acc;

  assign tap[0] = x_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    assign tap[k] = dly[k-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS - 1; k++) dly[k] <= '0;
    end else begin
      for (int k = 0; k < TAPS - 1; k++) dly[k] <= tap[k];
    end
  end
  assign dly[TAPS-1] = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    radix8_multiplier #(.N(N)) u_mul (
      .a (coef[k]),
      .b (tap[k]),
      .p (prod[k])
    );
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += YW'(signed'(prod[k]));
  end

  always_ff @(posedge clk) begin
    if (rst) y_out <= '0;
    else     y_out <= acc;
  end

endmodule
