// Multiply-accumulate unit built on the radix-8 Booth multiplier.
//
// On every rising clock edge the product x * y (from radix8_multiplier) is
// added to the accumulator: acc_out <= acc_out + x * y. With constant inputs
// the accumulator therefore steps by the same product every clock (e.g.
// x = 341, y = 683 gives 232903, 465806, 698709, ...).
//
// Interface: x and y are N-bit two's complement inputs. product shows the
// combinational product x * y (2N bits). acc_out is the accumulator,
// ACC_W bits two's complement; it wraps modulo 2^ACC_W if the running sum
// leaves that range. rst (synchronous, active high) clears it.
//
// The structure (multiplier feeding an adder and an accumulator register)
// and the 16-bit operands follow the design's source; the accumulator width
// of 2N + 8 guard bits (256 worst-case products before any wrap), the
// wrap-around and the synchronous reset are this design's choices.
module mac_unit #(
  parameter int unsigned N     = 16,        // operand width
  parameter int unsigned ACC_W = 2 * N + 8, // accumulator width, >= 2N
  localparam int unsigned P    = 2 * N
) (
  input  logic                  clk,
  input  logic                  rst,     // synchronous, active high
  input  logic signed [N-1:0]   x,       // multiplicand
  input  logic signed [N-1:0]   y,       // multiplier
  output logic signed [P-1:0]   product, // x * y, combinational
  output logic signed [ACC_W-1:0] acc_out  // running sum of products
);

  logic signed [ACC_W-1:0] add_out;

  radix8_multiplier #(.N(N)) u_mul (
    .a (x),
    .b (y),
    .p (product)
  );

  assign add_out = acc_out + ACC_W'(product);

  always_ff @(posedge clk) begin
    if (rst) acc_out <= '0;
    else     acc_out <= add_out;
  end

endmodule
