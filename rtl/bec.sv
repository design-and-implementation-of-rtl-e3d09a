// Binary to Excess-1 converter (add-one unit).
//
// y = x + 1 modulo 2^WIDTH, built without a carry chain of full adders:
//     y[0] = ~x[0],   y[i] = x[i] ^ (x[0] & x[1] & ... & x[i-1]).
// In the carry-select adder it turns the carry-in-0 result of a group
// (its sum bits plus carry-out) into the carry-in-1 result, replacing a
// second adder. WIDTH defaults to 11: one more than the largest (10-bit)
// group of the carry-select adder. Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 11
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);

  // all_ones[i] = AND of x[i-1:0]; all_ones[0] = 1.
  logic [WIDTH-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & x[i-1];
  end

  assign y = x ^ all_ones;

endmodule
