// Pre-processing stage of the Brent-Kung adder.
//
// Forms, for every bit position i, the propagate p[i] = a[i] ^ b[i] and the
// generate g[i] = a[i] & b[i]. These feed the prefix network; p also feeds
// the sum stage. WIDTH defaults to the 32 bits of the adder. Purely
// combinational, no clock.
module bk_preprocess #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  assign p = a ^ b;
  assign g = a & b;

endmodule
