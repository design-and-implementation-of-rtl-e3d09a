// Sum (post-processing) stage of the Brent-Kung adder.
//
// Each sum bit is the bit's propagate XORed with the carry into that bit:
//     sum[0] = p[0] ^ cin,   sum[i] = p[i] ^ c[i-1]  (i > 0)
// where c[i] is the carry out of bit i as produced by the prefix network.
// The carry out of the adder is c[WIDTH-1]. Purely combinational.
module bk_postprocess #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] carry_in;

  if (WIDTH > 1) begin : g_shift
    assign carry_in = {c[WIDTH-2:0], cin};
  end else begin : g_one
    assign carry_in = cin;
  end

  assign sum  = p ^ carry_in;
  assign cout = c[WIDTH-1];

endmodule
