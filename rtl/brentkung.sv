// 32-bit Brent-Kung parallel-prefix adder.
//
// sum = a + b + c0 (low WIDTH bits), c32 = carry out. Three stages:
//   1. bk_preprocess:     p = a ^ b, g = a & b per bit;
//   2. bk_prefix_network: Brent-Kung tree of black and gray cells giving the
//                         carry out of every bit (carry-in merged at bit 0);
//   3. bk_postprocess:    sum[i] = p[i] ^ carry into bit i.
// The port names and the 98 pins (32 + 32 + 1 in, 32 + 1 out) follow the
// adder as published; WIDTH may be changed, the carry-out port keeps its
// name c32. Purely combinational: the result settles after the gate delay
// of about 2*log2(WIDTH) cell levels, with no clock and no latency in cycles.
module brentkung #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output logic [WIDTH-1:0] sum,
  output logic             c32
);

  logic [WIDTH-1:0] p, g, c;

  bk_preprocess #(.WIDTH(WIDTH)) u_pre (
    .a(a), .b(b), .p(p), .g(g)
  );

  bk_prefix_network #(.WIDTH(WIDTH)) u_tree (
    .p(p), .g(g), .cin(c0), .c(c)
  );

  bk_postprocess #(.WIDTH(WIDTH)) u_post (
    .p(p), .c(c), .cin(c0), .sum(sum), .cout(c32)
  );

endmodule
