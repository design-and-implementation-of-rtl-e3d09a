// Top level: the 32-bit Brent-Kung adder and the Brent-Kung carry-select
// adder, side by side.
//
// a, b, c0, sum, c32 are the 98 pins of the 32-bit Brent-Kung adder
// (brentkung): sum = a + b + c0. The csla_* pins reach the square-root
// carry-select adder (csla_bk_bec), whose groups are themselves Brent-Kung
// adders with a Binary to Excess-1 converter for the carry-in-1 case:
// csla_sum = csla_a + csla_b + csla_cin. The two adders share nothing.
// Both are purely combinational.
module cska_bk_top
  import bk_pkg::*;
(
  input  logic [ADDER_WIDTH-1:0] a,
  input  logic [ADDER_WIDTH-1:0] b,
  input  logic                   c0,
  output logic [ADDER_WIDTH-1:0] sum,
  output logic                   c32,

  input  logic [ADDER_WIDTH-1:0] csla_a,
  input  logic [ADDER_WIDTH-1:0] csla_b,
  input  logic                   csla_cin,
  output logic [ADDER_WIDTH-1:0] csla_sum,
  output logic                   csla_cout
);

  brentkung #(.WIDTH(ADDER_WIDTH)) u_bk (
    .a(a), .b(b), .c0(c0), .sum(sum), .c32(c32)
  );

  csla_bk_bec #(.WIDTH(ADDER_WIDTH)) u_csla (
    .a(csla_a), .b(csla_b), .cin(csla_cin), .sum(csla_sum), .cout(csla_cout)
  );

endmodule
