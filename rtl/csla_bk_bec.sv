// Square-root carry-select adder built from Brent-Kung adders and BECs.
//
// The operands are cut into groups of growing size (bk_pkg::CSLA_GROUP,
// least significant first: 2,2,3,4,5,6,10 bits for 32 bits). The lowest
// group is a plain Brent-Kung adder fed with the carry-in. Every other group
// adds its bits once, with carry-in 0, in a Brent-Kung adder; a Binary to
// Excess-1 converter adds one to that (n+1)-bit result, which gives the
// result for carry-in 1; a 2:1 multiplexer then picks one of the two by the
// carry out of the group below. All groups compute in parallel, so only the
// multiplexer select ripples from group to group. Because the groups grow,
// the later groups' local sums are ready by the time their select arrives.
// The scheme (BK adder per group, BEC for the carry-in-1 case, multiplexer
// stage, square-root grouping) is the design's; the group sizes are this
// implementation's choice. Purely combinational.
module csla_bk_bec
  import bk_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  if (WIDTH != csla_total()) begin : g_bad_width
    $error("csla_bk_bec: WIDTH must equal the sum of bk_pkg::CSLA_GROUP");
  end

  // carry[k] = carry into group k; carry[CSLA_NGROUPS] = carry out.
  logic [CSLA_NGROUPS:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < CSLA_NGROUPS; k++) begin : g_grp
    localparam int unsigned N   = CSLA_GROUP[k];
    localparam int unsigned OFF = csla_offset(k);

    if (k == 0) begin : g_first
      brentkung #(.WIDTH(N)) u_bk (
        .a(a[OFF +: N]), .b(b[OFF +: N]), .c0(carry[k]),
        .sum(sum[OFF +: N]), .c32(carry[k+1])
      );
    end else begin : g_select
      logic [N:0] r0;   // {carry-out, sum} with carry-in 0
      logic [N:0] r1;   // {carry-out, sum} with carry-in 1

      brentkung #(.WIDTH(N)) u_bk (
        .a(a[OFF +: N]), .b(b[OFF +: N]), .c0(1'b0),
        .sum(r0[N-1:0]), .c32(r0[N])
      );

      bec #(.WIDTH(N + 1)) u_bec (
        .x(r0), .y(r1)
      );

      assign {carry[k+1], sum[OFF +: N]} = carry[k] ? r1 : r0;
    end
  end

  assign cout = carry[CSLA_NGROUPS];

endmodule
