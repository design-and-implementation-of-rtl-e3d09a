// Brent-Kung carry (generation) stage.
//
// Takes the per-bit propagate/generate pairs and the carry-in and returns
// c[i], the carry out of bit i, for every bit. The carry-in is first merged
// into bit 0 with a gray cell, so c[0] = g[0] | (p[0] & cin) and every span
// that reaches bit 0 is a final carry; such joins need only gray cells.
//
// The tree is the Brent-Kung arrangement, built for any WIDTH >= 1:
//   * up-sweep, levels l = 0 .. U-1 (U = clog2(WIDTH)), span s = 2^l:
//     node i (with (i+1) mod 2s == 0) joins node i-s. The join is a gray
//     cell when it reaches bit 0 (i+1 == 2s), else a black cell.
//   * down-sweep, spans s = 2^(U-2) .. 1: node i with (i+1) mod 2s == s and
//     i+1 > s joins the already final node i-s with a gray cell.
// Nodes that take no part at a level pass their pair on unchanged. For
// 32 bits this is 5 + 4 = 9 cell levels and 2*32 - 2 - 5 = 57 cells
// (26 black, 31 gray), plus the carry-in cell.
// Purely combinational, no clock.
module bk_prefix_network #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  input  logic             cin,
  output logic [WIDTH-1:0] c
);

  localparam int unsigned UP = $clog2(WIDTH);
  localparam int unsigned NLEV = (UP == 0) ? 0 : 2 * UP - 1;

  // Group generate / propagate of every node after each level.
  logic [WIDTH-1:0] gl [NLEV+1];
  logic [WIDTH-1:0] pl [NLEV+1];

  // Carry-in merged into bit 0.
  bk_gray_cell u_cin (
    .g_hi(g[0]), .p_hi(p[0]), .g_lo(cin), .g(gl[0][0])
  );
  assign pl[0][0] = p[0];
  if (WIDTH > 1) begin : g_lvl0
    assign gl[0][WIDTH-1:1] = g[WIDTH-1:1];
    assign pl[0][WIDTH-1:1] = p[WIDTH-1:1];
  end

  for (genvar lv = 0; lv < NLEV; lv++) begin : g_lvl
    localparam bit IS_UP = (lv < UP);
    localparam int unsigned STEP = IS_UP ? (1 << lv) : (1 << (2 * UP - 2 - lv));
    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      localparam bit JOIN = IS_UP ? (((i + 1) % (2 * STEP)) == 0)
                                  : ((((i + 1) % (2 * STEP)) == STEP) && (i + 1 > STEP));
      localparam bit GRAY = IS_UP ? (i + 1 == 2 * STEP) : 1'b1;
      if (JOIN && GRAY) begin : g_gray
        bk_gray_cell u_cell (
          .g_hi(gl[lv][i]), .p_hi(pl[lv][i]), .g_lo(gl[lv][i-STEP]),
          .g(gl[lv+1][i])
        );
        // The span now reaches bit 0; its propagate is no longer used.
        assign pl[lv+1][i] = pl[lv][i];
      end else if (JOIN) begin : g_black
        bk_black_cell u_cell (
          .g_hi(gl[lv][i]), .p_hi(pl[lv][i]),
          .g_lo(gl[lv][i-STEP]), .p_lo(pl[lv][i-STEP]),
          .g(gl[lv+1][i]), .p(pl[lv+1][i])
        );
      end else begin : g_pass
        assign gl[lv+1][i] = gl[lv][i];
        assign pl[lv+1][i] = pl[lv][i];
      end
    end
  end

  assign c = gl[NLEV];

endmodule
