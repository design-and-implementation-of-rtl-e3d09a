// Self-checking testbench of bk_prefix_network.
// The default 32-bit tree and trees of 1, 2, 3, 5, 10 and 17 bits (the
// irregular widths exercise the pruning of the Brent-Kung tree) are driven
// with the same random propagate/generate vectors. Each must return the
// carries of a plain ripple chain, c[i] = g[i] | (p[i] & c[i-1]), worked
// out in the testbench. Vectors are drawn so that p and g never both hold
// at a bit, as from real operands; long propagate runs are forced often.
module tb_bk_prefix_network;

  localparam int NW = 7;
  localparam int WS [NW] = '{32, 1, 2, 3, 5, 10, 17};

  logic [31:0] p, g;
  logic cin;
  logic [31:0] c [NW];
  int checks = 0, failures = 0;

  bk_prefix_network dut32 (.p(p), .g(g), .cin(cin), .c(c[0]));

  for (genvar k = 1; k < NW; k++) begin : g_w
    logic [WS[k]-1:0] ck;
    bk_prefix_network #(.WIDTH(WS[k])) dut (
      .p(p[WS[k]-1:0]), .g(g[WS[k]-1:0]), .cin(cin), .c(ck)
    );
    assign c[k] = 32'(ck);
  end

  function automatic logic [31:0] ripple(logic [31:0] pp, logic [31:0] gg, logic ci, int w);
    logic [31:0] r = '0;
    logic cc = ci;
    for (int i = 0; i < w; i++) begin
      cc = gg[i] | (pp[i] & cc);
      r[i] = cc;
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, e;
    for (int n = 0; n < 4000; n++) begin
      a = $urandom; b = $urandom;
      if (n % 4 == 1) b = ~a ^ (32'h1 << ($urandom % 32));   // mostly propagate
      if (n % 4 == 2) b = ~a;                               // all propagate
      p = a ^ b; g = a & b; cin = 1'($urandom);
      #1;
      for (int k = 0; k < NW; k++) begin
        e = ripple(p, g, cin, WS[k]);
        checks++;
        if (c[k] !== e) begin
          failures++;
          $display("FAIL width=%0d p=%h g=%h cin=%b c=%h expected %h", WS[k], p, g, cin, c[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
