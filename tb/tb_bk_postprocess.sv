// Self-checking testbench of bk_postprocess at its default 32 bits.
// Random propagate / carry vectors and carry-in; the expected sum bit i is
// the parity of p[i] and the carry into bit i, computed bit by bit.
module tb_bk_postprocess;

  localparam int unsigned W = 32;
  logic [W-1:0] p, c, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  bk_postprocess dut (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] es;
    logic into;
    for (int n = 0; n < 3000; n++) begin
      p = $urandom; c = $urandom; cin = 1'($urandom);
      if (n < 2) begin p = '1; c = '0; cin = 1'(n); end
      #1;
      for (int i = 0; i < W; i++) begin
        into = (i == 0) ? cin : c[i-1];
        es[i] = (p[i] != into);
      end
      checks++;
      if (sum !== es || cout !== c[W-1]) begin
        failures++;
        $display("FAIL p=%h c=%h cin=%b sum=%h (exp %h) cout=%b", p, c, cin, sum, es, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
