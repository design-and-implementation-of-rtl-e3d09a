// Self-checking testbench of bk_preprocess at its default 32 bits.
// Checks the operand pair of the published simulation waveform
// (a = 7, b = 12: g = 4, p = 11), then random operands; the expected bits
// are computed one bit at a time from the half-adder truth table.
module tb_bk_preprocess;

  localparam int unsigned W = 32;
  logic [W-1:0] a, b, p, g;
  int checks = 0, failures = 0;

  bk_preprocess dut (.a(a), .b(b), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] ep, eg;
    for (int i = 0; i < W; i++) begin
      // sum and carry of a one-bit half adder
      int s = int'(a[i]) + int'(b[i]);
      ep[i] = (s == 1);
      eg[i] = (s == 2);
    end
    checks++;
    if (p !== ep || g !== eg) begin
      failures++;
      $display("FAIL a=%h b=%h p=%h (exp %h) g=%h (exp %h)", a, b, p, ep, g, eg);
    end
  endtask

  initial begin
    a = 32'd7; b = 32'd12; #1;
    check();
    if (g !== 32'd4 || p !== 32'd11) begin
      failures++;
      $display("FAIL waveform vector");
    end
    checks++;
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom; #1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
