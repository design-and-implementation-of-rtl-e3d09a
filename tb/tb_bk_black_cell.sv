// Self-checking testbench of bk_black_cell: all 16 input combinations.
// The expected pair is derived by counting: the joined span generates when
// the upper span generates, or propagates a generate from the lower span;
// it propagates when both halves propagate.
module tb_bk_black_cell;

  logic g_hi, p_hi, g_lo, p_lo, g, p;
  int checks = 0, failures = 0;

  bk_black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo), .g(g), .p(p));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      if (g_hi) eg = 1'b1;
      else if (p_hi) eg = g_lo;
      else eg = 1'b0;
      ep = (p_hi == 1'b1) && (p_lo == 1'b1);
      checks += 2;
      if (g !== eg) begin
        failures++;
        $display("FAIL in=%04b g=%b expected %b", v[3:0], g, eg);
      end
      if (p !== ep) begin
        failures++;
        $display("FAIL in=%04b p=%b expected %b", v[3:0], p, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
