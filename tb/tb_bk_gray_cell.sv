// Self-checking testbench of bk_gray_cell: all 8 input combinations,
// against g = g_hi | (p_hi & g_lo) written as a truth table.
module tb_bk_gray_cell;

  logic g_hi, p_hi, g_lo, g;
  int checks = 0, failures = 0;

  bk_gray_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g(g));

  // Expected output indexed by {g_hi, p_hi, g_lo}.
  localparam logic [7:0] TRUTH = 8'b1111_1000;

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      checks++;
      if (g !== TRUTH[v]) begin
        failures++;
        $display("FAIL in=%03b g=%b expected %b", v[2:0], g, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
