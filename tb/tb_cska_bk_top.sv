// End-to-end testbench of cska_bk_top at its default parameters (32 bits).
// The two adders get independent operands of the same kinds and are
// compared with integer addition. It counts how often each carry mechanism happened and
// counts a failure for any that never did:
//   * bk carry-in:       c0 = 1 applied to the Brent-Kung adder;
//   * bk carry-out:      c32 = 1;
//   * bk full chain:     a ^ b all ones with c0 = 1 (carry crosses all 32 bits);
//   * csla select 0/1:   in every upper group the multiplexer took the
//                        carry-in-0 result, and the BEC (carry-in-1) result;
//   * csla carry-out:    csla_cout = 1.
// It opens with the operands of the published simulation (7 + 12 = 19).
module tb_cska_bk_top;
  import bk_pkg::*;

  logic [31:0] a, b, sum, csla_a, csla_b, csla_sum;
  logic c0, c32, csla_cin, csla_cout;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_chain = 0, n_csla_cout = 0;
  int sel0 [CSLA_NGROUPS];
  int sel1 [CSLA_NGROUPS];

  cska_bk_top dut (
    .a(a), .b(b), .c0(c0), .sum(sum), .c32(c32),
    .csla_a(csla_a), .csla_b(csla_b), .csla_cin(csla_cin),
    .csla_sum(csla_sum), .csla_cout(csla_cout)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // x, y, ci go to the Brent-Kung adder; u, v, cj to the carry-select adder.
  task automatic apply(logic [31:0] x, logic [31:0] y, logic ci,
                       logic [31:0] u, logic [31:0] v, logic cj);
    logic [32:0] e  = {1'b0, x} + {1'b0, y} + 33'(ci);
    logic [32:0] ec = {1'b0, u} + {1'b0, v} + 33'(cj);
    a = x; b = y; c0 = ci;
    csla_a = u; csla_b = v; csla_cin = cj;
    #1;
    checks += 2;
    if ({c32, sum} !== e) begin
      failures++;
      $display("FAIL bk   %h + %h + %b = %b_%h expected %h", x, y, ci, c32, sum, e);
    end
    if ({csla_cout, csla_sum} !== ec) begin
      failures++;
      $display("FAIL csla %h + %h + %b = %b_%h expected %h", u, v, cj, csla_cout, csla_sum, ec);
    end
    if (ci) n_cin++;
    if (c32) n_cout++;
    if (ci && ((x ^ y) == '1)) n_chain++;
    if (csla_cout) n_csla_cout++;
    for (int k = 1; k < CSLA_NGROUPS; k++) begin
      int unsigned off = csla_offset(k);
      logic [32:0] m = (33'h1 << off) - 1;
      logic [32:0] lo = ({1'b0, u} & m) + ({1'b0, v} & m) + 33'(cj);
      if (lo[off]) sel1[k]++; else sel0[k]++;
    end
  endtask

  task automatic need(string what, int count);
    $display("%-28s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    foreach (sel0[k]) begin sel0[k] = 0; sel1[k] = 0; end
    apply(32'd7, 32'd12, 1'b0, 32'd7, 32'd12, 1'b0);
    checks++;
    if (sum !== 32'd19 || c32 !== 1'b0) begin
      failures++;
      $display("FAIL published vector: sum=%0d c32=%b", sum, c32);
    end
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1, 32'hFFFF_FFFF, 32'h0000_0000, 1'b0);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1, 32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    for (int n = 0; n < 50000; n++) begin
      automatic logic [31:0] x = $urandom, y = $urandom;
      automatic logic [31:0] u = $urandom, v = $urandom;
      if (n % 4 == 1) y = ~x ^ (32'h1 << ($urandom % 32));
      if (n % 16 == 2) y = ~x;
      if (n % 4 == 3) v = ~u ^ (32'h1 << ($urandom % 32));
      if (n % 16 == 6) v = ~u;
      apply(x, y, 1'($urandom), u, v, 1'($urandom));
    end
    need("bk carry-in used", n_cin);
    need("bk carry-out", n_cout);
    need("bk full 32-bit carry chain", n_chain);
    need("csla carry-out", n_csla_cout);
    for (int k = 1; k < CSLA_NGROUPS; k++) begin
      need($sformatf("csla group %0d takes cin=0 sum", k), sel0[k]);
      need($sformatf("csla group %0d takes BEC sum", k), sel1[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
