// Self-checking testbench of the square-root carry-select adder at its
// default 32 bits. Expected sums come from integer addition. Besides the
// total, it counts for every upper group how often the multiplexer took the
// carry-in-0 result and how often the BEC (carry-in-1) result; each must
// happen, or it counts a failure.
module tb_csla_bk_bec;
  import bk_pkg::*;

  logic [31:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  int sel0 [CSLA_NGROUPS];
  int sel1 [CSLA_NGROUPS];

  csla_bk_bec dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [32:0] e = {1'b0, a} + {1'b0, b} + 33'(cin);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h expected %h", a, b, cin, cout, sum, e);
    end
    // carry into each group, from the reference
    for (int k = 1; k < CSLA_NGROUPS; k++) begin
      int unsigned off = csla_offset(k);
      logic [32:0] lo = ({1'b0, a} & ((33'h1 << off) - 1)) + ({1'b0, b} & ((33'h1 << off) - 1)) + 33'(cin);
      if (lo[off]) sel1[k]++; else sel0[k]++;
    end
  endtask

  initial begin
    foreach (sel0[k]) begin sel0[k] = 0; sel1[k] = 0; end
    a = 32'hFFFF_FFFF; b = 32'h0; cin = 1'b1; #1; check();
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; cin = 1'b1; #1; check();
    a = 32'h0; b = 32'h0; cin = 1'b0; #1; check();
    a = 32'd7; b = 32'd12; cin = 1'b0; #1; check();
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n % 3 == 0) b = ~a ^ (32'h1 << ($urandom % 32));
      #1;
      check();
    end
    for (int k = 1; k < CSLA_NGROUPS; k++) begin
      $display("group %0d: carry-in-0 result taken %0d times, BEC result %0d times", k, sel0[k], sel1[k]);
      checks++;
      if (sel0[k] == 0 || sel1[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
