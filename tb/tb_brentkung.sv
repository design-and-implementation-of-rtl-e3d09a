// Self-checking testbench of the Brent-Kung adder at its default 32 bits,
// plus a 4-bit instance checked exhaustively. Expected results come from
// the simulator's own integer addition. Includes the operands of the
// published waveform (7 + 12 = 19, c0 = 0) and the carry corner cases
// (full propagate chain with carry-in, all ones plus all ones).
module tb_brentkung;

  logic [31:0] a, b, sum;
  logic c0, c32;
  logic [3:0] a4, b4, s4;
  logic c4;
  int checks = 0, failures = 0;

  brentkung dut (.a(a), .b(b), .c0(c0), .sum(sum), .c32(c32));
  brentkung #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .c0(c0), .sum(s4), .c32(c4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32();
    logic [32:0] e = {1'b0, a} + {1'b0, b} + 33'(c0);
    checks++;
    if ({c32, sum} !== e) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h expected %h", a, b, c0, c32, sum, e);
    end
  endtask

  initial begin
    a = 32'd7; b = 32'd12; c0 = 1'b0; #1;
    check32();
    checks++;
    if (sum !== 32'd19 || c32 !== 1'b0) begin
      failures++;
      $display("FAIL waveform vector: sum=%0d", sum);
    end
    a = 32'hFFFF_FFFF; b = 32'h0; c0 = 1'b1; #1; check32();
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; c0 = 1'b1; #1; check32();
    a = 32'h0; b = 32'h0; c0 = 1'b0; #1; check32();
    a = 32'h8000_0000; b = 32'h8000_0000; c0 = 1'b0; #1; check32();
    a = 32'h5555_5555; b = 32'hAAAA_AAAA; c0 = 1'b1; #1; check32();
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom; c0 = 1'($urandom);
      if (n % 3 == 0) b = ~a ^ (32'h1 << ($urandom % 32));
      #1;
      check32();
    end
    for (int v = 0; v < 512; v++) begin
      {c0, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({c4, s4} !== 5'(a4) + 5'(b4) + 5'(c0)) begin
        failures++;
        $display("FAIL 4-bit %h + %h + %b = %b_%h", a4, b4, c0, c4, s4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
