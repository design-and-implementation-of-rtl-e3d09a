// Self-checking testbench of the Binary to Excess-1 converter: every input
// of the default 11-bit width, and every input of a 3-bit instance; the
// expected value is the integer increment modulo 2^WIDTH.
module tb_bec;

  logic [10:0] x, y;
  logic [2:0] x3, y3;
  int checks = 0, failures = 0;

  bec dut (.x(x), .y(y));
  bec #(.WIDTH(3)) dut3 (.x(x3), .y(y3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      x = 11'(v); x3 = 3'(v); #1;
      checks += 2;
      if (y !== 11'((v + 1) % 2048)) begin
        failures++;
        $display("FAIL x=%0d y=%0d", x, y);
      end
      if (y3 !== 3'((v + 1) % 8)) begin
        failures++;
        $display("FAIL x3=%0d y3=%0d", x3, y3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
