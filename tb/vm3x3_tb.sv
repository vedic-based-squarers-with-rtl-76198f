// Self-checking testbench of the 3x3 Vedic multiplier: all 64 operand
// pairs are compared with integer multiplication.
module vm3x3_tb;
  logic [2:0] a, b;
  logic [5:0] p;
  int checks = 0, failures = 0;

  vm3x3 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a = i[2:0];
        b = j[2:0];
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
