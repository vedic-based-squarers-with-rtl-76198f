// Self-checking testbench of the dedicated 3-bit squarer: all eight
// operands are compared with a table of squares written out by hand.
module sq3_dedicated_tb;
  logic [2:0] x;
  logic [5:0] s;
  int checks = 0, failures = 0;
  // 0^2 .. 7^2
  localparam logic [5:0] SQUARES [8] = '{6'd0, 6'd1, 6'd4, 6'd9, 6'd16, 6'd25, 6'd36, 6'd49};

  sq3_dedicated dut (.x(x), .s(s));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      x = i[2:0];
      #1;
      checks++;
      if (s !== SQUARES[i]) begin
        failures++;
        $display("FAIL x=%0d s=%0d expected %0d", x, s, SQUARES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
