// Self-checking testbench of the binary to excess-1 converter. The 4-bit
// and 3-bit instances are checked for every input and both values of inc;
// 7- and 13-bit instances (used inside the wider adders) for every input of
// the 7-bit one and random inputs of the 13-bit one, including all-ones.
// Expected: (b + inc) modulo 2^WIDTH.
module bec_tb;
  int checks = 0, failures = 0;

  logic [3:0]  b4, y4;   logic i4;
  logic [2:0]  b3, y3;   logic i3;
  logic [6:0]  b7, y7;   logic i7;
  logic [12:0] b13, y13; logic i13;

  bec                  dut4  (.b(b4),  .inc(i4),  .y(y4));
  bec #(.WIDTH(3))     dut3  (.b(b3),  .inc(i3),  .y(y3));
  bec #(.WIDTH(7))     dut7  (.b(b7),  .inc(i7),  .y(y7));
  bec #(.WIDTH(13))    dut13 (.b(b13), .inc(i13), .y(y13));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {i4, b4} = v[4:0];
      {i3, b3} = v[3:0];
      #1;
      check(y4, (b4 + i4) % 16, "4-bit");
      check(y3, (b3 + i3) % 8, "3-bit");
    end
    for (int v = 0; v < 256; v++) begin
      {i7, b7} = v[7:0];
      #1;
      check(y7, (b7 + i7) % 128, "7-bit");
    end
    for (int n = 0; n < 2000; n++) begin
      {i13, b13} = 14'($urandom);
      if (n < 2) begin
        b13 = '1;
        i13 = n[0];
      end
      #1;
      check(y13, (b13 + i13) % 8192, "13-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
