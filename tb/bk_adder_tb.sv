// Self-checking testbench of the Brent-Kung adder. The 3-bit and 6-bit
// instances are checked over every operand pair and carry-in; 12-, 13- and
// 24-bit instances (the widths the squarer uses) with random operands.
// Expected sums come from integer addition.
module bk_adder_tb;
  int checks = 0, failures = 0;

  logic [2:0]  a3, b3, s3;   logic c3i, c3o;
  logic [5:0]  a6, b6, s6;   logic c6i, c6o;
  logic [11:0] a12, b12, s12; logic c12i, c12o;
  logic [12:0] a13, b13, s13; logic c13i, c13o;
  logic [23:0] a24, b24, s24; logic c24i, c24o;

  bk_adder                dut3  (.a(a3),  .b(b3),  .cin(c3i),  .sum(s3),  .cout(c3o));
  bk_adder #(.WIDTH(6))   dut6  (.a(a6),  .b(b6),  .cin(c6i),  .sum(s6),  .cout(c6o));
  bk_adder #(.WIDTH(12))  dut12 (.a(a12), .b(b12), .cin(c12i), .sum(s12), .cout(c12o));
  bk_adder #(.WIDTH(13))  dut13 (.a(a13), .b(b13), .cin(c13i), .sum(s13), .cout(c13o));
  bk_adder #(.WIDTH(24))  dut24 (.a(a24), .b(b24), .cin(c24i), .sum(s24), .cout(c24o));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 7); v++) begin
      {c3i, a3, b3} = v[6:0];
      #1;
      check({c3o, s3}, longint'(a3) + b3 + c3i, "3-bit");
    end
    for (int v = 0; v < (1 << 13); v++) begin
      {c6i, a6, b6} = v[12:0];
      #1;
      check({c6o, s6}, longint'(a6) + b6 + c6i, "6-bit");
    end
    for (int n = 0; n < 5000; n++) begin
      {a12, b12, c12i} = {$urandom, $urandom};
      {a13, b13, c13i} = {$urandom, $urandom};
      {a24, b24, c24i} = {$urandom, $urandom};
      if (n == 0) begin   // longest carry chain
        a12 = '1; b12 = '0; c12i = 1'b1;
        a24 = '1; b24 = '0; c24i = 1'b1;
      end
      #1;
      check({c12o, s12}, longint'(a12) + b12 + c12i, "12-bit");
      check({c13o, s13}, longint'(a13) + b13 + c13i, "13-bit");
      check({c24o, s24}, longint'(a24) + b24 + c24i, "24-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
