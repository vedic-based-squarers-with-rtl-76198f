// Self-checking testbench of the IBK carry-select adder. The default 6-bit
// instance is checked for every operand pair and carry-in (8192 cases); the
// 12- and 24-bit instances used by the squarer with random operands. The
// testbench counts how often the lower half's carry selected the BEC path
// and the direct path, and fails if either never happened at any width.
module ibk_csla_tb;
  int checks = 0, failures = 0;
  int sel_bec [3], sel_direct [3];

  logic [5:0]  a6, b6, s6;    logic c6i, c6o;
  logic [11:0] a12, b12, s12; logic c12i, c12o;
  logic [23:0] a24, b24, s24; logic c24i, c24o;

  ibk_csla               dut6  (.a(a6),  .b(b6),  .cin(c6i),  .sum(s6),  .cout(c6o));
  ibk_csla #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .cin(c12i), .sum(s12), .cout(c12o));
  ibk_csla #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .cin(c24i), .sum(s24), .cout(c24o));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Carry out of the lower half, worked out from the operands.
  function automatic bit low_carry(input longint a, input longint b, input bit cin, input int h);
    longint m = (longint'(1) << h) - 1;
    return ((a & m) + (b & m) + cin) >> h;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      {c6i, a6, b6} = v[12:0];
      #1;
      check({c6o, s6}, longint'(a6) + b6 + c6i, "6-bit");
      if (low_carry(a6, b6, c6i, 3)) sel_bec[0]++; else sel_direct[0]++;
    end
    for (int n = 0; n < 5000; n++) begin
      {a12, b12, c12i} = {$urandom, $urandom};
      {a24, b24, c24i} = {$urandom, $urandom};
      #1;
      check({c12o, s12}, longint'(a12) + b12 + c12i, "12-bit");
      check({c24o, s24}, longint'(a24) + b24 + c24i, "24-bit");
      if (low_carry(a12, b12, c12i, 6))  sel_bec[1]++; else sel_direct[1]++;
      if (low_carry(a24, b24, c24i, 12)) sel_bec[2]++; else sel_direct[2]++;
    end
    for (int w = 0; w < 3; w++) begin
      $display("width index %0d: BEC path %0d, direct path %0d", w, sel_bec[w], sel_direct[w]);
      checks++;
      if (sel_bec[w] == 0 || sel_direct[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
