// Self-checking testbench of the N-bit Vedic-based squarer.
//  - default 6-bit instance (combinational, the OR-controlled incrementer):
//    all 64 operands;
//  - combinational 12-bit: all 4096 operands; 24-bit: random operands and
//    the extremes;
//  - pipelined 12-bit with PIPE_BITS = 3: a new operand every clock, each
//    square checked exactly pipe_latency(12, 3) = 3 cycles later.
// Expected squares come from integer multiplication. For the 6- and 12-bit
// instances the testbench also works out, from the operand alone, how the
// top bits are corrected (by the adder carry C1, by the bit shifted out of
// the doubled cross product, or by both) and fails if a case that the
// arithmetic allows was never exercised.
module vbs_tb;
  import vbs_pkg::*;

  localparam int unsigned LAT12 = pipe_latency(12, 3);

  int checks = 0, failures = 0;
  int inc_c1 [2], inc_hl [2], inc_both [2];
  logic clk = 1'b0, rst_n = 1'b0;

  logic [5:0]  x6;  logic [11:0] s6;
  logic [11:0] x12; logic [23:0] s12;
  logic [23:0] x24; logic [47:0] s24;
  logic [11:0] px;  logic [23:0] ps;

  vbs                  dut6  (.clk_i(clk), .rst_ni(rst_n), .x(x6),  .s(s6));
  vbs #(.N(12))        dut12 (.clk_i(clk), .rst_ni(rst_n), .x(x12), .s(s12));
  vbs #(.N(24))        dut24 (.clk_i(clk), .rst_ni(rst_n), .x(x24), .s(s24));
  vbs #(.N(12), .PIPE_BITS(3)) dutp (.clk_i(clk), .rst_ni(rst_n), .x(px), .s(ps));

  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Classify the top-bit correction of an n-bit squarer for operand x.
  task automatic classify(input longint x, input int n, input int idx);
    int k = n / 2;
    longint mk = (longint'(1) << k) - 1;
    longint mn = (longint'(1) << n) - 1;
    longint h = x >> k, l = x & mk;
    longint a = ((h * l) << 1) & mn;
    longint b = (((h * h) & mk) << k) | ((l * l) >> k);
    bit c1 = ((a + b) >> n) & 1;
    bit hb = ((h * l) >> (n - 1)) & 1;
    if (c1 && hb) inc_both[idx]++;
    else if (c1)  inc_c1[idx]++;
    else if (hb)  inc_hl[idx]++;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q [$];

  initial begin
    for (int i = 0; i < 64; i++) begin
      x6 = i[5:0];
      #1;
      check(s6, i * i, "6-bit");
      classify(i, 6, 0);
    end
    for (int i = 0; i < 4096; i++) begin
      x12 = i[11:0];
      #1;
      check(s12, i * i, "12-bit");
      classify(i, 12, 1);
    end
    for (int n = 0; n < 3000; n++) begin
      x24 = 24'($urandom);
      if (n == 0) x24 = '1;
      if (n == 1) x24 = 24'h800000;
      #1;
      check(s24, longint'(x24) * x24, "24-bit");
    end
    $display("6-bit  top increments: C1 %0d, HL msb %0d, both %0d", inc_c1[0], inc_hl[0], inc_both[0]);
    $display("12-bit top increments: C1 %0d, HL msb %0d, both %0d", inc_c1[1], inc_hl[1], inc_both[1]);
    checks++;
    if (inc_c1[0] == 0 || inc_hl[0] == 0 || inc_both[0] != 0) failures++;
    checks++;
    if (inc_c1[1] == 0 || inc_hl[1] == 0 || inc_both[1] == 0) failures++;

    px = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400 + LAT12; n++) begin
      @(negedge clk);
      if (n >= LAT12) check(ps, exp_q.pop_front(), "pipelined 12-bit");
      else if (n > 0) check(ps, 0, "pipelined 12-bit before first result");
      px = 12'($urandom);
      if (n == 1) px = '1;
      exp_q.push_back(longint'(px) * px);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
