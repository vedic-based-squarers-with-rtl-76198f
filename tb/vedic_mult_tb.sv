// Self-checking testbench of the N x N Vedic multiplier.
//  - default 6x6 instance (combinational): all 4096 operand pairs;
//  - 3x3 leaf level and combinational 12x12: random pairs plus extremes;
//  - pipelined 12x12 with PIPE_BITS = 3: a new random pair every clock, each
//    product checked exactly pipe_latency(12, 3) = 3 cycles after its
//    operands, and the first result must not appear a cycle early.
// Expected products come from integer multiplication.
module vedic_mult_tb;
  import vbs_pkg::*;

  localparam int unsigned LAT12 = pipe_latency(12, 3);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;

  logic [2:0]  a3, b3;   logic [5:0]  p3;
  logic [5:0]  a6, b6;   logic [11:0] p6;
  logic [11:0] a12, b12; logic [23:0] p12;
  logic [11:0] pa, pb;   logic [23:0] pp;

  vedic_mult #(.N(3))  dut3  (.clk_i(clk), .rst_ni(rst_n), .a(a3),  .b(b3),  .p(p3));
  vedic_mult           dut6  (.clk_i(clk), .rst_ni(rst_n), .a(a6),  .b(b6),  .p(p6));
  vedic_mult #(.N(12)) dut12 (.clk_i(clk), .rst_ni(rst_n), .a(a12), .b(b12), .p(p12));
  vedic_mult #(.N(12), .PIPE_BITS(3)) dutp (.clk_i(clk), .rst_ni(rst_n), .a(pa), .b(pb), .p(pp));

  always #5 clk = ~clk;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
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
    // combinational instances
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = i[5:0]; b6 = j[5:0];
        a3 = i[2:0]; b3 = j[2:0];
        #1;
        check(p6, i * j, "6x6");
        check(p3, (i % 8) * (j % 8), "3x3");
      end
    for (int n = 0; n < 3000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom);
      if (n == 0) begin a12 = '1; b12 = '1; end
      #1;
      check(p12, longint'(a12) * b12, "12x12");
    end

    // pipelined 12x12
    pa = '0; pb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400 + LAT12; n++) begin
      @(negedge clk);
      if (n >= LAT12) check(pp, exp_q.pop_front(), "pipelined 12x12");
      else if (n > 0) check(pp, 0, "pipelined 12x12 before first result");
      pa = 12'($urandom); pb = 12'($urandom);
      if (n == 1) begin pa = '1; pb = '1; end
      exp_q.push_back(longint'(pa) * pb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
