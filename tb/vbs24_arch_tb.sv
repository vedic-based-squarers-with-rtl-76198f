// Testbench of the three other organisations of the 24-bit squarer, all
// fed the same operand stream (a new operand every clock):
//   architecture (a): pipelined 12-bit units, PIPE_BITS = 12, latency 2;
//   architecture (b): pipelined 6-bit units,  PIPE_BITS = 6,  latency 3;
//   no pipelining:    PIPE_BITS = 0, combinational, latency 0.
// Each result must equal the square of the operand applied exactly
// "latency" clocks earlier, and out_valid_o must follow in_valid_i by the
// same number of clocks. (Architecture (c) is covered by vbs24_top_tb.)
module vbs24_arch_tb;
  localparam int NOPS = 2000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic [23:0] x;
  logic [47:0] sq [3];
  logic        ov [3];
  logic [23:0] hist_x [$];
  logic        hist_v [$];
  localparam int LAT [3] = '{2, 3, 0};

  vbs24_top #(.PIPE_BITS(12)) dut_a (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid),
    .x_i(x), .out_valid_o(ov[0]), .sq_o(sq[0]));
  vbs24_top #(.PIPE_BITS(6))  dut_b (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid),
    .x_i(x), .out_valid_o(ov[1]), .sq_o(sq[1]));
  vbs24_top #(.PIPE_BITS(0))  dut_0 (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid),
    .x_i(x), .out_valid_o(ov[2]), .sq_o(sq[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NOPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0;
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < NOPS; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      x = 24'($urandom);
      if (n == 5) x = '1;
      hist_x.push_front(x);           // hist_x[k]: operand applied k clocks ago
      hist_v.push_front(in_valid);
      #1;
      for (int d = 0; d < 3; d++) begin
        if (n < LAT[d]) continue;
        checks++;
        if (ov[d] !== hist_v[LAT[d]]) begin
          failures++;
          $display("FAIL design %0d: out_valid %b, expected %b", d, ov[d], hist_v[LAT[d]]);
        end
        if (hist_v[LAT[d]]) begin
          checks++;
          if (sq[d] != 48'(longint'(hist_x[LAT[d]]) * hist_x[LAT[d]])) begin
            failures++;
            $display("FAIL design %0d: x=%0d sq=%0d", d, hist_x[LAT[d]], sq[d]);
          end
        end
      end
      if (hist_x.size() > 8) begin
        void'(hist_x.pop_back());
        void'(hist_v.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
