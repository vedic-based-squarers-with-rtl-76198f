// End-to-end testbench of the 24-bit pipelined squarer at its default
// parameters (architecture (c), 4-cycle latency).
// A stream of operands, random values mixed with extremes, is driven with
// in_valid_i high on most cycles and idle bubbles in between. Every result
// is checked against the integer square and must appear exactly 4 cycles
// after its operand; out_valid_o must never rise without a pending operand.
// Halfway through, reset is asserted while operands are in flight: they must
// be dropped and out_valid_o must stay low.
// Mechanisms counted (each must occur at least once):
//   back-to-back operands, bubbles, reset flush, and, in the top-level
//   combine stage, the carry-select BEC path and direct path, and the top
//   increments by C1 only, by the shifted-out cross-product bit only, and
//   by both at once (worked out from the operand, not read from the design).
module vbs24_top_tb;
  localparam int unsigned N = 24;
  localparam int unsigned LATENCY = 4;

  int checks = 0, failures = 0;
  int n_back_to_back = 0, n_bubble = 0, n_flush = 0;
  int n_sel_bec = 0, n_sel_direct = 0, n_inc_c1 = 0, n_inc_hl = 0, n_inc_both = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [N-1:0]   x = '0;
  logic [2*N-1:0] sq;
  longint cycle = 0;

  typedef struct {
    longint x;
    longint t_in;
  } pending_t;
  pending_t pend [$];

  vbs24_top dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .x_i(x),
    .out_valid_o(out_valid), .sq_o(sq)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // What the top-level combine stage has to do for operand v.
  task automatic classify(input longint v);
    longint h = v >> 12, l = v & 64'hfff;
    longint a = ((h * l) << 1) & 64'hffffff;
    longint b = (((h * h) & 64'hfff) << 12) | ((l * l) >> 12);
    bit low_c = 1'(((a & 64'hfff) + (b & 64'hfff)) >> 12);
    bit c1 = 1'((a + b) >> 24);
    bit hb = 1'((h * l) >> 23);
    if (low_c) n_sel_bec++; else n_sel_direct++;
    if (c1 && hb) n_inc_both++;
    else if (c1)  n_inc_c1++;
    else if (hb)  n_inc_hl++;
  endtask

  // Output monitor: sampled just before each rising edge.
  always @(negedge clk) begin : monitor
    pending_t p;
    if (rst_n && out_valid) begin
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL out_valid with no operand in flight at cycle %0d", cycle);
      end else begin
        p = pend.pop_front();
        if (cycle - p.t_in != longint'(LATENCY)) begin
          failures++;
          $display("FAIL latency %0d for x=%0d", cycle - p.t_in, p.x);
        end
        if (sq != 48'(p.x * p.x)) begin
          failures++;
          $display("FAIL x=%0d sq=%0d expected %0d", p.x, sq, p.x * p.x);
        end
      end
    end
  end

  function automatic logic [N-1:0] pick_operand(input int n);
    case (n % 16)
      0: return '0;
      1: return '1;
      2: return 24'h800000;
      3: return 24'hfff000;
      4: return 24'h000fff;
      5: return 24'h7fffff;
      default: return N'($urandom);
    endcase
  endfunction

  task automatic drive(input int n_ops);
    bit prev_valid = 1'b0;
    for (int n = 0; n < n_ops; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      if (in_valid) begin
        x = pick_operand(n);
        pend.push_back('{x: longint'(x), t_in: cycle});
        classify(longint'(x));
        if (prev_valid) n_back_to_back++;
      end else begin
        x = N'($urandom);
        n_bubble++;
      end
      prev_valid = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    drive(3000);

    // Reset with operands in flight.
    @(negedge clk);
    in_valid = 1'b1;
    x = 24'h123456;
    @(negedge clk);
    x = 24'hfedcba;
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    pend.delete();
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high during reset");
    end
    @(negedge clk) rst_n = 1'b1;
    repeat (LATENCY + 2) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL flushed operand came out after reset");
      end
    end
    n_flush++;

    drive(2000);
    repeat (LATENCY + 2) @(negedge clk);

    checks++;
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL %0d operands never came out", pend.size());
    end

    $display("back-to-back %0d, bubbles %0d, reset flushes %0d", n_back_to_back, n_bubble, n_flush);
    $display("top stage: BEC path %0d, direct path %0d", n_sel_bec, n_sel_direct);
    $display("top increments: C1 only %0d, HL msb only %0d, both %0d", n_inc_c1, n_inc_hl, n_inc_both);
    checks++;
    if (n_back_to_back == 0 || n_bubble == 0 || n_flush == 0 || n_sel_bec == 0 ||
        n_sel_direct == 0 || n_inc_c1 == 0 || n_inc_hl == 0 || n_inc_both == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
