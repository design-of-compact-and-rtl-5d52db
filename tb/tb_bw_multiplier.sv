// End-to-end testbench of bw_multiplier at its default size (N = 4).
//
// Streams every operand pair through the pipeline in both number formats
// (2 x 256 operations), in random order, with random idle cycles and random
// switches of signed_mode between consecutive operations. A scoreboard holds
// the expected product of every issued operation, computed with the
// simulator's own multiply, and the cycle it was issued; each out_valid is
// checked for value, order and a latency of exactly N cycles. A reset is
// applied once while operations are in flight and must flush them. Each
// mechanism (signed op, unsigned op, mode switch, back-to-back issue, idle
// bubble, reset flush, most-negative operand) is counted and must occur.
module tb_bw_multiplier;
  localparam int unsigned N = 4;
  localparam int unsigned LAT = N;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, signed_mode;
  logic [N-1:0] a, b;
  logic out_valid;
  logic [2*N-1:0] p;

  bw_multiplier dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [2*N-1:0] prod;
    int             issued;
  } exp_t;

  exp_t exp_q[$];
  int checks = 0, failures = 0, cycle = 0;
  int n_signed = 0, n_unsigned = 0, n_switch = 0, n_b2b = 0, n_bubble = 0;
  int n_flush = 0, n_minneg = 0;

  function automatic logic [2*N-1:0] ref_mul(logic [N-1:0] x, logic [N-1:0] y, logic sgn);
    longint sx, sy;
    sx = sgn ? longint'($signed(x)) : longint'(x);
    sy = sgn ? longint'($signed(y)) : longint'(y);
    return (2*N)'(sx * sy);
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker, sampled just before each rising edge.
  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected out_valid at cycle %0d", cycle);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (p !== e.prod || cycle - e.issued != LAT) begin
          failures++;
          $display("FAIL: p=%h exp=%h latency=%0d exp=%0d", p, e.prod, cycle - e.issued, LAT);
        end
      end
    end
  end

  // Operation list: every (a, b) pair in both formats, shuffled.
  typedef struct { logic [N-1:0] a, b; logic sgn; } op_t;
  op_t ops[$];

  task automatic issue(op_t o);
    in_valid    <= 1'b1;
    a           <= o.a;
    b           <= o.b;
    signed_mode <= o.sgn;
    exp_q.push_back('{ref_mul(o.a, o.b, o.sgn), cycle + 1});
    @(posedge clk);
  endtask

  initial begin
    op_t o;
    logic prev_valid, prev_sgn;
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 2**N; x++)
        for (int y = 0; y < 2**N; y++) ops.push_back('{N'(x), N'(y), s[0]});
    ops.shuffle();

    rst_n = 1'b0; in_valid = 1'b0; signed_mode = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Fill the pipeline, then reset with operations in flight.
    for (int i = 0; i < LAT - 1; i++) issue('{N'($urandom), N'($urandom), 1'($urandom)});
    in_valid <= 1'b0;
    rst_n    <= 1'b0;
    exp_q.delete();
    @(posedge clk);
    rst_n    <= 1'b1;
    n_flush++;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: reset did not flush"); end

    prev_valid = 1'b0; prev_sgn = 1'b0;
    foreach (ops[i]) begin
      o = ops[i];
      if ($urandom_range(0, 5) == 0) begin
        in_valid <= 1'b0;
        a <= N'($urandom); b <= N'($urandom); signed_mode <= 1'($urandom);
        @(posedge clk);
        n_bubble++;
        prev_valid = 1'b0;
      end
      if (prev_valid) n_b2b++;
      if (prev_valid && prev_sgn != o.sgn) n_switch++;
      if (o.sgn) n_signed++; else n_unsigned++;
      if (o.sgn && o.a == {1'b1, {(N-1){1'b0}}} && o.b == {1'b1, {(N-1){1'b0}}}) n_minneg++;
      issue(o);
      prev_valid = 1'b1; prev_sgn = o.sgn;
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", exp_q.size()); end

    $display("mechanisms: signed=%0d unsigned=%0d mode_switch=%0d back_to_back=%0d bubble=%0d reset_flush=%0d min_neg=%0d",
             n_signed, n_unsigned, n_switch, n_b2b, n_bubble, n_flush, n_minneg);
    checks += 7;
    if (n_signed == 0)   failures++;
    if (n_unsigned == 0) failures++;
    if (n_switch == 0)   failures++;
    if (n_b2b == 0)      failures++;
    if (n_bubble == 0)   failures++;
    if (n_flush == 0)    failures++;
    if (n_minneg == 0)   failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
