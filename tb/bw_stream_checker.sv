// Stimulus and scoreboard for one bw_multiplier of width N, used by
// tb_bw_widths. Streams OPS operations with random operands, random
// signed_mode and random idle cycles, plus the corner operands 0, 1, -1,
// the most negative and the most positive value in both modes. Each result
// is compared with the simulator's 64-bit multiply truncated to 2N bits,
// and its latency must be N cycles. Raises done when every result is back;
// checks and failures count what it compared.
module bw_stream_checker #(
  parameter int unsigned N   = 8,
  parameter int unsigned OPS = 2000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  logic rst_n, in_valid, signed_mode, out_valid;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;

  bw_multiplier #(.N(N)) dut (.*);

  typedef struct {
    logic [2*N-1:0] prod;
    int             issued;
  } exp_t;

  exp_t exp_q[$];
  int cycle = 0;

  function automatic logic [2*N-1:0] ref_mul(logic [N-1:0] x, logic [N-1:0] y, logic sgn);
    longint sx, sy;
    sx = sgn ? longint'($signed(x)) : longint'(x);
    sy = sgn ? longint'($signed(y)) : longint'(y);
    return (2*N)'(sx * sy);
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return N'(r);
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL N=%0d: unexpected out_valid", N);
      end else begin
        exp_t e;
        e = exp_q.pop_front();
        if (p !== e.prod || cycle - e.issued != N) begin
          failures++;
          $display("FAIL N=%0d: p=%h exp=%h latency=%0d", N, p, e.prod, cycle - e.issued);
        end
      end
    end
  end

  task automatic issue(logic [N-1:0] x, logic [N-1:0] y, logic sgn);
    in_valid <= 1'b1; a <= x; b <= y; signed_mode <= sgn;
    exp_q.push_back('{ref_mul(x, y, sgn), cycle + 1});
    @(posedge clk);
  endtask

  initial begin
    logic [N-1:0] corner [5];
    checks = 0; failures = 0; done = 1'b0;
    corner[0] = '0;
    corner[1] = N'(1);
    corner[2] = '1;
    corner[3] = {1'b1, {(N-1){1'b0}}};
    corner[4] = {1'b0, {(N-1){1'b1}}};
    rst_n = 1'b0; in_valid = 1'b0; signed_mode = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) issue(corner[i], corner[j], s[0]);
    for (int n = 0; n < OPS; n++) begin
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      issue(rnd(), rnd(), 1'($urandom));
    end
    in_valid <= 1'b0;
    repeat (N + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL N=%0d: %0d results missing", N, exp_q.size());
    end
    done = 1'b1;
  end
endmodule
