// Word-size testbench: bw_multiplier built with N = 2, 3, 8, 16 and 31 bit
// slices, each driven by its own bw_stream_checker with random and corner
// operands in both number formats. Shows that widening the multiplier only
// takes more bit slices and that latency stays N cycles.
module tb_bw_widths;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 5;
  logic [NW-1:0] done;
  int chk [NW];
  int fl  [NW];

  bw_stream_checker #(.N(2),  .OPS(300))  u_n2  (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  bw_stream_checker #(.N(3),  .OPS(500))  u_n3  (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  bw_stream_checker #(.N(8),  .OPS(3000)) u_n8  (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  bw_stream_checker #(.N(16), .OPS(3000)) u_n16 (.clk(clk), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  bw_stream_checker #(.N(31), .OPS(3000)) u_n31 (.clk(clk), .done(done[4]), .checks(chk[4]), .failures(fl[4]));

  function automatic void report(int extra_fail);
    int checks, failures;
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NW; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    wait (&done);
    report(0);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end
endmodule
