// Self-checking testbench of qca_inv: applies every input combination and
// compares the output with the truth table of NOT.
module tb_qca_inv;
  int checks = 0, failures = 0;
  logic a, y;
  qca_inv dut (.*);
  initial begin
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      checks++;
      if (y !== (v == 0)) begin failures++; $display("FAIL: a=%b y=%b", a, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
