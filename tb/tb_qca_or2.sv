// Self-checking testbench of qca_or2: applies every input combination and
// compares the output with the truth table of OR.
module tb_qca_or2;
  int checks = 0, failures = 0;
  logic a, b, y;
  qca_or2 dut (.*);
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (v != 0)) begin failures++; $display("FAIL: ab=%b y=%b", {a, b}, y); end
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
