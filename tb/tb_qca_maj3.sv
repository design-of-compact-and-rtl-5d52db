// Self-checking testbench of qca_maj3: applies every input combination and
// compares the output with the count of ones being at least two.
module tb_qca_maj3;
  int checks = 0, failures = 0;
  logic a, b, c, y;
  qca_maj3 dut (.*);
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== (((a + b + c) >= 2) ? 1'b1 : 1'b0)) begin
        failures++;
        $display("FAIL: abc=%b y=%b", {a, b, c}, y);
      end
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
