// Self-checking testbench of qca_full_adder: applies every input combination and
// compares the output with the two-bit count of ones among a, b and cin.
module tb_qca_full_adder;
  int checks = 0, failures = 0;
  logic a, b, cin, sum, cout;
  qca_full_adder dut (.*);
  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL: abc=%b cout,sum=%b%b", {a, b, cin}, cout, sum);
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
