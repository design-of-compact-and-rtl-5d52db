// Self-checking testbench of final_adder at N = 4, over all 2^8 input
// combinations. Bit i of s_in and bit i of c_in both weigh 2^i within
// p_hi, and signed_mode adds 2^(N-1); the result is taken modulo 2^N.
module tb_final_adder;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic [N-2:0] s_in;
  logic [N-1:0] c_in, p_hi;
  logic signed_mode;

  final_adder #(.N(N)) dut (.*);

  initial begin
    for (int v = 0; v < 2 ** (2 * N); v++) begin
      int e;
      {signed_mode, s_in, c_in} = (2 * N)'(v);
      e = int'(s_in) + int'(c_in) + (signed_mode ? 2 ** (N - 1) : 0);
      #1;
      checks++;
      if (p_hi !== N'(e)) begin
        failures++;
        $display("FAIL: s=%h c=%h m=%b p_hi=%h exp=%h", s_in, c_in, signed_mode, p_hi, N'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
