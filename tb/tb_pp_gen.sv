// Self-checking testbench of pp_gen at N = 4, over all 512 combinations of
// a, b and signed_mode. Each matrix entry is compared with a_i & b_j,
// inverted exactly when signed mode is on and one (not both) of i, j is the
// sign position. As a second, independent check the weighted sum of the
// matrix plus the Baugh-Wooley constants (2^N + 2^(2N-1) in signed mode) must
// equal the product modulo 2^(2N).
module tb_pp_gen;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic [N-1:0] a, b;
  logic signed_mode;
  logic [N-1:0][N-1:0] pp;

  pp_gen #(.N(N)) dut (.*);

  initial begin
    for (int v = 0; v < 2 ** (2 * N + 1); v++) begin
      longint sum, prod;
      {signed_mode, a, b} = (2 * N + 1)'(v);
      #1;
      sum = 0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          logic e;
          e = a[i] & b[j];
          if (signed_mode && ((i == N - 1) != (j == N - 1))) e = ~e;
          checks++;
          if (pp[j][i] !== e) begin
            failures++;
            $display("FAIL: a=%h b=%h s=%b pp[%0d][%0d]=%b", a, b, signed_mode, j, i, pp[j][i]);
          end
          sum += longint'(pp[j][i]) << (i + j);
        end
      if (signed_mode) begin
        sum += (longint'(1) << N) + (longint'(1) << (2 * N - 1));
        prod = longint'($signed(a)) * longint'($signed(b));
      end else begin
        prod = longint'(a) * longint'(b);
      end
      checks++;
      if ((2 * N)'(sum) !== (2 * N)'(prod)) begin
        failures++;
        $display("FAIL: matrix sum a=%h b=%h s=%b", a, b, signed_mode);
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
