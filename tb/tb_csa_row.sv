// Self-checking testbench of csa_row at N = 4, over all 2^11 input
// combinations. For every cell i the two-bit value {c_out[i], s_out[i]} must
// equal pp_row[i] + s_in[i] + c_in[i], with 0 in place of the missing s_in
// bit of the top cell. The row as a whole must preserve the column-weighted
// sum: sum(s_out) + sum(c_out) == pp_row + s_in + c_in as numbers, since no
// carry may be lost or passed sideways.
module tb_csa_row;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic [N-1:0] pp_row, c_in, s_out, c_out;
  logic [N-2:0] s_in;

  csa_row #(.N(N)) dut (.*);

  initial begin
    for (int v = 0; v < 2 ** (3 * N - 1); v++) begin
      logic [N-1:0] s_ext;
      {pp_row, s_in, c_in} = (3 * N - 1)'(v);
      s_ext = {1'b0, s_in};
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if ({c_out[i], s_out[i]} !== 2'(int'(pp_row[i]) + int'(s_ext[i]) + int'(c_in[i]))) begin
          failures++;
          $display("FAIL: cell %0d pp=%h s=%h c=%h", i, pp_row, s_in, c_in);
        end
      end
      checks++;
      if (int'(s_out) + 2 * int'(c_out) != int'(pp_row) + int'(s_in) + int'(c_in)) begin
        failures++;
        $display("FAIL: weighted sum pp=%h s=%h c=%h", pp_row, s_in, c_in);
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
