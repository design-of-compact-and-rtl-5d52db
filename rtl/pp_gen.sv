// Bit-product matrix of an N x N Baugh-Wooley multiplier.
//
// pp[j][i] is the product bit a_i * b_j, of weight 2^(i+j). In two's
// complement mode (signed_mode = 1) the products that pair exactly one sign
// bit with a non-sign bit (i = N-1 xor j = N-1) are complemented, i.e. taken
// as NAND instead of AND. That makes every row of the matrix non-negative, so
// the whole matrix can be summed by a plain array of full adders; the two
// constants that complete the Baugh-Wooley identity (2^N and 2^(2N-1)) are
// added further down the array. a_(N-1) * b_(N-1) itself stays uncomplemented.
// In unsigned mode every entry is a plain AND.
//
// Each entry is one AND gate (a majority gate with an input fixed at 0); the
// selective complement is an XOR with signed_mode, the design's own way of
// serving both number formats with one array. Purely combinational.
module pp_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  input  logic                  signed_mode,
  output logic [N-1:0][N-1:0]   pp     // pp[j][i]: row j (b_j), column i (a_i)
);
  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic ab;
      qca_and2 u_and (.a(a[i]), .b(b[j]), .y(ab));
      if ((i == N-1) != (j == N-1)) begin : g_mixed
        qca_xor2 u_cpl (.a(ab), .b(signed_mode), .y(pp[j][i]));
      end else begin : g_plain
        assign pp[j][i] = ab;
      end
    end
  end
endmodule
