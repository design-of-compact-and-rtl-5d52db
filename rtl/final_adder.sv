// Vector-merging adder at the bottom of the Baugh-Wooley array: a ripple
// chain of N one-bit full adders that resolves the last sum and carry
// vectors into the upper half of the product, p[2N-1:N].
//
// Cell i (i < N-1) adds s_in[i] + c_in[i] + the ripple carry and gives
// p_hi[i]; cell 0 has no carry in. The top cell adds c_in[N-1], the ripple
// carry and signed_mode: in two's complement mode this third input is the
// Baugh-Wooley correction constant 2^(2N-1), which just inverts the top
// product bit. The top cell's carry would have weight 2^(2N) and is
// discarded (the product has 2N bits), so top_carry is left unread on
// purpose. Delay is N full-adder carries. Purely combinational.
// The ripple structure is the design's choice: the simplest adder made from
// the single full-adder cell the whole array uses.
module final_adder #(
  parameter int unsigned N = 4
) (
  input  logic [N-2:0] s_in,    // last sum vector, bits 1..N-1
  input  logic [N-1:0] c_in,    // last carry vector
  input  logic         signed_mode,
  output logic [N-1:0] p_hi
);
  logic [N:0] rc;               // ripple carries
  logic [N-1:0] fa_a, fa_b, fa_c;
  logic top_carry;

  assign rc[0] = 1'b0;
  assign fa_a  = c_in;
  assign fa_b  = {rc[N-1], s_in};
  assign fa_c  = {signed_mode, rc[N-2:0]};

  for (genvar i = 0; i < N; i++) begin : g_cell
    qca_full_adder u_fa (
      .a   (fa_a[i]),
      .b   (fa_b[i]),
      .cin (fa_c[i]),
      .sum (p_hi[i]),
      .cout(rc[i+1])
    );
  end

  assign top_carry = rc[N];
endmodule
