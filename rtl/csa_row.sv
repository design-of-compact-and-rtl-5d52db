// One carry-save row of the Baugh-Wooley array: N one-bit full adders side
// by side with no carry passed between them.
//
// The row adds one row of bit products into the running sum/carry pair left
// by the row above. Cell i works on the column of pp_row[i] and adds
//   pp_row[i] + s_in[i] + c_in[i]
// where s_in is the upper N-1 bits of the previous sum vector (its bit 0 has
// already left the array as a finished product bit), shifted down one column
// so that it lines up with this row, and c_in[i] is the carry the previous
// row's cell i sent into this column. The top cell has no sum bit above it
// and takes 0. Outputs: s_out[0] is the next finished product bit; s_out and
// c_out go to the next row. Because the carries go down rather than across,
// the row's delay is one full adder whatever N is.
// Purely combinational; the array wiring follows the classic Baugh-Wooley
// carry-save array, the design's reading of its block diagram.
module csa_row #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] pp_row,
  input  logic [N-2:0] s_in,    // previous sum vector, bits 1..N-1
  input  logic [N-1:0] c_in,
  output logic [N-1:0] s_out,
  output logic [N-1:0] c_out
);
  logic [N-1:0] s_above;
  assign s_above = {1'b0, s_in};

  for (genvar i = 0; i < N; i++) begin : g_cell
    qca_full_adder u_fa (
      .a   (pp_row[i]),
      .b   (s_above[i]),
      .cin (c_in[i]),
      .sum (s_out[i]),
      .cout(c_out[i])
    );
  end
endmodule
