// Two-input OR gate built the QCA way: a majority gate whose third input is
// held at logic 1, so y = M(a,b,1) = a | b. Purely combinational.
module qca_or2 (
  input  logic a,
  input  logic b,
  output logic y
);
  qca_maj3 u_maj (.a(a), .b(b), .c(1'b1), .y(y));
endmodule
