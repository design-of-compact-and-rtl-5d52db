// Two-input AND gate built the QCA way: a majority gate whose third input is
// held at logic 0, so y = M(a,b,0) = a & b. Purely combinational.
module qca_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  qca_maj3 u_maj (.a(a), .b(b), .c(1'b0), .y(y));
endmodule
