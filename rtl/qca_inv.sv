// QCA inverter: y = NOT a. Together with the majority gate it forms the
// complete gate set of the design. Purely combinational.
module qca_inv (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
