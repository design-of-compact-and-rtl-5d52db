// Three-input majority gate, the basic logic primitive of quantum-dot
// cellular automata: y = M(a,b,c) = a&b | a&c | b&c. Every other gate of the
// multiplier (AND, OR, XOR, full adder) is composed from this gate and the
// inverter, as in a QCA layout. Purely combinational, no timing of its own.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (a & c) | (b & c);
endmodule
