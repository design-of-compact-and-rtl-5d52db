// One-bit full adder in majority logic: three majority gates and two
// inverters.
//   cout = M(a, b, cin)
//   sum  = M(~cout, cin, M(a, b, ~cin))
// The carry is a single majority gate, which keeps the carry path, the
// critical path of any adder array in QCA, to one gate per bit. This is the
// common three-majority full adder of the QCA literature; the gate-level
// structure is this design's choice, since only a "one-bit full adder" is
// called for. Purely combinational.
module qca_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic cin_n, cout_n, m_mid;
  qca_maj3 u_carry (.a(a),      .b(b),   .c(cin),   .y(cout));
  qca_inv  u_inv_c (.a(cin),    .y(cin_n));
  qca_inv  u_inv_o (.a(cout),   .y(cout_n));
  qca_maj3 u_mid   (.a(a),      .b(b),   .c(cin_n), .y(m_mid));
  qca_maj3 u_sum   (.a(cout_n), .b(cin), .c(m_mid), .y(sum));
endmodule
