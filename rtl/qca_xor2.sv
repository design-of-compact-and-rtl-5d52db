// Two-input XOR from majority-derived gates: y = (a & ~b) | (~a & b), i.e.
// two AND gates, two inverters and one OR gate. The multiplier uses it as a
// controlled inverter that complements selected bit products in signed mode;
// that use, and this gate structure, are this design's own choice.
// Purely combinational.
module qca_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n, t0, t1;
  qca_inv  u_inv_a (.a(a), .y(a_n));
  qca_inv  u_inv_b (.a(b), .y(b_n));
  qca_and2 u_and0  (.a(a),   .b(b_n), .y(t0));
  qca_and2 u_and1  (.a(a_n), .b(b),   .y(t1));
  qca_or2  u_or    (.a(t0),  .b(t1),  .y(y));
endmodule
