// qca_maj3: three-input majority gate, the basic logic element of QCA.
//
// y = M(a,b,c) = ab + ac + bc. Tying one input to 0 gives an AND gate and
// tying it to 1 gives an OR gate, which is how the adder forms its generate
// (g = a.b) and propagate (p = a + b) signals. The gate is combinational; in
// the clock-zone pipeline its output is captured by the register of the next
// clock zone, so every majority gate on a path costs one clock phase.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = qca_pkg::maj3(a, b, c);
endmodule
