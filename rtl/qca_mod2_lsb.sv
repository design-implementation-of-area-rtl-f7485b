// qca_mod2_lsb: the least significant 2-bit addition module, carry-in 0.
//
// The adder has no carry input (c0 = 0), so this module drops the propagate
// signal p0 that the general module needs:
//   c1 = g0 = M(a0, b0, 0)                       (clock zone 1)
//   c2 = M(a1, b1, g0) = g1 + p1.g0              (clock zone 2)
// Each majority gate output sits in its own clock zone (register stage), so
// c1 and c2 leave the module two clocks after a and b enter it; c1 is held
// for one extra zone so that both carries come out together. The reduction
// to p0-free form is the document's; the register placement follows its
// phase count ("c2 is computed within the two subsequent clock phases").
module qca_mod2_lsb (
  input  logic       clk,
  input  logic [1:0] a,      // a1, a0
  input  logic [1:0] b,      // b1, b0
  output logic       c1,     // carry into bit 1, 2 clocks after a/b
  output logic       c2      // carry into bit 2, 2 clocks after a/b
);
  logic g0_w, c2_w;
  logic g0_z1, a1_z1, b1_z1;  // clock zone 1

  qca_maj3 u_g0 (.a(a[0]), .b(b[0]), .c(1'b0), .y(g0_w));

  always_ff @(posedge clk) begin
    g0_z1 <= g0_w;
    a1_z1 <= a[1];
    b1_z1 <= b[1];
  end

  qca_maj3 u_c2 (.a(a1_z1), .b(b1_z1), .c(g0_z1), .y(c2_w));

  always_ff @(posedge clk) begin  // clock zone 2
    c1 <= g0_z1;
    c2 <= c2_w;
  end
endmodule
