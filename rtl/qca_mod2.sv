// qca_mod2: the 2-bit basic addition module.
//
// For bit positions i and i+1 it computes, from the operand bits and the
// incoming carry c(i):
//   p(i) = M(a(i), b(i), 1),  g(i) = M(a(i), b(i), 0)               zone 1
//   x = M(a(i+1), b(i+1), g(i)),  y = M(a(i+1), b(i+1), p(i))        zone 2
//   c(i+2) = M(x, y, c(i)),  c(i+1) = M(p(i), g(i), c(i))            zone 3
// which equals the carry-lookahead form c(i+2) = g(i+1) + p(i+1).g(i) +
// p(i+1).p(i).c(i). Only the zone-3 gate lies on the carry path, so a carry
// crosses two bit positions in one majority gate, i.e. one clock phase.
//
// Timing: a and b must arrive two clocks before c_in (the two zones that do
// not depend on the carry work ahead of it); c_out1 and c_out2 follow one
// clock after c_in. The equations are the document's; the zone assignment
// is this design's reading of its phase count.
module qca_mod2 (
  input  logic       clk,
  input  logic [1:0] a,       // a(i+1), a(i)
  input  logic [1:0] b,       // b(i+1), b(i)
  input  logic       c_in,    // c(i)
  output logic       c_out1,  // c(i+1)
  output logic       c_out2   // c(i+2)
);
  logic p_w, g_w, x_w, y_w, c1_w, c2_w;
  logic p_z1, g_z1, ah_z1, bh_z1;   // clock zone 1
  logic p_z2, g_z2, x_z2, y_z2;     // clock zone 2

  qca_maj3 u_p (.a(a[0]), .b(b[0]), .c(1'b1), .y(p_w));
  qca_maj3 u_g (.a(a[0]), .b(b[0]), .c(1'b0), .y(g_w));

  always_ff @(posedge clk) begin
    p_z1  <= p_w;
    g_z1  <= g_w;
    ah_z1 <= a[1];
    bh_z1 <= b[1];
  end

  qca_maj3 u_x (.a(ah_z1), .b(bh_z1), .c(g_z1), .y(x_w));
  qca_maj3 u_y (.a(ah_z1), .b(bh_z1), .c(p_z1), .y(y_w));

  always_ff @(posedge clk) begin
    p_z2 <= p_z1;
    g_z2 <= g_z1;
    x_z2 <= x_w;
    y_z2 <= y_w;
  end

  qca_maj3 u_c2 (.a(x_z2), .b(y_z2), .c(c_in), .y(c2_w));
  qca_maj3 u_c1 (.a(p_z2), .b(g_z2), .c(c_in), .y(c1_w));

  always_ff @(posedge clk) begin  // clock zone 3
    c_out1 <= c1_w;
    c_out2 <= c2_w;
  end
endmodule
