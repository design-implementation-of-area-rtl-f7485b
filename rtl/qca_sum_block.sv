// qca_sum_block: computes the n sum bits from the operands and the carries.
//
// For every bit position i:
//   t(i) = M(a(i), b(i), ~c(i))                  clock zone 1
//   s(i) = M(~c(i+1), c(i), t(i))                clock zone 2
// so the path from a carry to a sum bit is two majority gates and one
// inverter, as the document states for the carry-in to sum path; the exact
// gate arrangement is the well-known QCA full-adder sum and is this design's
// choice. The carry-out c(N) is passed along as sum bit N.
//
// Timing: all inputs belong to the same operation and arrive in the same
// clock; sum follows two clocks later. One operation per clock.
module qca_sum_block #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N:0]   carry,       // c(N) .. c(0)
  output logic [N:0]   sum          // c(N), s(N-1) .. s(0)
);
  logic [N-1:0] t_w, s_w;
  logic [N-1:0] t_z1;
  logic [N:0]   c_z1;

  for (genvar i = 0; i < N; i++) begin : g_bit
    qca_maj3 u_t (.a(a[i]), .b(b[i]), .c(~carry[i]), .y(t_w[i]));
    qca_maj3 u_s (.a(~c_z1[i+1]), .b(c_z1[i]), .c(t_z1[i]), .y(s_w[i]));
  end

  always_ff @(posedge clk) begin   // clock zone 1
    t_z1 <= t_w;
    c_z1 <= carry;
  end

  always_ff @(posedge clk) begin   // clock zone 2
    sum <= {c_z1[N], s_w};
  end
endmodule
