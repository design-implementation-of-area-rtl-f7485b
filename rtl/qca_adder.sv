// qca_adder: n-bit ripple adder built from 2-bit modules, in the clock-zone
// pipeline form of a QCA layout.
//
// Structure: an input acquisition zone registers A and B; the carry chain
// (N/2 cascaded 2-bit modules) produces all carries c(1)..c(N); the sum
// block turns operands and carries into the N sum bits. The carry-out is
// the top bit of the sum bus. There is no carry input (c0 = 0), as in the
// document.
//
// One clock edge stands for one QCA clock phase. The result of an operation
// leaves LATENCY_PHASES = N/2 + 4 clocks after its operands are taken:
// 1 (acquisition) + 2 (g0, c2) + N/2-1 (one per remaining module) + 2 (sum).
// That is 36 phases, 9 QCA clock cycles, at the default N = 64 and 20
// phases (5 cycles) at N = 32, the figures the document reports.
//
// Interface: operands with in_valid high are taken on a rising clock edge;
// out_valid marks the sum of that operation LATENCY_PHASES edges later. A
// new operation may be started on every clock (a QCA layout takes one per
// four phases; the RTL does not need that spacing). The valid flag and its
// reset are this design's addition; the data path has no reset.
module qca_adder #(
  parameter int unsigned N = 64            // operand width, even, >= 2
) (
  input  logic         clk,
  input  logic         rst_n,              // asynchronous, active low
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N:0]   sum                 // {carry-out, A+B mod 2^N}
);
  localparam int unsigned LATENCY_PHASES = qca_pkg::adder_latency_phases(N);

  logic [N-1:0] a_z0, b_z0;                // input acquisition zone
  logic [N:0]   carry;
  logic [N-1:0] a_d, b_d;
  logic [LATENCY_PHASES-1:0] valid_pipe;

  always_ff @(posedge clk) begin
    a_z0 <= a;
    b_z0 <= b;
  end

  qca_carry_chain #(.N(N)) u_chain (
    .clk   (clk),
    .a     (a_z0),
    .b     (b_z0),
    .carry (carry),
    .a_d   (a_d),
    .b_d   (b_d)
  );

  qca_sum_block #(.N(N)) u_sum (
    .clk   (clk),
    .a     (a_d),
    .b     (b_d),
    .carry (carry),
    .sum   (sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_pipe <= '0;
    else        valid_pipe <= {valid_pipe[LATENCY_PHASES-2:0], in_valid};
  end

  assign out_valid = valid_pipe[LATENCY_PHASES-1];

  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $fatal(1, "qca_adder: N must be even and at least 2");
  end
endmodule
