// qca_carry_chain: the n-bit carry chain, a cascade of N/2 2-bit modules.
//
// Module 0 is the simplified least significant module (carry-in 0); modules
// 1..N/2-1 are the general 2-bit module, each taking the carry c(2k) from
// the module below. The chain runs in ripple fashion, but a carry needs only
// one clock phase per module (two bit positions).
//
// Because the design is a clock-zone pipeline, the operand bits of module k
// are held back k-1 zones so that they reach the module two zones ahead of
// its carry, and the carries each module produces are held until the last
// module has finished, so that all carries leave the chain in the same
// clock. The operands are delayed by the same amount and leave with them.
// In a layout these delays are the wire lengths; their form here is this
// design's choice.
//
// Timing: a and b are taken every clock; carry, a_d and b_d for them appear
// LATENCY = N/2 + 1 clocks later. carry[0] is the constant carry-in 0.
module qca_carry_chain #(
  parameter int unsigned N = 64       // operand width, even, >= 2
) (
  input  logic         clk,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   carry,         // c(N) .. c(0)
  output logic [N-1:0] a_d,           // a delayed by LATENCY
  output logic [N-1:0] b_d            // b delayed by LATENCY
);
  localparam int unsigned M       = N / 2;   // number of 2-bit modules
  localparam int unsigned LATENCY = M + 1;

  // Raw carries straight out of the modules: c_raw[2k+1], c_raw[2k+2] come
  // out of module k at clock k+2 after the operands.
  logic [N:1] c_raw;

  qca_mod2_lsb u_mod0 (
    .clk (clk),
    .a   (a[1:0]),
    .b   (b[1:0]),
    .c1  (c_raw[1]),
    .c2  (c_raw[2])
  );

  qca_wire_delay #(.WIDTH(2), .DEPTH(M - 1)) u_deskew0 (
    .clk (clk), .d (c_raw[2:1]), .q (carry[2:1])
  );

  for (genvar k = 1; k < M; k++) begin : g_mod
    logic [1:0] a_sk, b_sk;

    // operand skew: k-1 zones, so the operands lead the carry by two zones
    qca_wire_delay #(.WIDTH(4), .DEPTH(k - 1)) u_skew (
      .clk (clk),
      .d   ({a[2*k+1:2*k], b[2*k+1:2*k]}),
      .q   ({a_sk, b_sk})
    );

    qca_mod2 u_mod (
      .clk    (clk),
      .a      (a_sk),
      .b      (b_sk),
      .c_in   (c_raw[2*k]),
      .c_out1 (c_raw[2*k+1]),
      .c_out2 (c_raw[2*k+2])
    );

    // carry deskew: hold until the last module is done
    qca_wire_delay #(.WIDTH(2), .DEPTH(M - 1 - k)) u_deskew (
      .clk (clk), .d (c_raw[2*k+2:2*k+1]), .q (carry[2*k+2:2*k+1])
    );
  end

  assign carry[0] = 1'b0;

  qca_wire_delay #(.WIDTH(2 * N), .DEPTH(LATENCY)) u_opnd (
    .clk (clk), .d ({a, b}), .q ({a_d, b_d})
  );

  initial begin
    assert (N >= 2 && N % 2 == 0)
      else $fatal(1, "qca_carry_chain: N must be even and at least 2");
  end
endmodule
