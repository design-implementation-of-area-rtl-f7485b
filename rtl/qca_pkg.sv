// qca_pkg: constants and helpers shared by the QCA ripple-adder RTL.
//
// The adder is written as a clock-zone pipeline: one RTL clock edge stands
// for one QCA clock phase, and one register stage for one clock zone. Four
// phases make one QCA clock cycle. The latency formula follows the phase
// budget of the design: one phase to acquire the operands, two phases for
// the least significant 2-bit module (g0, then c2), one phase for each of the
// remaining N/2-1 modules, and two phases for the sum bits.
package qca_pkg;

  // QCA clock phases per clock cycle (four clocks shifted by 90 degrees).
  localparam int unsigned PHASES_PER_CYCLE = 4;

  // Three-input majority function M(a,b,c) = ab + ac + bc.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  // Latency of an n-bit adder in clock phases, input acquisition included.
  function automatic int unsigned adder_latency_phases(input int unsigned n);
    return 1 + 2 + (n / 2 - 1) + 2;
  endfunction

  // The same latency in whole QCA clock cycles (rounded up).
  function automatic int unsigned adder_latency_cycles(input int unsigned n);
    return (adder_latency_phases(n) + PHASES_PER_CYCLE - 1) / PHASES_PER_CYCLE;
  endfunction

endpackage
