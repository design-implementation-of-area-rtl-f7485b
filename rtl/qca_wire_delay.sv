// qca_wire_delay: a QCA wire that spans DEPTH clock zones.
//
// In a QCA layout a signal that has to wait for a slower one runs through a
// longer wire, and every clock zone it crosses holds it for one phase. Here
// that wire is a shift register of DEPTH stages, WIDTH bits wide. DEPTH = 0
// is a plain connection; clk is then unused (lint reports it), which keeps
// one port list for callers whose delay is computed from a loop index.
// Output = input delayed by DEPTH clocks. No reset: the stages carry data
// only and are flushed by new data. The delay-line form is this design's
// model of the layout's wires.
module qca_wire_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_zones
    logic [WIDTH-1:0] zone [DEPTH];
    always_ff @(posedge clk) begin
      zone[0] <= d;
      for (int unsigned i = 1; i < DEPTH; i++) zone[i] <= zone[i-1];
    end
    assign q = zone[DEPTH-1];
  end
endmodule
