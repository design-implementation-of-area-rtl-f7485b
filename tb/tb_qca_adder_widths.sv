// tb_qca_adder_widths: runs the adder at the word lengths it is evaluated at
// (8, 16, 32 and 64 bits) side by side. Each width gets a random operation
// stream with worst-case ripples and is checked for correct sums and for a
// latency of N/2 + 4 clock phases: 8, 12, 20 and 36 phases, that is 2, 3, 5
// and 9 QCA clock cycles (5 and 9 are the cycle counts reported for the 32-
// and 64-bit layouts).
module tb_qca_adder_widths;
  logic clk = 0;
  int c[4], f[4];
  logic d[4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adder_width_check #(.N(8),  .LAT_PHASES(8))  u8  (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  adder_width_check #(.N(16), .LAT_PHASES(12)) u16 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  adder_width_check #(.N(32), .LAT_PHASES(20)) u32 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  adder_width_check #(.N(64), .LAT_PHASES(36)) u64 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
