// tb_qca_adder: end-to-end test of the 64-bit adder at its default size.
//
// A stream of operations goes in: random operands, the worst case of the
// design (a carry generated at bit 0 and rippled through every module to the
// carry-out: all ones plus one), carry-out cases, back-to-back operations on
// consecutive clocks, idle gaps, and a reset in the middle of the stream
// that must discard the operations in flight. Each sum is checked against
// the 65-bit integer sum; out_valid is checked on every clock. The latency
// of the first operation is measured and must be 36 clock phases, i.e. nine
// QCA clock cycles of four phases. Each of these situations is counted and
// a failure is counted for any that never occurred.
module tb_qca_adder;
  localparam int N = 64;
  localparam int LAT_PHASES = 36;      // expected at 64 bits
  localparam int LAT_CYCLES = 9;
  localparam int NCYC = 800;
  localparam int RESET_AT = 400;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0] a = '0, b = '0;
  logic [N:0] sum;
  logic [N:0] exp_s [NCYC];
  logic       vin_h [NCYC];
  logic       ripple_h [NCYC];

  int checks = 0, failures = 0, cyc = 0;
  int first_in = -1, first_out = -1;
  int n_ripple = 0, n_cout = 0, n_b2b = 0, n_gap = 0, n_reset_flush = 0, n_sums = 0;

  qca_adder dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                 .out_valid(out_valid), .sum(sum));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cyc=%0d %s", cyc, what);
    end
  endtask

  initial begin
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(posedge clk); #1;
      // ---- check what the adder shows now
      begin
        int j;
        logic ev;
        j = cyc - LAT_PHASES;
        ev = (j >= 0) ? vin_h[j] : 1'b0;
        check(out_valid === ev, $sformatf("out_valid=%b exp %b", out_valid, ev));
        if (out_valid && first_out < 0) first_out = cyc;
        if (ev && out_valid) begin
          n_sums++;
          check(sum === exp_s[j], $sformatf("sum=%h exp %h", sum, exp_s[j]));
          if (ripple_h[j] && sum === exp_s[j]) n_ripple++;
          if (sum[N]) n_cout++;
        end
      end
      // ---- drive the next clock
      rst_n = (cyc >= 2) && (cyc != RESET_AT);
      if (cyc == RESET_AT) begin
        for (int k = 0; k <= cyc; k++) begin
          if (k < cyc && k > cyc - LAT_PHASES && vin_h[k]) n_reset_flush++;
          vin_h[k] = 1'b0;
        end
      end
      in_valid = (cyc >= 4) && (cyc != RESET_AT) && !(cyc % 13 == 0) && !(cyc % 29 < 3);
      ripple_h[cyc] = 1'b0;
      case (cyc % 6)
        0: begin a = '1; b = {{(N-1){1'b0}}, 1'b1}; ripple_h[cyc] = 1'b1; end
        2: begin a = '1; b = {$urandom, $urandom} | 64'h1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      vin_h[cyc] = in_valid && rst_n;
      exp_s[cyc] = {1'b0, a} + {1'b0, b};
      if (in_valid && first_in < 0) first_in = cyc;
      if (cyc > 0 && in_valid && vin_h[cyc-1]) n_b2b++;
      if (cyc > 0 && in_valid && !vin_h[cyc-1] && first_in >= 0 && first_in < cyc) n_gap++;
    end

    // ---- latency: phases from operand capture to result, and QCA cycles
    check(first_out - first_in == LAT_PHASES,
          $sformatf("latency %0d phases, expected %0d", first_out - first_in, LAT_PHASES));
    check((first_out - first_in + 3) / 4 == LAT_CYCLES, "latency in QCA clock cycles");

    $display("events: sums=%0d ripple_bit0_to_cout=%0d carry_out=%0d back_to_back=%0d after_gap=%0d flushed_by_reset=%0d",
             n_sums, n_ripple, n_cout, n_b2b, n_gap, n_reset_flush);
    check(n_ripple > 0, "worst-case ripple never happened");
    check(n_cout > 0, "carry-out never happened");
    check(n_b2b > 0, "back-to-back operations never happened");
    check(n_gap > 0, "idle gap never happened");
    check(n_reset_flush > 0, "reset with operations in flight never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
