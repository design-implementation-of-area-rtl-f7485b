// tb_qca_mod2: drives a random operand pair every clock and, two clocks
// later, a random carry-in for it, into the 2-bit module. c_out1 and c_out2
// are checked one clock after the carry against the carries of the integer
// sum {a(i+1),a(i)} + {b(i+1),b(i)} + c(i). All 32 input combinations are
// also swept in order before the random part.
module tb_qca_mod2;
  localparam int NCYC = 600;
  logic clk = 0;
  logic [1:0] a, b;
  logic c_in, c_out1, c_out2;
  logic [1:0] a_h [NCYC + 8];
  logic [1:0] b_h [NCYC + 8];
  logic [1:0] exp_c [NCYC + 8];
  int checks = 0, failures = 0, cyc = 0;

  qca_mod2 dut (.clk(clk), .a(a), .b(b), .c_in(c_in), .c_out1(c_out1), .c_out2(c_out2));

  always #5 clk = ~clk;

  initial begin
    a = 0; b = 0; c_in = 0;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(posedge clk); #1;
      // outputs for operands driven at cyc-3 (carry driven at cyc-1)
      if (cyc >= 4) begin
        checks++;
        if ({c_out2, c_out1} !== exp_c[cyc - 3]) begin
          failures++;
          $display("FAIL cyc=%0d got %b exp %b", cyc, {c_out2, c_out1}, exp_c[cyc - 3]);
        end
      end
      if (cyc < 32) begin
        {a, b} = 4'(cyc);
      end else begin
        a = 2'($urandom); b = 2'($urandom);
      end
      a_h[cyc] = a; b_h[cyc] = b;
      // carry for the operands driven two clocks ago
      if (cyc >= 2) begin
        c_in = (cyc - 2 < 32) ? 1'((cyc - 2) >> 4) : 1'($urandom);
        exp_c[cyc - 2] = {1'((3'(a_h[cyc-2]) + 3'(b_h[cyc-2]) + 3'(c_in)) >> 2),
                          1'((int'(a_h[cyc-2][0]) + int'(b_h[cyc-2][0]) + int'(c_in)) >> 1)};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
