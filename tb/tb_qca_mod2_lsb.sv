// tb_qca_mod2_lsb: drives random 2-bit operands every clock into the least
// significant module and checks c1 and c2 two clocks later against the
// carries of the integer sum a[1:0] + b[1:0] (carry-in 0).
module tb_qca_mod2_lsb;
  localparam int LAT = 2;
  localparam int NCYC = 400;
  logic clk = 0;
  logic [1:0] a, b;
  logic c1, c2;
  logic [1:0] exp_c [NCYC + LAT + 1];   // {c2, c1} per drive cycle
  int checks = 0, failures = 0, cyc = 0;

  qca_mod2_lsb dut (.clk(clk), .a(a), .b(b), .c1(c1), .c2(c2));

  always #5 clk = ~clk;

  initial begin
    a = 0; b = 0;
    for (cyc = 0; cyc < NCYC + LAT; cyc++) begin
      @(posedge clk); #1;
      if (cyc >= LAT + 1) begin
        checks++;
        if ({c2, c1} !== exp_c[cyc - LAT]) begin
          failures++;
          $display("FAIL cyc=%0d got c2c1=%b exp %b", cyc, {c2, c1}, exp_c[cyc - LAT]);
        end
      end
      a = 2'($urandom); b = 2'($urandom);
      // carry into bit 1 and carry into bit 2 of the integer sum
      exp_c[cyc] = {1'((3'(a) + 3'(b)) >> 2), 1'((int'(a[0]) + int'(b[0])) >> 1)};
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
