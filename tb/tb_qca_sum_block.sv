// tb_qca_sum_block: gives the sum block random 64-bit operands together with
// their true carries (computed here from the integer sum) and checks two
// clocks later that the output equals the 65-bit sum A + B.
module tb_qca_sum_block;
  localparam int N = 64;
  localparam int LAT = 2;
  localparam int NCYC = 400;
  logic clk = 0;
  logic [N-1:0] a, b;
  logic [N:0] carry, sum;
  logic [N:0] exp_s [NCYC];
  int checks = 0, failures = 0, cyc = 0;

  qca_sum_block dut (.clk(clk), .a(a), .b(b), .carry(carry), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    a = '0; b = '0; carry = '0;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(posedge clk); #1;
      if (cyc >= LAT + 1) begin
        checks++;
        if (sum !== exp_s[cyc - LAT]) begin
          failures++;
          $display("FAIL cyc=%0d sum=%h exp %h", cyc, sum, exp_s[cyc - LAT]);
        end
      end
      case (cyc % 4)
        1: begin a = '1; b = {{(N-1){1'b0}}, 1'b1}; end
        3: begin a = '1; b = '1; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      exp_s[cyc] = {1'b0, a} + {1'b0, b};
      // carry into bit i: the sum bit minus the operand bits (XOR)
      carry = {exp_s[cyc][N], exp_s[cyc][N-1:0] ^ a ^ b};
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
