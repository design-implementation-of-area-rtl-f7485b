// tb_qca_carry_chain: feeds the carry chain (default width, 64 bits) a new
// random operand pair every clock, plus directed worst cases (a carry born
// at bit 0 that ripples to the top, all-ones plus all-ones, zero). Every
// carry c(i) is checked N/2+1 clocks later against the carry into bit i of
// the integer sum, ((A mod 2^i) + (B mod 2^i)) >> i; the delayed operands
// are checked too.
module tb_qca_carry_chain;
  localparam int N = 64;
  localparam int LAT = N / 2 + 1;            // 33 phases
  localparam int NCYC = 500;
  logic clk = 0;
  logic [N-1:0] a, b, a_d, b_d;
  logic [N:0] carry;
  logic [N-1:0] a_h [NCYC];
  logic [N-1:0] b_h [NCYC];
  int checks = 0, failures = 0, cyc = 0;

  qca_carry_chain dut (.clk(clk), .a(a), .b(b), .carry(carry), .a_d(a_d), .b_d(b_d));

  always #5 clk = ~clk;

  function automatic logic [N:0] ref_carry(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] c;
    logic [N:0] mask, s;
    c[0] = 1'b0;
    for (int i = 1; i <= N; i++) begin
      mask = ({{N{1'b0}}, 1'b1} << i) - 1;
      s = ({1'b0, x} & mask) + ({1'b0, y} & mask);
      c[i] = s[i];
    end
    return c;
  endfunction

  initial begin
    a = '0; b = '0;
    for (cyc = 0; cyc < NCYC; cyc++) begin
      @(posedge clk); #1;
      if (cyc - LAT >= 1 && cyc - LAT < NCYC) begin
        checks++;
        if (carry !== ref_carry(a_h[cyc-LAT], b_h[cyc-LAT]) ||
            a_d !== a_h[cyc-LAT] || b_d !== b_h[cyc-LAT]) begin
          failures++;
          $display("FAIL cyc=%0d carry=%h exp %h", cyc, carry, ref_carry(a_h[cyc-LAT], b_h[cyc-LAT]));
        end
      end
      case (cyc % 8)
        1: begin a = '1; b = {{(N-1){1'b0}}, 1'b1}; end   // ripple bit 0 -> carry-out
        3: begin a = '1; b = '1; end
        5: begin a = '0; b = '0; end
        7: begin a = {N{1'b1}} >> ($urandom % N); b = {{(N-1){1'b0}}, 1'b1}; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      a_h[cyc] = a; b_h[cyc] = b;
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
