// adder_width_check: drives one qca_adder of width N with a random stream of
// operations (worst-case ripple from bit 0 to the carry-out included) and
// checks every sum against the integer sum and the latency of the first
// result against LAT_PHASES. Used by tb_qca_adder_widths to run the adder at
// each word length the design is evaluated at. Reports its counts through
// ports once done is high.
module adder_width_check #(
  parameter int N = 8,
  parameter int LAT_PHASES = 8,
  parameter int NOPS = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  logic rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0] a = '0, b = '0;
  logic [N:0] sum;
  logic [N:0] exp_q[$];
  int cyc = 0, first_in = -1, first_out = -1, n_out = 0;

  qca_adder #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                          .out_valid(out_valid), .sum(sum));

  initial begin
    checks = 0; failures = 0; done = 0;
    for (cyc = 0; cyc < NOPS + LAT_PHASES + 10; cyc++) begin
      @(posedge clk); #1;
      if (out_valid) begin
        logic [N:0] e;
        if (first_out < 0) first_out = cyc;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL N=%0d unexpected result at cyc %0d", N, cyc);
        end else begin
          e = exp_q.pop_front();
          if (sum !== e) begin
            failures++;
            $display("FAIL N=%0d sum=%h exp %h", N, sum, e);
          end
        end
        n_out++;
      end
      rst_n = cyc >= 1;
      in_valid = (cyc >= 3) && (cyc < NOPS + 3) && ($urandom % 4 != 0);
      if (cyc % 5 == 0) begin a = '1; b = {{(N-1){1'b0}}, 1'b1}; end
      else begin a = N'({$urandom, $urandom}); b = N'({$urandom, $urandom}); end
      if (in_valid) begin
        exp_q.push_back({1'b0, a} + {1'b0, b});
        if (first_in < 0) first_in = cyc;
      end
    end
    checks++;
    if (first_out - first_in != LAT_PHASES) begin
      failures++;
      $display("FAIL N=%0d latency %0d phases, expected %0d", N, first_out - first_in, LAT_PHASES);
    end
    checks++;
    if (exp_q.size() != 0 || n_out == 0) begin
      failures++;
      $display("FAIL N=%0d %0d results missing", N, exp_q.size());
    end
    $display("N=%0d: latency %0d phases = %0d QCA clock cycles, %0d results",
             N, first_out - first_in, (first_out - first_in + 3) / 4, n_out);
    done = 1;
  end
endmodule
