// mult_width_check: drives one self_cycling_multiplier of width N with
// random operands (plus all-ones x all-ones) and checks the product and
// the latency of N(N+1) + N(N-1)/2 slots plus one cycle. Used by
// tb_multiplier_widths to run the same design at several operand widths.
module mult_width_check #(
  parameter int N    = 8,
  parameter int RUNS = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import scm_pkg::*;
  logic start, busy, sum_out, carry_out, sum_in, carry_in, ctrl_c, ctrl_s, prod_bit_valid, done;
  logic [N-1:0] op_a, op_b;
  logic [2*N-1:0] product;

  self_cycling_multiplier #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .op_a(op_a), .op_b(op_b), .busy(busy),
    .sum_out(sum_out), .carry_out(carry_out), .sum_in(sum_in), .carry_in(carry_in),
    .ctrl_c(ctrl_c), .ctrl_s(ctrl_s), .prod_bit_valid(prod_bit_valid), .product(product),
    .done(done));

  initial begin
    checks = 0; failures = 0; finished = 0;
    start = 0; op_a = '0; op_b = '0;
    wait (rst_n);
    for (int r = 0; r < RUNS; r++) begin
      int lat;
      logic [2*N-1:0] expect_p;
      @(negedge clk);
      if (r == 0) begin op_a = '1; op_b = '1; end
      else begin
        for (int i = 0; i < N; i++) begin op_a[i] = 1'($urandom); op_b[i] = 1'($urandom); end
      end
      expect_p = (2*N)'(op_a) * (2*N)'(op_b);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 10 * total_slots(N)) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (product !== expect_p || lat != int'(total_slots(N)) + 1) begin
        failures++;
        $display("FAIL N=%0d: %0d x %0d = %0d (expected %0d), latency %0d", N, op_a, op_b, product,
                 expect_p, lat);
      end
    end
    finished = 1;
  end
endmodule
