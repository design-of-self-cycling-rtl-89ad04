// tb_self_cycling_multiplier: end-to-end test of the multiplier at its
// default size (N = 4). It multiplies 1111 x 1111 first and then every
// pair of 4-bit operands, comparing the parallel product with op_a * op_b
// and the serial product bits (sum_out while prod_bit_valid is high, LSB
// first) with the same value. It checks the latency: done one cycle after
// the 26th slot. It also counts how often each mechanism of the design is
// exercised and fails if one never is: a recycled carry of 1, a sum of 1
// returned through the sum loop, controller C and controller S clearing a
// slot, a pass-through slot, a carry-to-sum slot holding a carry of 1, and
// a start pulse ignored while busy.
module tb_self_cycling_multiplier;
  import scm_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic start, busy, sum_out, carry_out, sum_in, carry_in, ctrl_c, ctrl_s, prod_bit_valid, done;
  logic [N-1:0] op_a, op_b;
  logic [2*N-1:0] product, serial;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_carry_recycled = 0, n_sum_recycled = 0, n_ctrl_c = 0, n_ctrl_s = 0;
  int n_pass = 0, n_carry_to_sum = 0, n_start_ignored = 0;

  self_cycling_multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .op_a(op_a), .op_b(op_b),
                               .busy(busy), .sum_out(sum_out), .carry_out(carry_out),
                               .sum_in(sum_in), .carry_in(carry_in), .ctrl_c(ctrl_c), .ctrl_s(ctrl_s),
                               .prod_bit_valid(prod_bit_valid), .product(product), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Slot position, tracked by the testbench from the start pulse: row
  // j lasts N+1+j slots.
  int slot_row = -1, slot_k = 0;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (sum_in) n_sum_recycled++;
      if (carry_in) n_carry_recycled++;
      if (!ctrl_c) n_ctrl_c++;
      if (!ctrl_s && slot_row > 0) n_ctrl_s++;
      if (slot_row > 0 && slot_k < slot_row) n_pass++;
      if (slot_k == N + slot_row && carry_in) n_carry_to_sum++;
      if (slot_k == N + slot_row) begin slot_k = 0; slot_row++; end
      else slot_k++;
    end
    if (rst_n && !busy && start) begin slot_row = 0; slot_k = 0; end
  end

  task automatic multiply(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke);
    int lat, nbits;
    logic [2*N-1:0] expect_p;
    expect_p = (2*N)'(x) * (2*N)'(y);
    @(negedge clk);
    op_a = x; op_b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1; nbits = 0; serial = '0;
    while (!done && lat < 200) begin
      if (poke && lat == 5) begin
        start = 1; op_a = ~x;
        n_start_ignored++;
      end else start = 0;
      if (prod_bit_valid) begin
        serial[nbits] = sum_out;
        nbits++;
      end
      @(negedge clk);
      lat++;
    end
    start = 0;
    checks++;
    if (product !== expect_p || serial !== expect_p || nbits != 2 * N) begin
      failures++;
      $display("FAIL %0d x %0d: product=%0d serial=%0d bits=%0d", x, y, product, serial, nbits);
    end
    checks++;
    if (lat != total_slots(N) + 1) begin
      failures++;
      $display("FAIL %0d x %0d: latency %0d cycles, expected %0d", x, y, lat, total_slots(N) + 1);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    start = 0; op_a = '0; op_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    multiply('1, '1, 1'b0);
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++)
        multiply(N'(x), N'(y), (x == 3 && y == 5));
    $display("mechanisms: carry_recycled=%0d sum_recycled=%0d ctrl_c=%0d ctrl_s=%0d pass=%0d carry_to_sum=%0d start_ignored=%0d",
             n_carry_recycled, n_sum_recycled, n_ctrl_c, n_ctrl_s, n_pass, n_carry_to_sum, n_start_ignored);
    checks++;
    if (n_carry_recycled == 0 || n_sum_recycled == 0 || n_ctrl_c == 0 || n_ctrl_s == 0 ||
        n_pass == 0 || n_carry_to_sum == 0 || n_start_ignored == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
