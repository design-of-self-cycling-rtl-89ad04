// tb_carry_cycling_unit: uses the carry-cycling unit as a bit-serial adder.
// Each run adds X + Y of W bits, LSB first: a carries X, b is held 1, sin
// carries Y; controller C is 0 in the first slot of every run so the run
// starts with no carry, and one extra slot turns the final carry into a
// sum bit, except in odd runs, which stop after W slots and leave their
// final carry in the loop. Runs follow back to back, so a carry left in
// the loop by one run must be cleared by controller C. Every serial sum bit is compared with
// the integer sum computed in the testbench.
module tb_carry_cycling_unit;
  localparam int W = 8;
  logic clk = 0, rst_n = 0;
  logic a, b, ctrl_c, sin, cin, sum_out, carry_out;
  int checks = 0, failures = 0;
  int cycles = 0;

  carry_cycling_unit dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .ctrl_c(ctrl_c),
                          .sin(sin), .cin(cin), .sum_out(sum_out), .carry_out(carry_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    a = 0; b = 0; ctrl_c = 0; sin = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      logic [W-1:0] x, y;
      logic [W:0]   s;
      if (run == 0) begin x = '1; y = '1; end
      else begin x = W'($urandom); y = W'($urandom); end
      s = {1'b0, x} + {1'b0, y};
      for (int k = 0; k <= ((run % 2) ? W - 1 : W); k++) begin
        @(negedge clk);
        ctrl_c = (k != 0);
        a   = (k < W) ? x[k] : 1'b0;
        b   = 1'b1;
        sin = (k < W) ? y[k] : 1'b0;
        #1;
        checks++;
        if (sum_out !== s[k]) begin
          failures++;
          $display("FAIL run %0d slot %0d: x=%h y=%h sum_out=%0b expected %0b", run, k, x, y, sum_out, s[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
