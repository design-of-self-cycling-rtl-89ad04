// tb_sum_loop: drives a random sum stream into the sum loop with random
// loop delays (1 .. 2N-1) and random controller S, and checks that sin is
// the bit written exactly tap_len slots earlier when controller S is 1,
// and 0 when it is 0. The reference is a plain array of all bits written.
module tb_sum_loop;
  localparam int N = 4;
  localparam int TW = $clog2(2 * N);
  logic clk = 0, rst_n = 0;
  logic sum_out, ctrl_s, sin;
  logic [TW-1:0] tap_len;
  logic hist [0:1023];
  int t = 0;
  int checks = 0, failures = 0;
  int cycles = 0;

  sum_loop #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .sum_out(sum_out), .tap_len(tap_len),
                         .ctrl_s(ctrl_s), .sin(sin));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    sum_out = 0; ctrl_s = 0; tap_len = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (t = 0; t < 1000; t++) begin
      @(negedge clk);
      tap_len = TW'(1 + ($urandom % (2 * N - 1)));
      ctrl_s  = ($urandom % 4) != 0;
      sum_out = 1'($urandom);
      hist[t] = sum_out;
      #1;
      if (t >= 2 * N) begin
        logic expect_sin;
        expect_sin = ctrl_s ? hist[t - int'(tap_len)] : 1'b0;
        checks++;
        if (sin !== expect_sin) begin
          failures++;
          $display("FAIL t=%0d tap=%0d ctrl_s=%0b sin=%0b expected %0b", t, tap_len, ctrl_s, sin, expect_sin);
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
