// tb_multiplier_widths: runs the self-cycling multiplier at operand widths
// 2, 8, 16 and 32 side by side, with random operands, to show that the
// same unit and schedule serve any width; only the input table and the
// sum loop length grow with N.
module tb_multiplier_widths;
  logic clk = 0, rst_n = 0;
  int c2, f2, c8, f8, c16, f16, c32, f32;
  logic d2, d8, d16, d32;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  mult_width_check #(.N(2),  .RUNS(50)) u2  (.clk(clk), .rst_n(rst_n), .checks(c2),  .failures(f2),  .finished(d2));
  mult_width_check #(.N(8),  .RUNS(50)) u8  (.clk(clk), .rst_n(rst_n), .checks(c8),  .failures(f8),  .finished(d8));
  mult_width_check #(.N(16), .RUNS(50)) u16 (.clk(clk), .rst_n(rst_n), .checks(c16), .failures(f16), .finished(d16));
  mult_width_check #(.N(32), .RUNS(20)) u32 (.clk(clk), .rst_n(rst_n), .checks(c32), .failures(f32), .finished(d32));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (d2 && d8 && d16 && d32);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8 + c16 + c32, f2 + f8 + f16 + f32);
    $finish;
  end

  initial begin
    wait (cycles > 200000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8 + c16 + c32, f2 + f8 + f16 + f32 + 1);
    $finish;
  end
endmodule
