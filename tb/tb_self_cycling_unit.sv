// tb_self_cycling_unit: replays the predicted 4x4 truth table for the
// pattern 1111 x 1111, slot by slot. The columns a, b and controller C are
// driven from the table; controller S and the loop delay follow the row
// structure (rows of 5, 6, 7 and 8 slots). The unit's cin, sin, carry out
// and sum out are compared with the table's columns in every one of the
// 26 slots. The last 8 sums, LSB first, read 1110 0001 = 225 = 15 * 15.
module tb_self_cycling_unit;
  localparam int N = 4;
  localparam int S = 26;
  localparam int TW = $clog2(2 * N);
  // Table columns, first slot leftmost; rows separated by underscores.
  localparam logic [0:S-1] COL_A    = 26'b11110_011110_0011110_00011110;
  localparam logic [0:S-1] COL_B    = 26'b11110_011110_0011110_00011110;
  localparam logic [0:S-1] COL_CIN  = 26'b00000_001111_0001111_00001111;
  localparam logic [0:S-1] COL_SIN  = 26'b00000_111100_1011010_10010110;
  localparam logic [0:S-1] COL_COUT = 26'b00000_011110_0011110_00011110;
  localparam logic [0:S-1] COL_SUM  = 26'b11110_101101_1001011_10000111;
  localparam logic [0:S-1] COL_CC   = 26'b01111_011111_0111111_01111111;

  logic clk = 0, rst_n = 0;
  logic a, b, ctrl_c, ctrl_s, sin, cin, sum_out, carry_out;
  logic [TW-1:0] tap_len;
  logic [2*N-1:0] prod;
  int checks = 0, failures = 0;
  int cycles = 0;

  self_cycling_unit #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .ctrl_c(ctrl_c),
                                  .ctrl_s(ctrl_s), .tap_len(tap_len), .sin(sin), .cin(cin),
                                  .sum_out(sum_out), .carry_out(carry_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    int i;
    a = 0; b = 0; ctrl_c = 0; ctrl_s = 0; tap_len = TW'(N);
    repeat (2) @(posedge clk);
    rst_n = 1;
    i = 0;
    for (int row = 0; row < N; row++) begin
      for (int k = 0; k < N + 1 + row; k++) begin
        @(negedge clk);
        a       = COL_A[i];
        b       = COL_B[i];
        ctrl_c  = COL_CC[i];
        ctrl_s  = (row != 0) && (k != N + row);
        tap_len = TW'(N + row);
        #1;
        checks++;
        if (cin !== COL_CIN[i] || sin !== COL_SIN[i] || carry_out !== COL_COUT[i] ||
            sum_out !== COL_SUM[i]) begin
          failures++;
          $display("FAIL slot %0d: cin=%0b sin=%0b cout=%0b sum=%0b expected %0b %0b %0b %0b", i,
                   cin, sin, carry_out, sum_out, COL_CIN[i], COL_SIN[i], COL_COUT[i], COL_SUM[i]);
        end
        if (row == N - 1) prod[k] = sum_out;
        i++;
      end
    end
    checks++;
    if (i != S || prod !== 8'd225) begin
      failures++;
      $display("FAIL product %0d after %0d slots", prod, i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
