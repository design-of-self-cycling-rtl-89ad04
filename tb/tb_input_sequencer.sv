// tb_input_sequencer: checks the slot stream the sequencer issues.
// First run: 1111 x 1111, compared with the predicted table's a, b and
// controller C columns. Then random operands, compared slot by slot with a
// reference list built in the testbench row by row (j empty slots, N
// partial products a_i b_j, one carry-to-sum slot). Checks the number of
// slots (26 for N = 4), tap_len and controller S, the 2N last-row slots,
// the single last_slot, and that a start pulse while busy changes nothing.
module tb_input_sequencer;
  import scm_pkg::*;
  localparam int N = 4;
  localparam int TW = $clog2(2 * N);
  localparam int S = 26;
  localparam logic [0:S-1] COL_A  = 26'b11110_011110_0011110_00011110;
  localparam logic [0:S-1] COL_CC = 26'b01111_011111_0111111_01111111;

  logic clk = 0, rst_n = 0;
  logic start, busy, last_row, last_slot;
  logic [N-1:0] op_a, op_b;
  slot_ctrl_t slot;
  logic [TW-1:0] tap_len;
  int checks = 0, failures = 0;
  int cycles = 0;

  // Reference slot list.
  slot_ctrl_t ref_slot [0:255];
  int         ref_tap  [0:255];
  int         ref_row  [0:255];
  int         ref_n;

  input_sequencer #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .op_a(op_a), .op_b(op_b),
                                .busy(busy), .slot(slot), .tap_len(tap_len), .last_row(last_row),
                                .last_slot(last_slot));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic build_ref(input logic [N-1:0] x, input logic [N-1:0] y);
    ref_n = 0;
    for (int j = 0; j < N; j++) begin
      for (int p = 0; p < j; p++) begin
        ref_slot[ref_n] = '{a: 1'b0, b: 1'b0, ctrl_c: (p != 0), ctrl_s: (j != 0)};
        ref_tap[ref_n] = N + j; ref_row[ref_n] = j; ref_n++;
      end
      for (int i = 0; i < N; i++) begin
        ref_slot[ref_n] = '{a: x[i], b: y[j], ctrl_c: (i + j != 0), ctrl_s: (j != 0)};
        ref_tap[ref_n] = N + j; ref_row[ref_n] = j; ref_n++;
      end
      ref_slot[ref_n] = '{a: 1'b0, b: 1'b0, ctrl_c: 1'b1, ctrl_s: 1'b0};
      ref_tap[ref_n] = N + j; ref_row[ref_n] = j; ref_n++;
    end
  endtask

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y, input bit chk_table);
    int n_last_row, n_last_slot;
    build_ref(x, y);
    @(negedge clk);
    op_a = x; op_b = y; start = 1;
    @(negedge clk);
    start = 0;
    n_last_row = 0; n_last_slot = 0;
    for (int s = 0; s < ref_n; s++) begin
      if (s == 3) begin start = 1; op_a = ~x; op_b = ~y; end  // must be ignored
      if (s == 4) begin start = 0; op_a = x; op_b = y; end
      #1;
      checks++;
      if (!busy || slot !== ref_slot[s] || (ref_row[s] != 0 && int'(tap_len) != ref_tap[s]) ||
          last_row !== (ref_row[s] == N - 1)) begin
        failures++;
        $display("FAIL slot %0d: busy=%0b slot=%b tap=%0d last_row=%0b expected %b %0d", s, busy,
                 slot, tap_len, last_row, ref_slot[s], ref_tap[s]);
      end
      if (chk_table) begin
        checks++;
        if (slot.a !== COL_A[s] || slot.b !== COL_A[s] || slot.ctrl_c !== COL_CC[s]) begin
          failures++;
          $display("FAIL slot %0d differs from the 1111 x 1111 table", s);
        end
      end
      if (last_row) n_last_row++;
      if (last_slot) begin
        n_last_slot++;
        checks++;
        if (s != ref_n - 1) begin failures++; $display("FAIL last_slot at %0d", s); end
      end
      @(negedge clk);
    end
    checks++;
    if (busy || n_last_row != 2 * N || n_last_slot != 1 || ref_n != total_slots(N)) begin
      failures++;
      $display("FAIL end: busy=%0b last_row=%0d last_slot=%0d slots=%0d", busy, n_last_row,
               n_last_slot, ref_n);
    end
  endtask

  initial begin
    start = 0; op_a = '0; op_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (total_slots(N) != S) begin failures++; $display("FAIL total_slots"); end
    run('1, '1, 1'b1);
    for (int r = 0; r < 50; r++) run(N'($urandom), N'($urandom), 1'b0);
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
