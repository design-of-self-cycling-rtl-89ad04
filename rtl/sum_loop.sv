// sum_loop: the sum self-cycling path. It keeps the recent history of the
// unit's sum output and hands back, as the sum-in bit of the current slot,
// the sum produced exactly one row-length earlier, i.e. the partial sum of
// the same weight from the previous row.
//
// The history is a (2N-1)-bit shift register (hist[0] = sum of the previous
// slot). The loop delay is tap_len slots; it grows by one from row to row,
// because every row is one slot longer than the one before (row j lasts
// N+1+j slots), so the read tap is selectable. Controller S (ctrl_s = 0)
// forces the returned sum to 0: in the first row, which has no previous
// row, and in the carry-to-sum slot that closes each row.
//
// Following the document: sum out fed back as sum in, the zeroing
// controller S, delays that keep the whole product inside the loop. This
// design's own: the shift register with a selectable tap (the document gives
// the schedule, not how the loop length is realised), and the synchronous
// active-low reset. Timing: sin is combinational from tap_len, ctrl_s and
// the register; sum_out is sampled at every clock edge.
module sum_loop #(
  parameter int unsigned N = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    sum_out,
  input  logic [$clog2(2*N)-1:0]  tap_len,
  input  logic                    ctrl_s,
  output logic                    sin
);

  localparam int unsigned DEPTH = 2 * N - 1;

  logic [DEPTH-1:0] hist;

  always_comb begin
    sin = 1'b0;
    if (ctrl_s && tap_len != '0 && int'(tap_len) <= int'(DEPTH))
      sin = hist[tap_len - 1'b1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) hist <= '0;
    else        hist <= {hist[DEPTH-2:0], sum_out};
  end

endmodule
