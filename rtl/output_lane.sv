// output_lane: collects the serial product leaving the self-cycling unit
// and presents it as a parallel word.
//
// The product bits are the sum outputs of the last row, least significant
// first (for 4x4: Sa0b0, Sa0b1, Sa0b2, Sa0b3, Sa1b3, Sa2b3, Sa3b3, Ca3b3).
// Each slot with bit_valid high shifts bit_in in at the top of a (2N-1)-bit
// shift register. With the final bit (last high) that bit and the register
// form the completed word, first bit at bit 0, which is copied to product;
// product holds until the next result, and done pulses for one cycle.
//
// The serial order follows the document; the parallel register and the
// done pulse are this design's own. Reset is synchronous, active low.
module output_lane #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bit_valid,
  input  logic           bit_in,
  input  logic           last,
  output logic [2*N-1:0] product,
  output logic           done
);

  logic [2*N-2:0] lane_q;
  logic [2*N-1:0] lane_d;

  assign lane_d = {bit_in, lane_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lane_q  <= '0;
      product <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (bit_valid) begin
        lane_q <= lane_d[2*N-1:1];
        if (last) begin
          product <= lane_d;
          done    <= 1'b1;
        end
      end
    end
  end

  // The final bit of a word is always a valid bit.
  always_ff @(posedge clk) begin
    if (rst_n)
      assert (!last || bit_valid) else $error("output_lane: last without bit_valid");
  end

endmodule
