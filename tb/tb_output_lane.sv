// tb_output_lane: sends random 2N-bit words serially, LSB first, with
// random idle slots between bits, and checks that product equals the word
// in the cycle done pulses, that done pulses exactly once per word, and
// that product holds its value while the next word is shifted in.
module tb_output_lane;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic bit_valid, bit_in, last, done;
  logic [2*N-1:0] product, word, prev;
  int checks = 0, failures = 0, dones = 0;
  int cycles = 0;

  output_lane #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .bit_valid(bit_valid), .bit_in(bit_in),
                            .last(last), .product(product), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (rst_n && done) dones++;

  initial begin
    bit_valid = 0; bit_in = 0; last = 0; prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 100; w++) begin
      word = (2*N)'($urandom);
      for (int k = 0; k < 2 * N; k++) begin
        @(negedge clk);
        bit_valid = 0; last = 0;
        if ($urandom % 3 == 0) begin
          @(negedge clk);
        end
        checks++;
        if (done !== 1'b0 || product !== prev) begin
          failures++;
          $display("FAIL word %0d: product changed early (%h, prev %h, done %0b)", w, product, prev, done);
        end
        bit_valid = 1; bit_in = word[k]; last = (k == 2 * N - 1);
      end
      @(negedge clk);
      bit_valid = 0; last = 0;
      checks++;
      if (done !== 1'b1 || product !== word) begin
        failures++;
        $display("FAIL word %0d: product=%h expected %h done=%0b", w, product, word, done);
      end
      prev = word;
    end
    @(negedge clk);
    checks++;
    if (dones != 100) begin
      failures++;
      $display("FAIL %0d done pulses", dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
