// tb_maj_full_adder: exhaustive check of the majority-gate bit slice.
// All 16 input combinations are applied; ab must equal a AND b and
// {cout, sum} must equal the arithmetic sum (a AND b) + cin + sin.
module tb_maj_full_adder;
  logic a, b, cin, sin, ab, sum, cout;
  int checks = 0, failures = 0;

  maj_full_adder dut (.a(a), .b(b), .cin(cin), .sin(sin), .ab(ab), .sum(sum), .cout(cout));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [1:0] expect_sc;
      {a, b, cin, sin} = 4'(v);
      #1;
      expect_sc = 2'(int'(a & b) + int'(cin) + int'(sin));
      checks++;
      if (ab !== (a & b) || {cout, sum} !== expect_sc) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b sin=%0b: ab=%0b cout=%0b sum=%0b", a, b, cin, sin, ab, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
