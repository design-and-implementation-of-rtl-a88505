// tb_gdi_full_adder: exhaustive check of the one-bit full adder. All eight
// input combinations are applied, one per clock, and {cout, sum} is compared
// with the arithmetic sum a + b + cin. A watchdog ends the run with a
// failure if it has not finished within 100 cycles.
module tb_gdi_full_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, cin, sum, cout;
  int   checks   = 0;
  int   failures = 0;

  gdi_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, cin} = 3'(v);
      @(posedge clk);
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
