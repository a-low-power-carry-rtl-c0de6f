// tb_mirror_fa: exhaustive check that the output-inverter-free mirror
// adder gives the complements of the sum and carry of a+b+cin, and that it
// is self-dual (all inputs inverted gives the true sum and carry).
// Watchdog: 200 cycles.
module tb_mirror_fa;
  logic clk;
  logic a, b, cin, sum_n, cout_n;
  int   checks = 0, failures = 0;

  mirror_fa dut (.a(a), .b(b), .cin(cin), .sum_n(sum_n), .cout_n(cout_n));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int t;
      {a, b, cin} = 3'(v);
      @(posedge clk);
      t = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({~cout_n, ~sum_n} != 2'(t)) begin
        failures++;
        $display("FAIL %0d%0d%0d -> sum_n=%0d cout_n=%0d", a, b, cin, sum_n, cout_n);
      end
      // Self-duality: feed the complements, expect the true outputs.
      {a, b, cin} = ~3'(v);
      @(posedge clk);
      checks++;
      if ({cout_n, sum_n} != 2'(t)) begin
        failures++;
        $display("FAIL inverted inputs of %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
