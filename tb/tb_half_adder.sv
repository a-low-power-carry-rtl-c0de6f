// tb_half_adder: exhaustive check of the half adder against integer
// addition of its two input bits. A clock paces the vectors; a watchdog
// ends the run as a failure if it has not finished in 100 cycles.
module tb_half_adder;
  logic clk;
  logic a, b, sum, sum_n, cout;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .sum_n(sum_n), .cout(cout));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int exp_total;
      {a, b} = 2'(v);
      @(posedge clk);
      exp_total = int'(a) + int'(b);
      checks++;
      if ({cout, sum} != 2'(exp_total) || sum_n != ~sum) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> cout=%0d sum=%0d sum_n=%0d", a, b, cout, sum, sum_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
