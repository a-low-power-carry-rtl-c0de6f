// tb_fa2: exhaustive check of the XOR/NAND full adder against integer
// addition. Watchdog: 100 cycles.
module tb_fa2;
  logic clk;
  logic a, b, cin, sum, sum_n, cout;
  int   checks = 0, failures = 0;

  fa2 dut (.a(a), .b(b), .cin(cin), .sum(sum), .sum_n(sum_n), .cout(cout));

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
    for (int v = 0; v < 8; v++) begin
      int t;
      {a, b, cin} = 3'(v);
      @(posedge clk);
      t = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} != 2'(t) || sum_n != ~sum) begin
        failures++;
        $display("FAIL %0d%0d%0d -> cout=%0d sum=%0d sum_n=%0d", a, b, cin, cout, sum, sum_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
