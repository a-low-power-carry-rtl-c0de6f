// tb_two_input_two_select: exhaustive check that the NAND-steered
// multiplexer equals the two-multiplexer cascade it replaces: first pick a
// (control 1 = 1) or b (control 1 = 0), then pick a (control 2 = 0) or the
// first result (control 2 = 1). Control 1 is applied inverted. Watchdog:
// 100 cycles.
module tb_two_input_two_select;
  logic clk;
  logic a, b, sel1_n, sel2, y;
  int   checks = 0, failures = 0;

  two_input_two_select dut (.a(a), .b(b), .sel1_n(sel1_n), .sel2(sel2), .y(y));

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
    for (int v = 0; v < 16; v++) begin
      logic sel1, first, exp_y;
      {a, b, sel1_n, sel2} = 4'(v);
      @(posedge clk);
      sel1  = ~sel1_n;
      first = sel1 ? a : b;
      exp_y = sel2 ? first : a;
      checks++;
      if (y != exp_y) begin
        failures++;
        $display("FAIL a=%0d b=%0d sel1=%0d sel2=%0d -> y=%0d", a, b, sel1, sel2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
