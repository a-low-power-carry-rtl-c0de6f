// tb_rca_block: checks the block ripple-carry adder at every width the
// 64-bit adder uses (1 to 12 bits, covering both parities of the carry
// chain at the MSB). Widths up to 6 are checked exhaustively, wider ones
// with random operands plus the all-ones and carry-through corners.
// Expected values come from integer addition. Watchdog: 200000 cycles.
module tb_rca_block;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-width harness; each reports into the shared counters.
  logic [12:1] done;

  for (genvar W = 1; W <= 12; W++) begin : g_w
    logic [W-1:0] a, b, sum, sum_n;
    logic         cout;

    rca_block #(.N(W)) dut (.a(a), .b(b), .sum(sum), .sum_n(sum_n), .cout(cout));

    task automatic check();
      logic [W:0] exp_v;
      @(posedge clk);
      exp_v = {1'b0, a} + {1'b0, b};
      checks++;
      if ({cout, sum} != exp_v || sum_n != ~sum) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h -> cout=%0d sum=%h (exp %h)", W, a, b, cout, sum, exp_v);
      end
    endtask

    initial begin
      done[W] = 1'b0;
      if (W <= 6) begin
        for (int v = 0; v < (1 << (2 * W)); v++) begin
          {a, b} = (2 * W)'(v);
          check();
        end
      end else begin
        a = '1; b = '1; check();
        a = '1; b = '0; check();
        a = W'(1); b = '1; check();
        a = '0; b = '0; check();
        for (int i = 0; i < 3000; i++) begin
          a = W'($urandom);
          b = W'($urandom);
          check();
        end
      end
      done[W] = 1'b1;
    end
  end

  initial begin
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
