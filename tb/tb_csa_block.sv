// tb_csa_block: checks one carry-select block against integer addition
// a + b + cin. The 4-bit block is checked exhaustively (all 512 input
// combinations); blocks of every other width the 64-bit adder uses (2, 3,
// 6, 7, 8, 9, 11, 12) get their corners (all-ones sum, slice overflow with
// carry-in, zero) and random operands. Watchdog: 100000 cycles.
module tb_csa_block;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NW = 9;
  localparam int WIDTHS [NW] = '{4, 2, 3, 6, 7, 8, 9, 11, 12};
  logic [NW-1:0] done;

  for (genvar i = 0; i < NW; i++) begin : g_w
    localparam int W = WIDTHS[i];
    logic [W-1:0] a, b, s;
    logic         cin, cout;

    csa_block #(.N(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

    task automatic check();
      logic [W:0] exp_v;
      @(posedge clk);
      exp_v = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      checks++;
      if ({cout, s} != exp_v) begin
        failures++;
        $display("FAIL N=%0d a=%h b=%h cin=%0d -> cout=%0d s=%h (exp %h)",
                 W, a, b, cin, cout, s, exp_v);
      end
    endtask

    initial begin
      done[i] = 1'b0;
      if (W == 4) begin
        for (int v = 0; v < 512; v++) begin
          {cin, a, b} = (2*W+1)'(v);
          check();
        end
      end else begin
        for (int c = 0; c < 2; c++) begin
          cin = c[0];
          a = '1; b = '0; check();   // C=0 sum all ones
          a = '1; b = '1; check();   // slice overflows by itself
          a = '1; b = W'(1); check();
          a = '0; b = '0; check();
          a = W'(5); b = ~W'(5); check();
        end
        for (int k = 0; k < 2000; k++) begin
          a = W'($urandom); b = W'($urandom); cin = 1'($urandom);
          check();
        end
      end
      done[i] = 1'b1;
    end
  end

  initial begin
    #1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
