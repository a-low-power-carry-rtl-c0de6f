// tb_first_zero_chain: for every 8-bit sum and every 4-bit sum, checks
// that inv[k] is 1 exactly when bits k-1..0 are all ones, and that
// all_ones flags an all-ones input. Also checks the add-one identity the
// chain serves: sum XOR inv equals sum+1 in the low bits. Watchdog: 2000
// cycles.
module tb_first_zero_chain;
  logic clk;
  int   checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] s8, inv8;
  logic       all8;
  logic [3:0] s4, inv4;
  logic       all4;

  first_zero_chain #(.N(8)) dut8 (.sum(s8), .inv(inv8), .all_ones(all8));
  first_zero_chain #(.N(4)) dut4 (.sum(s4), .inv(inv4), .all_ones(all4));

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [7:0] exp_inv;
      logic [8:0] inc;
      s8 = 8'(v);
      s4 = 4'(v);
      @(posedge clk);
      // Independent reference: count trailing ones.
      exp_inv = '0;
      for (int k = 0; k < 8; k++) begin
        bit ones;
        ones = 1'b1;
        for (int j = 0; j < k; j++) if (!s8[j]) ones = 1'b0;
        exp_inv[k] = ones;
      end
      inc = {1'b0, s8} + 9'd1;
      checks++;
      if (inv8 != exp_inv || all8 != (s8 == 8'hFF)) begin
        failures++;
        $display("FAIL N=8 sum=%b inv=%b all=%0d", s8, inv8, all8);
      end
      checks++;
      if ((s8 ^ inv8) != inc[7:0] || all8 != inc[8]) begin
        failures++;
        $display("FAIL add-one N=8 sum=%b", s8);
      end
      checks++;
      if (inv4 != exp_inv[3:0] || all4 != (s4 == 4'hF)) begin
        failures++;
        $display("FAIL N=4 sum=%b inv=%b all=%0d", s4, inv4, all4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
