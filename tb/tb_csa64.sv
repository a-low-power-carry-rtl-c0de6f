// tb_csa64: end-to-end check of the 64-bit square-root carry-select adder
// at its default block plan. Every result is compared with a 65-bit integer
// addition. Stimuli: the worst-case carry path (bit 0 generates, every
// other bit propagates, so the carry crosses every block), all-ones and
// zero corners, one carry generated at the bottom of each block, and
// random operands with biased patterns that make long runs of ones.
//
// Besides the sums, the bench works out from the operands, for every
// carry-select block, which mechanism decided its result, and counts each:
//   sel0      carry-in 0: the C=0 result passes through
//   addone    carry-in 1 and the add-one inverts more than bit 0
//   allones   carry-in 1 and the C=0 sum is all ones (block carries out
//             through the first-zero chain)
//   ovf_cin1  carry-in 1 and the C=0 slice overflows by itself
//   worst     worst-case carry propagation from bit 0 to bit 63
// A mechanism that never occurs counts as a failure. The adder is
// combinational; one vector is applied per clock. Watchdog: 100000 cycles.
module tb_csa64;
  import csa_pkg::*;

  localparam int unsigned W = total_width(BLOCK_SIZES);

  logic clk;
  logic [W-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;
  int n_sel0 = 0, n_addone = 0, n_allones = 0, n_ovf = 0, n_worst = 0;

  csa64 dut (.a(a), .b(b), .s(s), .cout(cout));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify what each carry-select block does for the current operands.
  function automatic void classify(logic [W-1:0] x, logic [W-1:0] y);
    for (int unsigned i = 1; i < NUM_BLOCKS; i++) begin
      int unsigned off = blk_offset(BLOCK_SIZES, i);
      int unsigned bw  = BLOCK_SIZES[i];
      logic [W:0] low, slice;
      logic [W:0] mask_lo, mask_bw;
      logic c_in;
      mask_lo = ({{W{1'b0}}, 1'b1} << off) - 1;
      mask_bw = ({{W{1'b0}}, 1'b1} << bw) - 1;
      low   = ({1'b0, x} & mask_lo) + ({1'b0, y} & mask_lo);
      c_in  = low[off];
      slice = (({1'b0, x} >> off) & mask_bw) + (({1'b0, y} >> off) & mask_bw);
      if (!c_in) n_sel0++;
      else begin
        if (slice[0]) n_addone++;
        if ((slice & mask_bw) == mask_bw) n_allones++;
        if (slice[bw]) n_ovf++;
      end
    end
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0] exp_v;
    a = x;
    b = y;
    @(posedge clk);
    exp_v = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, s} != exp_v) begin
      failures++;
      $display("FAIL a=%h b=%h -> cout=%0d s=%h (exp %0d %h)", x, y, cout, s, exp_v[W], exp_v[W-1:0]);
    end
    classify(x, y);
  endtask

  initial begin
    logic [W-1:0] x, y, m;

    // Worst case: a0 = b0 = 1, a_n XOR b_n = 1 elsewhere.
    for (int k = 0; k < 200; k++) begin
      m = {$urandom, $urandom};
      x = m | W'(1);
      y = ~m | W'(1);
      apply(x, y);
      if (s == '0 && cout) n_worst++;
    end

    apply('1, '1);
    apply('1, W'(1));
    apply('1, '0);
    apply('0, '0);
    apply({1'b0, {(W-1){1'b1}}}, W'(1));

    // A carry generated at the bottom of each block, all ones above.
    for (int unsigned i = 0; i < NUM_BLOCKS; i++) begin
      automatic int unsigned off = blk_offset(BLOCK_SIZES, i);
      x = '1 << off;
      apply(x, x);
      apply(x, ~x | (W'(1) << off));
    end

    // Random operands, plain and with long runs of ones.
    for (int k = 0; k < 20000; k++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      if (k % 3 == 1) y = ~x ^ ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
      if (k % 3 == 2) begin
        x = x | {$urandom, $urandom};
        y = y | {$urandom, $urandom};
      end
      apply(x, y);
    end

    $display("mechanisms: sel0=%0d addone=%0d allones=%0d ovf_cin1=%0d worst=%0d",
             n_sel0, n_addone, n_allones, n_ovf, n_worst);
    checks++;
    if (n_sel0 == 0)    begin failures++; $display("FAIL carry-in 0 selection never happened"); end
    checks++;
    if (n_addone == 0)  begin failures++; $display("FAIL add-one inversion never happened"); end
    checks++;
    if (n_allones == 0) begin failures++; $display("FAIL all-ones carry never happened"); end
    checks++;
    if (n_ovf == 0)     begin failures++; $display("FAIL overflow with carry-in 1 never happened"); end
    checks++;
    if (n_worst == 0)   begin failures++; $display("FAIL worst-case carry path never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
