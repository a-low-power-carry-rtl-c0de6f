// rca_block: N-bit ripple-carry adder computing a block's C=0 result.
//
// Cell 0 is a half adder (the C=0 adder has no carry-in). Cells 1 .. N-2 are
// mirror full adders without output inverters (mirror_fa). Their carry path
// alternates polarity with no inverters in it: an odd cell takes the true
// carry and true operands and passes on ~carry; an even cell takes that
// ~carry with inverted operands and, the full adder being self-dual, passes
// on the true carry. The most significant cell is the fast fa2; when the
// carry reaching it is inverted (N odd) one inverter restores it. Every bit
// gives the sum and its complement, so the add-one logic needs no inverters
// of its own. For N = 1 the block is the half adder alone.
//
// The cell arrangement follows the described block (HA, FA' cells with even
// and odd polarity, FA2 on top); the operand inverters in front of the even
// cells and the inverter before fa2 are this design's way to keep the
// polarities consistent. Purely combinational.
module rca_block #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic [N-1:0] sum_n,
  output logic         cout
);
  // Carry as produced by each cell, in that cell's output polarity.
  logic [N-1:0] c_raw;

  half_adder u_ha (
    .a(a[0]), .b(b[0]), .sum(sum[0]), .sum_n(sum_n[0]), .cout(c_raw[0])
  );

  if (N == 1) begin : g_one
    assign cout = c_raw[0];
  end else begin : g_many
    for (genvar k = 1; k + 1 < N; k++) begin : g_cell
      logic o_sum, o_cout;
      if (k % 2 == 1) begin : g_odd
        // True carry in; outputs are ~sum and ~carry.
        mirror_fa u_fa (.a(a[k]), .b(b[k]), .cin(c_raw[k-1]),
                        .sum_n(o_sum), .cout_n(o_cout));
        assign sum[k]   = ~o_sum;
        assign sum_n[k] = o_sum;
      end else begin : g_even
        // Inverted carry in, inverted operands; outputs are sum and carry.
        mirror_fa u_fa (.a(~a[k]), .b(~b[k]), .cin(c_raw[k-1]),
                        .sum_n(o_sum), .cout_n(o_cout));
        assign sum[k]   = o_sum;
        assign sum_n[k] = ~o_sum;
      end
      assign c_raw[k] = o_cout;
    end

    // Carry into the MSB cell in true polarity: cell N-2 emits ~carry when
    // it is an odd FA' cell.
    logic c_top;
    if ((N >= 3) && ((N - 2) % 2 == 1)) begin : g_inv
      assign c_top = ~c_raw[N-2];
    end else begin : g_true
      assign c_top = c_raw[N-2];
    end

    fa2 u_fa2 (
      .a(a[N-1]), .b(b[N-1]), .cin(c_top),
      .sum(sum[N-1]), .sum_n(sum_n[N-1]), .cout(c_raw[N-1])
    );
    assign cout = c_raw[N-1];
  end
endmodule
