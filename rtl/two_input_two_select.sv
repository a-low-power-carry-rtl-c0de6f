// two_input_two_select: one multiplexer that does the work of two.
//
// In a carry-select block with an add-one circuit, each bit k >= 1 needs
// two selections: the add-one picks sum_k or ~sum_k (control 1, from the
// first-zero chain), then the carry-select picks the C=0 or the C=1 result
// (control 2, the block carry-in). Both collapse into one 2:1 multiplexer
// steered by NAND(~control1, control2): with a = sum_k and b = ~sum_k the
// output is ~sum_k exactly when the carry-in is 1 and every lower C=0 sum
// bit is 1. The control 1 input is taken inverted (sel1_n), as the swapped
// first-zero chain supplies it. This merge is the published one.
// Purely combinational.
module two_input_two_select (
  input  logic a,       // chosen when the NAND is 1
  input  logic b,       // chosen when the NAND is 0
  input  logic sel1_n,  // inverted control 1
  input  logic sel2,    // control 2
  output logic y
);
  logic sel;

  always_comb begin
    sel = ~(sel1_n & sel2);
    y   = sel ? a : b;
  end
endmodule
