// fa2: full adder used at the most significant bit of each block.
//
// The add-one logic needs the block's most significant C=0 sum bit to tell
// whether the whole block sum is all ones, so that sum sits on the block's
// critical path. This cell makes it fast: the sum is two levels of XOR and
// the carry is two levels of NAND (carry = NAND(NAND(a,b), NAND(a^b,cin))).
// The two XOR levels and two NAND levels are the published structure; the
// exact NAND arrangement and the true polarity at both ends are this
// design's reading. Purely combinational.
module fa2 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic sum_n,
  output logic cout
);
  logic p;      // first XOR level: propagate
  logic g_n;    // first NAND level: ~(a & b)
  logic t_n;    // first NAND level: ~(p & cin)

  always_comb begin
    p     = a ^ b;
    sum   = p ^ cin;
    sum_n = ~sum;
    g_n   = ~(a & b);
    t_n   = ~(p & cin);
    cout  = ~(g_n & t_n);
  end
endmodule
