// mirror_fa: mirror full adder with its output inverters removed (FA').
//
// A static CMOS mirror adder forms the complement of carry-out first and
// the complement of the sum from it; leaving out the two output inverters
// gives this cell, whose outputs are ~sum and ~cout. Because a full adder is
// self-dual (inverting all three inputs inverts both outputs), a chain of
// these cells can alternate between true and inverted polarity with no
// inverter in the carry path; rca_block does that. Only the logic function
// is modelled here, not the transistor network. Purely combinational.
module mirror_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum_n,
  output logic cout_n
);
  always_comb begin
    // Mirror adder: complement of majority, then complement of sum built
    // from it as in the classic 24-transistor cell.
    cout_n = ~((a & b) | (cin & (a | b)));
    sum_n  = ~((a & b & cin) | (cout_n & (a | b | cin)));
  end
endmodule
