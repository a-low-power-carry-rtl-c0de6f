// half_adder: least significant cell of every block ripple-carry adder.
//
// A block's C=0 adder has no carry-in, so its bit 0 only needs a half adder.
// Besides sum and carry it gives the complement of the sum, which the
// add-one logic uses for bit 0 (bit 0 of a+b+1 is always the complement of
// bit 0 of a+b). The design only names this cell; XOR and AND are the
// plain realisation. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic sum_n,
  output logic cout
);
  always_comb begin
    sum   = a ^ b;
    sum_n = ~sum;
    cout  = a & b;
  end
endmodule
