// first_zero_chain: finds the first zero of a block's C=0 sum, from the LSB.
//
// Adding one to a number inverts its bits from the least significant one up
// to and including the first zero. The chain walks the C=0 sum bits from the
// LSB; inv[k] is 1 while no zero has been met below bit k, i.e. when
// sum[k-1:0] is all ones, and so marks the bits the add-one must invert
// (inv[0] is always 1). In the circuit this is a chain of series pass
// transistors gated by the sum bits, with its supply and ground swapped so
// that it produces these inverted controls directly. all_ones is the value
// past the last bit: the C=0 sum is all ones, the case in which adding one
// carries out of the block. The chain, its swapped supplies and the use of
// its last node as the add-one carry follow the published circuit. Modelling
// the pass transistors as a ripple of AND gates, and leaving out the buffer
// (inverter pair) the circuit places midway along the chain, are this
// model's choices. Purely combinational.
module first_zero_chain #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] sum,
  output logic [N-1:0] inv,
  output logic         all_ones
);
  // node[k]: no zero among sum[k-1:0].
  logic [N:0] node;

  assign node[0] = 1'b1;
  for (genvar k = 0; k < N; k++) begin : g_link
    assign node[k+1] = node[k] & sum[k];
  end

  assign inv      = node[N-1:0];
  assign all_ones = node[N];
endmodule
