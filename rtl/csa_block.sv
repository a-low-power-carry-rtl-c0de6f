// csa_block: one carry-select block with a multiplexer-based add-one circuit.
//
// A conventional carry-select block adds its slice twice, once for each
// value of the incoming carry, and picks one result. Here only the C=0 sum
// is computed (rca_block); the C=1 sum is that value plus one, which is the
// C=0 sum with every bit inverted from the LSB up to the first zero. The
// first-zero chain marks those bits, and for each bit k >= 1 a single
// two_input_two_select cell chooses sum_k or ~sum_k from the chain's
// inverted control and the carry-in, merging the add-one multiplexer and
// the carry-select multiplexer. Bit 0 needs no chain: with carry-in 1 it is
// always inverted, so a plain multiplexer picks sum_0 or ~sum_0.
//
// Carry out: with carry-in 0 it is the RCA's carry. With carry-in 1 the
// block carries out when the RCA already does or when the C=0 sum is all
// ones (the chain's final node). The OR with the RCA carry is this design's
// choice: selecting the all-ones flag alone would drop the carry whenever
// the C=0 slice itself overflows (for example a = b = all ones).
//
// The chain's inv[0] is always 1 and is left unused: bit 0 needs no
// add-one control, so it gets a plain carry-select multiplexer.
//
// Interface: a, b slices, cin from the block below; s, cout out. Purely
// combinational; the carry-in reaches s and cout through one multiplexer.
module csa_block #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N-1:0] sum0, sum0_n;
  logic         cout0;
  logic [N-1:0] inv;
  logic         all_ones;
  logic         cout1;

  rca_block #(.N(N)) u_rca (
    .a(a), .b(b), .sum(sum0), .sum_n(sum0_n), .cout(cout0)
  );

  first_zero_chain #(.N(N)) u_fz (
    .sum(sum0), .inv(inv), .all_ones(all_ones)
  );

  // Bit 0: sum+1 always flips it.
  assign s[0] = cin ? sum0_n[0] : sum0[0];

  for (genvar k = 1; k < N; k++) begin : g_sel
    two_input_two_select u_sel (
      .a(sum0[k]), .b(sum0_n[k]), .sel1_n(inv[k]), .sel2(cin), .y(s[k])
    );
  end

  // Block carry for C=1, then the carry-select multiplexer.
  assign cout1 = cout0 | all_ones;
  assign cout  = cin ? cout1 : cout0;
endmodule
