// csa64: 64-bit square-root carry-select adder with add-one blocks.
//
// s = a + b (no carry-in; cout is the carry out of bit 63). The word is
// cut into NUM_BLOCKS blocks whose widths grow from the LSB (2,2,3,4,6,7,
// 8,9,11,12 by default), so that each block's local C=0 sum and C=1
// selection are ready as the carry from below arrives. Block 0 is a plain
// ripple-carry adder (rca_block, half adder at the bottom); every other
// block is a csa_block, which computes one C=0 sum and derives the C=1 sum
// with the first-zero add-one logic. The block carries form the only
// chain across the word: one multiplexer per block.
//
// The block plan follows the square-root plan the design uses; the
// parameters allow other plans (each entry of BLOCK_SIZE >= 1) and WIDTH is
// derived from them. Purely combinational.
module csa64
  import csa_pkg::*;
#(
  parameter size_list_t  BLOCK_SIZE = csa_pkg::BLOCK_SIZES,
  localparam int unsigned WIDTH     = csa_pkg::total_width(BLOCK_SIZE)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  // carry[i]: carry into block i; carry[NUM_BLOCKS] is the adder's carry out.
  logic [NUM_BLOCKS:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < NUM_BLOCKS; i++) begin : g_blk
    localparam int unsigned OFF = blk_offset(BLOCK_SIZE, i);
    localparam int unsigned W   = BLOCK_SIZE[i];

    if (i == 0) begin : g_rca
      // Lowest block: the adder has no carry-in, so the C=0 sum is final.
      logic [W-1:0] sum_n_unused;
      rca_block #(.N(W)) u_rca (
        .a(a[OFF +: W]), .b(b[OFF +: W]),
        .sum(s[OFF +: W]), .sum_n(sum_n_unused), .cout(carry[1])
      );
    end else begin : g_csa
      csa_block #(.N(W)) u_csa (
        .a(a[OFF +: W]), .b(b[OFF +: W]), .cin(carry[i]),
        .s(s[OFF +: W]), .cout(carry[i+1])
      );
    end
  end

  assign cout = carry[NUM_BLOCKS];
endmodule
