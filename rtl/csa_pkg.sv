// csa_pkg: constants shared by the square-root carry-select adder.
//
// The 64-bit adder is cut into ten blocks whose widths grow from the least
// significant end (2,2,3,4,6,7,8,9,11,12), so that every block's local sum
// is ready at about the time the carry from below arrives. These widths are
// the ones of the square-root block plan the design follows; block 1 (index 0
// here) is a plain ripple-carry adder, the others are carry-select blocks.
// blk_offset() gives the bit position of a block's least significant bit.
package csa_pkg;

  localparam int unsigned NUM_BLOCKS = 10;

  typedef int unsigned size_list_t [NUM_BLOCKS];

  // Block widths, least significant block first.
  localparam size_list_t BLOCK_SIZES = '{2, 2, 3, 4, 6, 7, 8, 9, 11, 12};

  // Sum of the widths of blocks 0 .. idx-1.
  function automatic int unsigned blk_offset(size_list_t sizes, int unsigned idx);
    int unsigned off = 0;
    for (int unsigned i = 0; i < idx; i++) off += sizes[i];
    return off;
  endfunction

  // Total width of all blocks.
  function automatic int unsigned total_width(size_list_t sizes);
    return blk_offset(sizes, NUM_BLOCKS);
  endfunction

endpackage
