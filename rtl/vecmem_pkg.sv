// Shared types for the conflict-free vector access design.
//
// map_kind_e selects how an out-of-order access unit extracts the "bank"
// number that its reorder buffers are indexed by:
//   MAP_XOR_MATCHED       : single processor, M = T modules, module number
//                           b_i = a_i XOR a_(s+i)  (the linear transformation
//                           of the matched single-processor memory)
//   MAP_BLOCK_INTERLEAVED : vector multiprocessor, the bank is the t-bit
//                           supermodule field a[c0+t-1:c0] of the
//                           block-interleaved storage scheme.
//   MAP_XOR_UNMATCHED     : single processor, M = T^2 modules, module number
//                           {a[y+t-1:y], a[t-1:0] XOR a[s+t-1:s]}; the bank
//                           is whichever t-bit half of it the sequences of
//                           the current stride walk through.
// mem_op_e is the direction of a stream access (vector load or store).
package vecmem_pkg;

  typedef enum logic [1:0] {
    MAP_XOR_MATCHED       = 2'd0,
    MAP_BLOCK_INTERLEAVED = 2'd1,
    MAP_XOR_UNMATCHED     = 2'd2
  } map_kind_e;

  typedef enum logic [0:0] {
    OP_LOAD  = 1'b0,
    OP_STORE = 1'b1
  } mem_op_e;

  // Position of the least significant set bit of a stride (the stride
  // family x, S = sigma * 2^x with sigma odd). A zero stride returns 31,
  // which every caller treats as "no reordering possible".
  function automatic int unsigned stride_family(input logic [31:0] stride);
    int unsigned x;
    x = 31;
    for (int i = 30; i >= 0; i--) begin
      if (stride[i]) x = i;
    end
    return x;
  endfunction

endpackage
