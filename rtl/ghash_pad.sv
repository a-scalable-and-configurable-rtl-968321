// Padding unit in front of the GHASH multiplier.
//
// GHASH works on whole 128-bit blocks. When the associated data A or the
// ciphertext C does not end on a block boundary, its last block must be
// completed with zeros; this unit keeps the first nbits bits of the block
// (the most significant ones) and clears the rest. With sel_len = 1 it
// instead forms the final GHASH block, the 64-bit bit length of A followed
// by the 64-bit bit length of C.
//
// Combinational. nbits is 1..128 (values 0 and above 128 are taken as 128).
module ghash_pad
  import aes_gcm_pkg::*;
(
  input  block_t      blk,
  input  logic [7:0]  nbits,
  input  logic        sel_len,
  input  logic [63:0] len_a,
  input  logic [63:0] len_c,
  output block_t      out
);

  block_t mask;

  always_comb begin
    if (nbits == 8'd0 || nbits >= 8'd128) mask = '1;
    else                                   mask = ~('1 >> nbits);
    out = sel_len ? {len_a, len_c} : (blk & mask);
  end

endmodule
