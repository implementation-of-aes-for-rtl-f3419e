// aes_sbox: the AES byte-substitution look-up table, 256 entries of 8 bits.
//
// SubBytes is done by table look-up: the substitute of every byte value is
// stored in a 256x8 table and the input byte is the address. The table is
// filled at elaboration from aes_pkg::sbox_table(), which evaluates the S-box
// definition (GF(2^8) inverse followed by the affine map), so no list of
// constants is kept in the source. Purely combinational: dout follows din in
// the same cycle. A synthesis tool maps the constant table to LUTs or a ROM.
// The look-up-table form of SubBytes follows the published design; computing the
// table at elaboration is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);

  localparam sbox_table_t TABLE = sbox_table();

  assign dout = TABLE[din];

endmodule
