// huff_rom: one Huffman code table (DC or AC, luminance or chrominance) as a ROM.
//
// Indexed by the JPEG symbol byte: for DC the SIZE category, for AC (RUNLENGTH << 4) | SIZE.
// Returns the code word right-aligned and its length (length 0 for a symbol not in the table).
// The contents are built at elaboration from the standard BITS/HUFFVAL lists of ITU-T T.81
// Annex K by the canonical code assignment in jpeg_pkg::huff_build; the design has four such
// ROMs but does not list their contents, so the Annex K tables are this design's choice.
// Combinational read.
module huff_rom
  import jpeg_pkg::*;
#(
  parameter htab_e TABLE = HT_AC_LUM
) (
  input  logic [7:0] sym,
  output hcode_t     code
);

  localparam htable_t ROM = huff_build(TABLE);

  assign code = hcode_t'(ROM[sym]);

endmodule
