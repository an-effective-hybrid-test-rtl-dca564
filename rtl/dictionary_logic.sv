// Dictionary logic of the test data decompressor.
//
// A purely combinational look-up: the IDX_W-bit index carried by a codeword
// selects one of DICT_SIZE stored M-bit scan slices, which the decoder then
// drives onto the M internal scan chain inputs. The dictionary is built as
// combinational logic (a constant table, no storage and no clock), so the
// slice is available in the same cycle as the index.
//
// Interface: index (IDX_W bits) in, symbol (M bits) out; symbol bit i feeds
// scan chain i. An index at or above DICT_SIZE returns all zeros.
//
// Size: 128 entries with 7-bit indices, and M = 128 chains, as used for
// s13207. The entries themselves depend on the test set being compressed:
// they are the most frequent scan slices after don't-care merging, chosen
// offline, and are passed in through the DICT parameter. The default table
// is only a placeholder of distinct pseudo-random words (a 32-bit xorshift
// generator seeded by the entry number, see hdc_pkg); override DICT with the table
// produced for the actual test set.
module dictionary_logic #(
  parameter int unsigned M         = 128,
  parameter int unsigned DICT_SIZE = 128,
  parameter int unsigned IDX_W     = (DICT_SIZE > 1) ? $clog2(DICT_SIZE) : 1,
  parameter logic [DICT_SIZE-1:0][M-1:0] DICT = (DICT_SIZE * M)'(hdc_pkg::placeholder_dict_flat(M, DICT_SIZE))
) (
  input  logic [IDX_W-1:0] index,
  output logic [M-1:0]     symbol
);

  always_comb begin
    if (32'(index) < DICT_SIZE) symbol = DICT[index];
    else                        symbol = '0;
  end

endmodule
