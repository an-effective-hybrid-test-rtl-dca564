// Dictionary-based decoder: the complete test data decompressor.
//
// One serial tester input in, M parallel scan chain inputs out. The control
// logic (decoder_control) parses codewords of a 1-bit prefix and a tail; the
// dictionary logic (dictionary_logic) turns an index tail into its stored
// slice; a multiplexer picks the dictionary word or the uncompressed tail.
// The result is presented on slice with a one-cycle slice_valid strobe in
// the cycle of the codeword's last bit, so an index codeword costs 1+IDX_W
// clocks and a raw codeword 1+M clocks, with no further cycles per slice.
//
// Defaults are M = 128 chains, 128 dictionary entries and 7-bit indices.
// DICT carries the dictionary contents, which are specific to the test set.
module dictionary_decoder #(
  parameter int unsigned M         = 128,
  parameter int unsigned DICT_SIZE = 128,
  parameter int unsigned IDX_W     = 7,
  parameter logic [DICT_SIZE-1:0][M-1:0] DICT = (DICT_SIZE * M)'(hdc_pkg::placeholder_dict_flat(M, DICT_SIZE))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_valid,
  input  logic         ate_si,
  output logic [M-1:0] slice,
  output logic         slice_valid,
  output logic         slice_from_dict   // the current slice came from the dictionary
);

  logic [IDX_W-1:0] index;
  logic [M-1:0]     raw_slice, dict_word;
  logic             use_dict;

  decoder_control #(.M(M), .IDX_W(IDX_W)) u_ctrl (
    .clk, .rst_n, .bit_valid, .ate_si,
    .index, .raw_slice, .use_dict, .slice_valid
  );

  dictionary_logic #(.M(M), .DICT_SIZE(DICT_SIZE), .IDX_W(IDX_W), .DICT(DICT)) u_dict (
    .index, .symbol(dict_word)
  );

  assign slice           = use_dict ? dict_word : raw_slice;
  assign slice_from_dict = use_dict;

endmodule
