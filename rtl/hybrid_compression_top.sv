// Hybrid test data decompression: dictionary decoder, compacted scan chains
// and response MISR, driven from a single tester input.
//
// The tester streams codewords on ate_si, one bit per clock while scan_en is
// high. The dictionary decoder turns each codeword into an M-bit scan slice
// and strobes slice_valid in the cycle of its last bit; in that cycle all M
// compacted scan chains shift once, slice bit i entering chain i. Chain
// outputs leaving at the same edge are folded into the MISR when misr_en is
// high. With scan_en low the decoder holds, and capture_en makes every scan
// cell capture its functional input func_d (the circuit under test's
// response). The test data of one pattern is thus delivered in exactly as
// many clocks as it has compressed bits.
//
// Each of the M chains is one compacted scan network (see
// compacted_scan_network) with its own stitching: CHAIN_SRC[c], CHAIN_INV[c]
// and SO_CELL[c] describe chain c, all with NCELLS cells (unused cells of a
// shorter chain can serve as dummy cells). By default every chain is the
// 13-cell, depth-5 example network.
// The circuit under test itself is outside this module: func_d carries its
// next-state values into the scan cells and cut_q carries the scan cell
// contents back to it, chain c's cells at [c].
//
// Defaults: M = 128 internal chains, 128 dictionary entries with 7-bit
// indices. DICT (the dictionary contents) is test-set specific and defaults to
// a placeholder table. misr_en lets the tester keep the scan cells' unknown
// power-up contents out of the signature during the first load.
module hybrid_compression_top
  import hdc_pkg::MAX_FANIN, hdc_pkg::SRC_CODE_W;
#(
  parameter int unsigned M         = 128,
  parameter int unsigned DICT_SIZE = 128,
  parameter int unsigned IDX_W     = 7,
  parameter logic [DICT_SIZE-1:0][M-1:0] DICT = (DICT_SIZE * M)'(hdc_pkg::placeholder_dict_flat(M, DICT_SIZE)),
  parameter int unsigned NCELLS    = hdc_pkg::EXAMPLE_NCELLS,
  parameter logic [M-1:0][NCELLS-1:0][MAX_FANIN-1:0][SRC_CODE_W-1:0] CHAIN_SRC =
    {M{hdc_pkg::EXAMPLE_SRC_PACKED}},
  parameter logic [M-1:0][NCELLS-1:0] CHAIN_INV = '0,
  parameter int unsigned SO_CELL [M] = '{default: hdc_pkg::EXAMPLE_SO_CELL},
  parameter logic [M-1:0] MISR_POLY = M'(128'h87)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         scan_en,     // tester bit valid on ate_si
  input  logic                         ate_si,      // single tester scan input
  input  logic                         capture_en,  // capture functional responses
  input  logic                         misr_en,     // compact chain outputs
  input  logic [M-1:0][NCELLS-1:0]     func_d,      // from the circuit under test
  output logic [M-1:0][NCELLS-1:0]     cut_q,       // scan cell contents, to the circuit
  output logic [M-1:0]                 signature,   // MISR contents
  output logic                         slice_valid, // chains shift this cycle
  output logic                         slice_from_dict
);

  logic [M-1:0] slice;
  logic [M-1:0] chain_out;

  dictionary_decoder #(.M(M), .DICT_SIZE(DICT_SIZE), .IDX_W(IDX_W), .DICT(DICT)) u_decoder (
    .clk, .rst_n, .bit_valid(scan_en), .ate_si,
    .slice, .slice_valid, .slice_from_dict
  );

  for (genvar c = 0; c < int'(M); c++) begin : g_chain
    compacted_scan_network #(
      .NCELLS(NCELLS), .SRC(CHAIN_SRC[c]), .INV(CHAIN_INV[c]), .SO_CELL(SO_CELL[c])
    ) u_chain (
      .clk,
      .shift_en  (slice_valid),
      .scan_in   (slice[c]),
      .capture_en(capture_en),
      .func_d    (func_d[c]),
      .q         (cut_q[c]),
      .scan_out  (chain_out[c])
    );
  end

  misr #(.W(M), .POLY(MISR_POLY)) u_misr (
    .clk, .rst_n,
    .en (slice_valid && misr_en),
    .d  (chain_out),
    .sig(signature)
  );

endmodule
