// Compacted scan chain network.
//
// The scan cells of a full-scan circuit are grouped so that all cells of a
// group always receive the same test bit (direct compatibility) or the
// opposite bit (inverse compatibility). Each group then occupies one scan
// slice, and the network is only as deep as the number of groups. Groups are
// stitched together with two mechanisms:
//   * expansion: a fan-out from one cell (or the scan-in pin) to several
//     cells of the next, larger group;
//   * compaction: an XOR gate with an odd number of inputs merging cells of a
//     larger group into one cell of the next, smaller group. Since the XOR's
//     inputs all carry the same bit during shifting, an odd input count
//     passes that bit on unchanged.
// An inverse-compatible cell gets an inverter on each side (its stored value
// is the complement, and the complement is undone on the way out), so it
// behaves like a direct-compatible one.
//
// The stitching is described by parameters. For cell i, SRC[i][0..2] name
// up to three sources, each a 16-bit two's-complement code: another cell's
// index, hdc_pkg::SRC_SI (-1) for the scan-in pin, or hdc_pkg::SRC_NONE (-2)
// for an unused XOR input. hdc_pkg::EXAMPLE_SRC shows the table in readable
// form; hdc_pkg::EXAMPLE_SRC_PACKED is the same table as this parameter
// takes it. One source is a plain
// wire, three form a 3-input XOR. INV bit i marks an inverse-compatible cell,
// SO_CELL is the cell that drives scan-out.
//
// The default is the 13-cell example network hdc_pkg::EXAMPLE_SRC (cells
// F1..F13 are indices 0..12): scan-in fans out to {F11, F6, F2, F12, F10}; F11^F6^F2 feeds F5,
// F12 feeds F9, F10 feeds F3; then F5->F13, F9->F7, F3->F8; F13^F7^F8 feeds
// F4, F4 feeds F1, and F1 drives scan-out. Its depth is 5 instead of 13.
//
// Each cell is a mux-D scan flip-flop: with shift_en high it loads from the
// network, otherwise with capture_en high it captures its functional input
// func_d[i], otherwise it holds. shift_en has priority. Scan cells have no
// reset (they belong to the circuit under test and are filled by shifting).
// q[i] is the cell's stored value, which is what the circuit under test
// sees; scan_out is combinational from the last cell.
//
// The grouping, the fan-out / odd-XOR stitching, the inverter pairs and the
// example network follow the compaction method; the parameter encoding of the
// stitching, the 3-input limit on XORs and the scan cell type are this
// design's own.
module compacted_scan_network
  import hdc_pkg::SRC_SI, hdc_pkg::SRC_NONE, hdc_pkg::MAX_FANIN, hdc_pkg::SRC_CODE_W;
#(
  parameter int unsigned NCELLS = hdc_pkg::EXAMPLE_NCELLS,
  parameter logic [NCELLS-1:0][MAX_FANIN-1:0][SRC_CODE_W-1:0] SRC = hdc_pkg::EXAMPLE_SRC_PACKED,
  parameter logic [NCELLS-1:0] INV = '0,
  parameter int unsigned SO_CELL = hdc_pkg::EXAMPLE_SO_CELL
) (
  input  logic              clk,
  input  logic              shift_en,
  input  logic              scan_in,
  input  logic              capture_en,
  input  logic [NCELLS-1:0] func_d,
  output logic [NCELLS-1:0] q,
  output logic              scan_out
);

  logic [NCELLS-1:0] sc;   // stored values (complemented for INV cells)
  logic [NCELLS-1:0] val;    // test value each cell carries on the scan path
  logic [NCELLS-1:0] net_d;  // next value from the network

  // Source code of input k of cell i, sign-extended back to an int.
  function automatic int src(int i, int k);
    return int'($signed(SRC[i][k]));
  endfunction

  for (genvar i = 0; i < int'(NCELLS); i++) begin : g_cell
    assign val[i] = sc[i] ^ INV[i];

    always_comb begin
      logic x;
      x = 1'b0;
      for (int k = 0; k < MAX_FANIN; k++) begin
        if (src(i, k) == SRC_SI)       x = x ^ scan_in;
        else if (src(i, k) >= 0)       x = x ^ val[src(i, k)];
      end
      net_d[i] = x ^ INV[i];
    end

    always_ff @(posedge clk) begin
      if (shift_en)        sc[i] <= net_d[i];
      else if (capture_en) sc[i] <= func_d[i];
    end

    // Compaction XORs must have an odd number of inputs, and every source
    // must be the scan-in pin or a cell of this network.
    initial begin
      automatic int n = 0;
      for (int k = 0; k < MAX_FANIN; k++) begin
        if (src(i, k) != SRC_NONE) n++;
        assert (src(i, k) == SRC_NONE || src(i, k) == SRC_SI ||
                (src(i, k) >= 0 && src(i, k) < int'(NCELLS)))
          else $error("compacted_scan_network: cell %0d has an invalid source", i);
      end
      assert (n % 2 == 1)
        else $error("compacted_scan_network: cell %0d has an even number of sources", i);
    end
  end

  // Expanding fan-out from the scan-in pin must have an odd number of
  // branches.
  initial begin
    automatic int fan = 0;
    for (int i = 0; i < int'(NCELLS); i++)
      for (int k = 0; k < MAX_FANIN; k++)
        if (src(i, k) == SRC_SI) fan++;
    assert (fan % 2 == 1)
      else $error("compacted_scan_network: scan-in fans out to an even number of cells");
  end

  assign q        = sc;
  assign scan_out = val[SO_CELL];

endmodule
