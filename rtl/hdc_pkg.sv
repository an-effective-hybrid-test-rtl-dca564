// Shared types and constants of the hybrid test data decompression design.
//
// The design feeds one serial tester bit per clock into a dictionary
// decoder, which turns fixed-format codewords into m-bit scan slices that are
// shifted into m compacted scan chains at once; chain outputs are folded into
// a MISR. This package holds the decoder's FSM encoding and the codes used to
// describe how a compacted scan network is stitched together.
package hdc_pkg;

  // Codeword prefix values. A codeword is a 1-bit prefix followed by a tail:
  // an index into the dictionary or an uncompressed m-bit slice.
  localparam logic PREFIX_RAW   = 1'b0;
  localparam logic PREFIX_INDEX = 1'b1;

  // States of the decoder control FSM (this design's own encoding).
  typedef enum logic [1:0] {
    ST_PREFIX = 2'd0,  // next bit is a codeword prefix
    ST_INDEX  = 2'd1,  // collecting the dictionary index tail
    ST_RAW    = 2'd2   // collecting the uncompressed slice tail
  } dec_state_t;

  // Source codes for a scan cell input in a compacted scan network. A cell
  // lists up to three sources; a non-negative code is the index of another
  // cell of the same network, SRC_SI is the network's scan-in pin and
  // SRC_NONE marks an unused XOR input.
  localparam int SRC_SI   = -1;
  localparam int SRC_NONE = -2;
  localparam int MAX_FANIN = 3;

  // Stitching of the 13-cell example network (cells F1..F13 are indices
  // 0..12; see compacted_scan_network): five groups {F2,F6,F10,F11,F12},
  // {F3,F5,F9}, {F7,F8,F13}, {F4}, {F1}, scan depth 5, two 3-input XORs.
  localparam int EXAMPLE_NCELLS = 13;
  typedef int example_src_t [EXAMPLE_NCELLS][MAX_FANIN];
  localparam example_src_t EXAMPLE_SRC = '{
    '{3,        SRC_NONE, SRC_NONE},   // F1  <- F4
    '{SRC_SI,   SRC_NONE, SRC_NONE},   // F2  <- scan-in
    '{9,        SRC_NONE, SRC_NONE},   // F3  <- F10
    '{12,       6,        7       },   // F4  <- F13 ^ F7 ^ F8
    '{10,       5,        1       },   // F5  <- F11 ^ F6 ^ F2
    '{SRC_SI,   SRC_NONE, SRC_NONE},   // F6  <- scan-in
    '{8,        SRC_NONE, SRC_NONE},   // F7  <- F9
    '{2,        SRC_NONE, SRC_NONE},   // F8  <- F3
    '{11,       SRC_NONE, SRC_NONE},   // F9  <- F12
    '{SRC_SI,   SRC_NONE, SRC_NONE},   // F10 <- scan-in
    '{SRC_SI,   SRC_NONE, SRC_NONE},   // F11 <- scan-in
    '{SRC_SI,   SRC_NONE, SRC_NONE},   // F12 <- scan-in
    '{4,        SRC_NONE, SRC_NONE}    // F13 <- F5
  };
  localparam int EXAMPLE_SO_CELL = 0;      // F1 drives scan-out

  // Packed form of a source code, for per-chain tables at the top level:
  // the code's low 16 bits (SRC_SI = 16'hFFFF, SRC_NONE = 16'hFFFE).
  localparam int SRC_CODE_W = 16;
  typedef logic [SRC_CODE_W-1:0] src_code_t;

  function automatic logic [EXAMPLE_NCELLS-1:0][MAX_FANIN-1:0][SRC_CODE_W-1:0] pack_example_src();
    logic [EXAMPLE_NCELLS-1:0][MAX_FANIN-1:0][SRC_CODE_W-1:0] p;
    for (int i = 0; i < EXAMPLE_NCELLS; i++)
      for (int k = 0; k < MAX_FANIN; k++)
        p[i][k] = SRC_CODE_W'(EXAMPLE_SRC[i][k]);
    return p;
  endfunction
  localparam logic [EXAMPLE_NCELLS-1:0][MAX_FANIN-1:0][SRC_CODE_W-1:0] EXAMPLE_SRC_PACKED =
    pack_example_src();

  // Placeholder dictionary contents, used only when no test-set specific
  // table is supplied: bit b of entry e is bit (b mod 32) of the
  // (b div 32 + 1)-th output of a xorshift32 generator seeded with
  // 0x9E3779B9 ^ (e * 0x01000193).
  function automatic logic placeholder_dict_bit(int unsigned e, int unsigned b);
    logic [31:0] s;
    s = 32'h9E37_79B9 ^ (32'(e) * 32'h0100_0193);
    for (int unsigned k = 0; k <= b / 32; k++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
    end
    return s[b % 32];
  endfunction

  // The placeholder table as one flat vector, entry e at bits [e*M +: M],
  // usable as a parameter default. It covers up to PLACEHOLDER_MAX_BITS bits
  // (128 entries of 128 bits); larger tables get zero entries beyond that and
  // are expected to be supplied explicitly anyway.
  localparam int unsigned PLACEHOLDER_MAX_BITS = 16384;

  function automatic logic [PLACEHOLDER_MAX_BITS-1:0] placeholder_dict_flat(
      int unsigned m, int unsigned dict_size);
    logic [PLACEHOLDER_MAX_BITS-1:0] v;
    for (int unsigned k = 0; k < PLACEHOLDER_MAX_BITS; k++)
      v[k] = (k / m < dict_size) ? placeholder_dict_bit(k / m, k % m) : 1'b0;
    return v;
  endfunction

endpackage
