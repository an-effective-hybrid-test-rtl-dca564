// Testbench for dictionary_logic.
//
// Instance u_tab gets a table built here from a 64-bit linear congruential
// generator and is read at every index, plus out-of-range indices of a
// 100-entry variant (u_small), which must return zero. Instance u_def keeps
// the default placeholder table, which is recomputed here from its
// definition (xorshift32 seeded per entry) and compared word for word.
module tb_dictionary_logic;

  localparam int unsigned M = 128, DS = 128, IW = 7;
  localparam int unsigned DS_SMALL = 100;

  function automatic logic [DS-1:0][M-1:0] lcg_table();
    logic [DS-1:0][M-1:0] t;
    logic [63:0] s = 64'd12345;
    for (int e = 0; e < DS; e++)
      for (int w = 0; w < M / 32; w++) begin
        s = s * 64'd6364136223846793005 + 64'd1442695040888963407;
        t[e][w*32 +: 32] = s[63:32];
      end
    return t;
  endfunction

  localparam logic [DS-1:0][M-1:0] TAB = lcg_table();

  // Reference for the placeholder table.
  function automatic logic [M-1:0] xs_word(int e);
    logic [M-1:0] w;
    logic [31:0] s = 32'h9E37_79B9 ^ (32'(e) * 32'h0100_0193);
    for (int k = 0; k < M / 32; k++) begin
      s ^= s << 13; s ^= s >> 17; s ^= s << 5;
      w[k*32 +: 32] = s;
    end
    return w;
  endfunction

  logic [IW-1:0] idx;
  logic [M-1:0]  sym_tab, sym_def, sym_small;
  int checks = 0, failures = 0;

  dictionary_logic #(.M(M), .DICT_SIZE(DS), .IDX_W(IW), .DICT(TAB)) u_tab (.index(idx), .symbol(sym_tab));
  dictionary_logic u_def (.index(idx), .symbol(sym_def));
  dictionary_logic #(.M(M), .DICT_SIZE(DS_SMALL), .IDX_W(IW), .DICT(TAB[DS_SMALL-1:0]))
    u_small (.index(idx), .symbol(sym_small));

  task automatic check(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s idx=%0d got=%h exp=%h", what, idx, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DS; i++) begin
      idx = IW'(i);
      #1;
      check("table", sym_tab, TAB[i]);
      check("placeholder", sym_def, xs_word(i));
      check("small", sym_small, (i < DS_SMALL) ? TAB[i] : '0);
    end
    // Entries must be distinct in the placeholder table.
    for (int i = 1; i < DS; i++) begin
      checks++;
      if (xs_word(i) == xs_word(i - 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
