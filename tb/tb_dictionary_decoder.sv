// Testbench for dictionary_decoder.
//
// Part 1 (u_big, 128 chains, 128 entries, 7-bit index): a random stream of
// index and raw codewords, the dictionary filled here from a linear
// congruential generator. Every slice must equal the dictionary word or the
// raw tail, slice_from_dict must tell which, and the stream must take one
// clock per bit with no extra cycles.
// Part 2 (u_small, 8 chains, 4 entries, 2-bit index): the small worked
// example of the scheme: six different 8-bit slices, the first four in the
// dictionary. They encode to 4 x 3 + 2 x 9 = 30 bits and must be delivered
// in 30 clocks.
module tb_dictionary_decoder;

  localparam int unsigned M = 128, DS = 128, IW = 7;
  localparam int NWORDS = 300;

  function automatic logic [DS-1:0][M-1:0] lcg_table();
    logic [DS-1:0][M-1:0] t;
    logic [63:0] s = 64'd777;
    for (int e = 0; e < DS; e++)
      for (int w = 0; w < M / 32; w++) begin
        s = s * 64'd6364136223846793005 + 64'd1442695040888963407;
        t[e][w*32 +: 32] = s[63:32];
      end
    return t;
  endfunction
  localparam logic [DS-1:0][M-1:0] TAB = lcg_table();

  localparam logic [5:0][7:0] SYMS = {8'h3C, 8'hF0, 8'h81, 8'h5A, 8'h0F, 8'hA5}; // SYMS[0] = A5
  localparam logic [3:0][7:0] SMALL_TAB = SYMS[3:0];

  logic clk = 0, rst_n = 0;
  logic bv_b = 0, si_b = 0, bv_s = 0, si_s = 0;
  logic [M-1:0] slice_b;
  logic [7:0]   slice_s;
  logic sv_b, sd_b, sv_s, sd_s;
  int checks = 0, failures = 0;
  int clk_b = 0, bits_b = 0, n_dict = 0, n_raw = 0, clk_s = 0, strobes_s = 0;

  dictionary_decoder #(.M(M), .DICT_SIZE(DS), .IDX_W(IW), .DICT(TAB)) u_big (
    .clk, .rst_n, .bit_valid(bv_b), .ate_si(si_b),
    .slice(slice_b), .slice_valid(sv_b), .slice_from_dict(sd_b));

  dictionary_decoder #(.M(8), .DICT_SIZE(4), .IDX_W(2), .DICT(SMALL_TAB)) u_small (
    .clk, .rst_n, .bit_valid(bv_s), .ate_si(si_s),
    .slice(slice_s), .slice_valid(sv_s), .slice_from_dict(sd_s));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (bv_b) clk_b++;
    if (bv_s) clk_s++;
    if (sv_s) strobes_s++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic big_bit(logic b, logic last, logic dict, logic [M-1:0] exp);
    @(negedge clk);
    bv_b = 1; si_b = b; bits_b++;
    #1;
    check("big strobe", sv_b == last);
    if (last) begin
      check("big source flag", sd_b == dict);
      check("big slice", slice_b == exp);
    end
  endtask

  task automatic small_bit(logic b, logic last, logic [7:0] exp);
    @(negedge clk);
    bv_s = 1; si_s = b;
    #1;
    check("small strobe", sv_s == last);
    if (last) check("small slice", slice_s == exp);
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IW-1:0] ix;
    logic [M-1:0]  raw;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Part 1
    for (int w = 0; w < NWORDS; w++) begin
      if ($urandom_range(0, 3) != 0) begin
        ix = IW'($urandom);
        big_bit(1'b1, 0, 0, '0);
        for (int b = IW - 1; b >= 0; b--) big_bit(ix[b], b == 0, 1, TAB[ix]);
        n_dict++;
      end else begin
        for (int k = 0; k < M / 32; k++) raw[k*32 +: 32] = $urandom;
        big_bit(1'b0, 0, 0, '0);
        for (int b = M - 1; b >= 0; b--) big_bit(raw[b], b == 0, 0, raw);
        n_raw++;
      end
    end
    @(negedge clk);
    bv_b = 0;
    check("big: one clock per bit", clk_b == bits_b);
    check("big: expected bit count", bits_b == n_dict * (1 + IW) + n_raw * (1 + M));
    // Part 2: symbols 0..3 by index, 4 and 5 uncompressed.
    for (int s = 0; s < 6; s++) begin
      if (s < 4) begin
        small_bit(1'b1, 0, '0);
        small_bit(s[1], 0, '0);
        small_bit(s[0], 1, SYMS[s]);
      end else begin
        small_bit(1'b0, 0, '0);
        for (int b = 7; b >= 0; b--) small_bit(SYMS[s][b], b == 0, SYMS[s]);
      end
    end
    @(negedge clk);
    bv_s = 0;
    @(negedge clk);
    check("example: 30 bits in 30 clocks", clk_s == 30);
    check("example: 6 slices", strobes_s == 6);
    $display("part 1: %0d index + %0d raw codewords, %0d bits, %0d clocks; part 2: %0d clocks",
             n_dict, n_raw, bits_b, clk_b, clk_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
