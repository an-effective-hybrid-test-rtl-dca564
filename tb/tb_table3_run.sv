// Helper for tb_table3_cycles: streams one benchmark's compressed test set
// through a dictionary_decoder of M chains (128 entries, 7-bit indices,
// a dictionary filled from a linear congruential generator seeded with SEED).
// NIDX index codewords and NRAW raw codewords are sent in random order with
// no pauses; every slice is checked, and the clocks with scan_en high must
// equal EXP_CLKS. Results come back on checks/failures when done rises.
module tb_table3_run #(
  parameter int unsigned M        = 32,
  parameter int          NIDX     = 10,
  parameter int          NRAW     = 10,
  parameter int          EXP_CLKS = 410,
  parameter int unsigned SEED     = 1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   clks
);

  localparam int unsigned DS = 128, IW = 7;

  function automatic logic [DS-1:0][M-1:0] lcg_table();
    logic [DS-1:0][M-1:0] t;
    logic [63:0] s = 64'(SEED);
    for (int e = 0; e < DS; e++)
      for (int b = 0; b < M; b++) begin
        s = s * 64'd6364136223846793005 + 64'd1442695040888963407;
        t[e][b] = s[45];
      end
    return t;
  endfunction
  localparam logic [DS-1:0][M-1:0] TAB = lcg_table();

  logic rst_n = 0, bv = 0, si = 0;
  logic [M-1:0] slice;
  logic sv, sd;
  int strobes = 0;

  dictionary_decoder #(.M(M), .DICT_SIZE(DS), .IDX_W(IW), .DICT(TAB)) u_dec (
    .clk, .rst_n, .bit_valid(bv), .ate_si(si), .slice, .slice_valid(sv), .slice_from_dict(sd));

  initial begin
    done = 0; checks = 0; failures = 0; clks = 0;
  end

  always @(posedge clk) begin
    if (bv) clks++;
    if (sv) strobes++;
  end

  task automatic chk(logic ok);
    checks++;
    if (!ok) failures++;
  endtask

  task automatic put(logic b, logic last, logic dict, logic [M-1:0] exp);
    @(negedge clk);
    bv = 1; si = b;
    #1;
    chk(sv == last);
    if (last) begin
      chk(sd == dict);
      chk(slice == exp);
    end
  endtask

  initial begin
    int left_idx, left_raw;
    logic [IW-1:0] ix;
    logic [M-1:0]  raw;
    wait (start);
    @(negedge clk);
    rst_n = 1;
    left_idx = NIDX;
    left_raw = NRAW;
    while (left_idx + left_raw > 0) begin
      if (left_raw == 0 || (left_idx > 0 && $urandom_range(1, left_idx + left_raw) <= left_idx)) begin
        ix = IW'($urandom);
        put(1'b1, 0, 0, '0);
        for (int b = IW - 1; b >= 0; b--) put(ix[b], b == 0, 1, TAB[ix]);
        left_idx--;
      end else begin
        for (int k = 0; k < (int'(M) + 31) / 32; k++) raw[k*32 +: 32] = $urandom;
        put(1'b0, 0, 0, '0);
        for (int b = int'(M) - 1; b >= 0; b--) put(raw[b], b == 0, 0, raw);
        left_raw--;
      end
    end
    @(negedge clk);
    bv = 0;
    @(negedge clk);
    chk(strobes == NIDX + NRAW);
    chk(clks == EXP_CLKS);
    done = 1;
  end

endmodule
