// Full-size end-to-end testbench.
//
// End-to-end test of hybrid_compression_top with every parameter at its
// default: 128 chains, 128 dictionary entries, 7-bit indices and the
// default dictionary table.
// For each pattern the testbench picks M-bit scan slices, about two thirds of
// them from the dictionary and the rest random, encodes each as a codeword
// (prefix 1 + index, or prefix 0 + raw slice, MSB first) and streams the
// bits on ate_si, with random pauses (scan_en low) in between. Five slices
// fill the depth-5 compacted chains; slice k carries the values of group
// 5-k, so every cell of a chain must end up holding its group's value.
// After each load the testbench checks all scan cells, then captures a
// random response (capture_en) and checks that too; the next load shifts the
// responses out through the XOR compactors into the MISR.
// A reference model written here (per-chain gate equations of the example
// network and a bit-level MISR) tracks the expected state; at the end the
// signature must match. Checked timing: slice_valid exactly on each
// codeword's last bit, one clock per compressed bit, no other clocks spent.
// Every mechanism (index codeword, raw codeword, tester pause, capture, XOR
// compaction of unequal responses, MISR update) must occur at least once.
module tb_hybrid_compression_top_full;

  localparam int unsigned M = 128, DS = 128, IW = 7;
  localparam int N = 13, DEPTH = 5, NPAT = 4;
  localparam int GROUP [N] = '{5, 1, 2, 4, 2, 1, 3, 3, 2, 1, 1, 1, 3};

  // The design's default dictionary, recomputed from its definition: bit b
  // of entry e is bit b mod 32 of the (b div 32 + 1)-th xorshift32 output
  // from seed 0x9E3779B9 ^ (e * 0x01000193).
  function automatic logic [DS-1:0][M-1:0] tb_dict();
    logic [DS-1:0][M-1:0] t;
    logic [31:0] s;
    for (int e = 0; e < DS; e++) begin
      s = 32'h9E37_79B9 ^ (32'(e) * 32'h0100_0193);
      for (int b = 0; b < M; b++) begin
        if (b % 32 == 0) begin
          s ^= s << 13; s ^= s >> 17; s ^= s << 5;
        end
        t[e][b] = s[b % 32];
      end
    end
    return t;
  endfunction

  localparam logic [DS-1:0][M-1:0] TAB = tb_dict();
  // Inverse-compatible cells per chain: they store the complement of their
  // test value.
  localparam logic [M-1:0][N-1:0] TB_INV = '0;

  logic clk = 0, rst_n = 0, scan_en = 0, ate_si = 0, capture_en = 0, misr_en = 0;
  logic [M-1:0][N-1:0] func_d = '0, cut_q;
  logic [M-1:0] signature;
  logic slice_valid, slice_from_dict;

  logic [M-1:0][N-1:0] rs;          // reference scan cell values
  logic [M-1:0] misr_ref = '0;
  logic         pend_shift = 0;     // expected shift at the next edge
  logic [M-1:0] pend_slice;

  int checks = 0, failures = 0;
  int n_dict = 0, n_raw = 0, n_pause = 0, n_capture = 0, n_xor_mixed = 0, n_misr = 0;
  int bits_sent = 0, clks_en = 0, n_strobe = 0;

  hybrid_compression_top u_dut (
    .clk, .rst_n, .scan_en, .ate_si, .capture_en, .misr_en, .func_d,
    .cut_q, .signature, .slice_valid, .slice_from_dict);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_next(logic [N-1:0] v, logic si);
    logic [N-1:0] n;
    n[0] = v[3];  n[1] = si;  n[2] = v[9];  n[3] = v[12] ^ v[6] ^ v[7];
    n[4] = v[10] ^ v[5] ^ v[1];  n[5] = si;  n[6] = v[8];  n[7] = v[2];
    n[8] = v[11]; n[9] = si;  n[10] = si;  n[11] = si;  n[12] = v[4];
    return n;
  endfunction

  function automatic logic [M-1:0] misr_next(logic [M-1:0] s, logic [M-1:0] in);
    logic [M-1:0] n;
    for (int j = 0; j < M; j++) begin
      n[j] = (j > 0 ? s[j-1] : 1'b0) ^ in[j];
      if (j == 0 || j == 1 || j == 2 || j == 7) n[j] ^= s[M-1];
    end
    return n;
  endfunction

  always @(posedge clk) begin
    if (scan_en) clks_en++;
    if (slice_valid) n_strobe++;
    if (pend_shift) begin
      logic [M-1:0] outs;
      for (int c = 0; c < M; c++) begin
        outs[c] = rs[c][0];
        if (!(rs[c][12] == rs[c][6] && rs[c][6] == rs[c][7])) n_xor_mixed++;
        rs[c] = ref_next(rs[c], pend_slice[c]);
      end
      if (misr_en) begin
        misr_ref = misr_next(misr_ref, outs);
        n_misr++;
      end
    end else if (capture_en) begin
      rs = func_d ^ TB_INV;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send_bit(logic b, logic last, logic dict, logic [M-1:0] exp);
    while ($urandom_range(0, 7) == 0) begin
      @(negedge clk);
      scan_en = 0; ate_si = 1'($urandom); pend_shift = 0;
      n_pause++;
      #1 check("no shift during pause", slice_valid == 0);
    end
    @(negedge clk);
    scan_en = 1; ate_si = b; bits_sent++;
    pend_shift = last; pend_slice = exp;
    #1;
    check("slice_valid on last codeword bit only", slice_valid == last);
    if (last) check("slice source", slice_from_dict == dict);
  endtask

  task automatic send_slice(output logic [M-1:0] s);
    logic [IW-1:0] ix;
    if ($urandom_range(0, 2) != 0) begin
      ix = IW'($urandom_range(0, DS - 1));
      s = TAB[ix];
      send_bit(1'b1, 0, 0, '0);
      for (int b = IW - 1; b >= 0; b--) send_bit(ix[b], b == 0, 1, s);
      n_dict++;
    end else begin
      for (int k = 0; k < (M + 31) / 32; k++) s[k*32 +: 32] = $urandom;
      send_bit(1'b0, 0, 0, '0);
      for (int b = M - 1; b >= 0; b--) send_bit(s[b], b == 0, 0, s);
      n_raw++;
    end
  endtask

  task automatic load_pattern();
    logic [M-1:0] sl [DEPTH];
    for (int k = 0; k < DEPTH; k++) send_slice(sl[k]);
    @(negedge clk);
    scan_en = 0; pend_shift = 0;
    #1;
    for (int c = 0; c < M; c++)
      for (int j = 0; j < N; j++)
        check("loaded cell", cut_q[c][j] == (sl[DEPTH - GROUP[j]][c] ^ TB_INV[c][j]));
    check("cells match model", cut_q == (rs ^ TB_INV));
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p <= NPAT; p++) begin
      misr_en = (p > 0);   // first load shifts out unknown power-up contents
      load_pattern();
      if (p == NPAT) break;
      // capture a response
      @(negedge clk);
      for (int c = 0; c < M; c++) func_d[c] = N'($urandom);
      capture_en = 1;
      @(negedge clk);
      capture_en = 0;
      n_capture++;
      #1 check("captured response", cut_q == func_d);
    end
    @(negedge clk);
    check("signature", signature == misr_ref);
    check("one clock per compressed bit", clks_en == bits_sent);
    check("one shift per slice", n_strobe == (NPAT + 1) * DEPTH);
    check("index codeword seen", n_dict > 0);
    check("raw codeword seen", n_raw > 0);
    check("tester pause seen", n_pause > 0);
    check("capture seen", n_capture > 0);
    check("XOR compaction of unequal responses seen", n_xor_mixed > 0);
    check("MISR update seen", n_misr > 0);
    $display("patterns=%0d slices: %0d index, %0d raw; %0d bits in %0d clocks (%0d uncompressed)",
             NPAT + 1, n_dict, n_raw, bits_sent, clks_en, (NPAT + 1) * DEPTH * M);
    $display("pauses=%0d captures=%0d xor_mixed=%0d misr_updates=%0d",
             n_pause, n_capture, n_xor_mixed, n_misr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
