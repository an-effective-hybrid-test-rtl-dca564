// Testbench for compacted_scan_network.
//
// Uses the 13-cell example: five test cubes over scan cells F1..F13 (with
// don't-cares) and the five values per cube that the depth-5 compacted
// network needs. Each cube is shifted in with 5 clocks (25 for all five,
// against 65 bits for the plain 13-cell chain), after which every specified
// bit of the cube must sit in its cell and every cell of a group must hold
// the group's value.
//
// Throughout, a reference model written out gate by gate here (fan-outs and
// the two 3-input XORs) runs beside the block under random shift / capture /
// hold cycles, so unloading of captured, non-uniform responses through the
// XOR compactors is checked as well. A second instance, u_inv, marks F3, F5
// and F13 as inverse-compatible cells: it must store their complement and
// still deliver and unload the same test values.
module tb_compacted_scan_network;

  import hdc_pkg::SRC_SI, hdc_pkg::SRC_NONE, hdc_pkg::MAX_FANIN;

  localparam int N = 13;
  localparam logic [N-1:0] INV_MASK = 13'b1_0000_0001_0100;  // bits 12, 4, 2

  // Test cubes, F1 first, and the group values g1..g5 (g1 nearest scan-in).
  string cube [5] = '{"1X0000000XXX0", "10010X1100001", "11111X0011XX0",
                      "1XX111X11XX11", "0X101011XX0XX"};
  localparam logic [4:0] GVAL [5] = '{5'b00001, 5'b00111, 5'b11011, 5'b11111, 5'b01100};
  // Group of each cell (1..5), F1 first.
  localparam int GROUP [N] = '{5, 1, 2, 4, 2, 1, 3, 3, 2, 1, 1, 1, 3};

  logic clk = 0;
  logic shift_en = 0, scan_in = 0, capture_en = 0;
  logic [N-1:0] func_d = '0, q, q_inv;
  logic so, so_inv;
  logic [N-1:0] r;        // reference test values
  logic r_known = 0;
  int checks = 0, failures = 0, shifts = 0, xor_mixed = 0;

  compacted_scan_network u_fig5 (.clk, .shift_en, .scan_in, .capture_en, .func_d,
                                 .q, .scan_out(so));
  compacted_scan_network #(.INV(INV_MASK)) u_inv (.clk, .shift_en, .scan_in, .capture_en,
                                 .func_d(func_d ^ INV_MASK), .q(q_inv), .scan_out(so_inv));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_next(logic [N-1:0] v, logic si);
    logic [N-1:0] n;
    n[0]  = v[3];                  // F1  <- F4
    n[1]  = si;                    // F2
    n[2]  = v[9];                  // F3  <- F10
    n[3]  = v[12] ^ v[6] ^ v[7];   // F4  <- F13, F7, F8
    n[4]  = v[10] ^ v[5] ^ v[1];   // F5  <- F11, F6, F2
    n[5]  = si;                    // F6
    n[6]  = v[8];                  // F7  <- F9
    n[7]  = v[2];                  // F8  <- F3
    n[8]  = v[11];                 // F9  <- F12
    n[9]  = si;                    // F10
    n[10] = si;                    // F11
    n[11] = si;                    // F12
    n[12] = v[4];                  // F13 <- F5
    return n;
  endfunction

  always @(posedge clk) begin
    if (shift_en) begin
      if (!(r[12] == r[6] && r[6] == r[7]) || !(r[10] == r[5] && r[5] == r[1])) xor_mixed++;
      r <= ref_next(r, scan_in);
      shifts++;
    end else if (capture_en) begin
      r <= func_d;
      r_known <= 1;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Compare with the reference just before the next clock edge.
  always @(negedge clk) begin
    if (r_known) begin
      check("cells", q == r);
      check("scan_out", so == r[0]);
      check("inverse cells stored complemented", q_inv == (r ^ INV_MASK));
      check("scan_out with inverse cells", so_inv == r[0]);
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0;
    // Start from a known state: capture zeros.
    @(negedge clk);
    capture_en = 1; func_d = '0;
    @(negedge clk);
    capture_en = 0;
    // The five cubes, each loaded with 5 shifts, responses captured between.
    s0 = shifts;
    for (int t = 0; t < 5; t++) begin
      for (int k = 0; k < 5; k++) begin        // g5 (deepest group) first
        @(negedge clk);
        shift_en = 1; scan_in = GVAL[t][k];
      end
      @(negedge clk);
      shift_en = 0;
      #1;
      for (int j = 0; j < N; j++) begin
        byte c;
        c = byte'(cube[t][j]);
        if (c != "X") check($sformatf("T%0d F%0d", t + 1, j + 1), q[j] == (c == "1"));
        check("group value", q[j] == GVAL[t][5 - GROUP[j]]);
      end
      // capture a random response before the next load
      func_d = N'($urandom);
      capture_en = 1;
      @(negedge clk);
      capture_en = 0;
    end
    check("25 shift clocks for five cubes", shifts - s0 == 25);
    // Random shift / capture / hold mix.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift_en   = ($urandom_range(0, 2) != 0);
      capture_en = ($urandom_range(0, 3) == 0);
      scan_in    = 1'($urandom);
      func_d     = N'($urandom);
    end
    @(negedge clk);
    shift_en = 0; capture_en = 0;
    @(negedge clk);
    check("XOR compaction saw unequal inputs", xor_mixed > 0);
    $display("shifts=%0d, shifts with unequal XOR inputs=%0d", shifts, xor_mixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
