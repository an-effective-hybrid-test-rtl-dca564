// Testbench for decoder_control.
//
// Sends a random mix of index codewords (prefix 1 + 7-bit index) and raw
// codewords (prefix 0 + 128-bit slice), most significant tail bit first,
// with random idle cycles (bit_valid low) in between. Checks that
// slice_valid rises exactly in the cycle of each codeword's last bit and at
// no other time, that use_dict and the index or raw slice are right then,
// and that the number of clocks with bit_valid high equals the number of
// bits sent (one clock per codeword bit).
module tb_decoder_control;

  localparam int unsigned M = 128, IW = 7;
  localparam int NWORDS = 400;

  logic clk = 0, rst_n = 0, bit_valid = 0, ate_si = 0;
  logic [IW-1:0] index;
  logic [M-1:0]  raw_slice;
  logic          use_dict, slice_valid;
  int checks = 0, failures = 0;
  int n_dict = 0, n_raw = 0, n_idle = 0, valid_clks = 0, bits_sent = 0, strobes = 0;

  decoder_control #(.M(M), .IDX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (bit_valid) valid_clks++;
    if (slice_valid) strobes++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Present one bit; exp_last says whether it completes a codeword.
  task automatic send_bit(logic b, logic exp_last, logic exp_dict,
                          logic [IW-1:0] exp_idx, logic [M-1:0] exp_raw);
    while ($urandom_range(0, 3) == 0) begin
      @(negedge clk);
      bit_valid = 0;
      ate_si = 1'($urandom);
      n_idle++;
      #1 check("no strobe while idle", slice_valid == 0);
    end
    @(negedge clk);
    bit_valid = 1;
    ate_si = b;
    bits_sent++;
    #1;
    check("strobe timing", slice_valid == exp_last);
    if (exp_last) begin
      check("use_dict", use_dict == exp_dict);
      if (exp_dict) check("index", index == exp_idx);
      else          check("raw slice", raw_slice == exp_raw);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IW-1:0] ix;
    logic [M-1:0]  raw;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < NWORDS; w++) begin
      if ($urandom_range(0, 2) != 0) begin
        ix = IW'($urandom);
        send_bit(1'b1, 0, 0, '0, '0);
        for (int b = IW - 1; b >= 0; b--) send_bit(ix[b], b == 0, 1, ix, '0);
        n_dict++;
      end else begin
        for (int k = 0; k < M / 32; k++) raw[k*32 +: 32] = $urandom;
        send_bit(1'b0, 0, 0, '0, '0);
        for (int b = M - 1; b >= 0; b--) send_bit(raw[b], b == 0, 0, '0, raw);
        n_raw++;
      end
    end
    @(negedge clk);
    bit_valid = 0;
    @(negedge clk);
    check("one clock per bit", valid_clks == bits_sent);
    check("one strobe per codeword", strobes == NWORDS);
    check("both codeword kinds and idle cycles seen", n_dict > 0 && n_raw > 0 && n_idle > 0);
    $display("codewords: %0d index, %0d raw; %0d bits in %0d clocks; %0d idle cycles",
             n_dict, n_raw, bits_sent, valid_clks, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
