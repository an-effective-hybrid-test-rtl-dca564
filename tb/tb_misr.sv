// Testbench for misr.
//
// 1. Impulse response: with the register cleared, a single 1 on input bit 0
//    followed by 128 clocks of zero input must leave x^128 mod P(x), which
//    for P = x^128 + x^7 + x^2 + x + 1 is 0x87.
// 2. Random input words with en toggling at random, compared each clock with
//    a bit-by-bit model (shift towards the MSB, MSB fed back into bits
//    0, 1, 2 and 7, input XORed in); en low must hold.
// 3. Linearity: one flipped input bit in a long sequence must change the
//    final signature.
// 4. A 16-bit instance with P = x^16 + x^5 + x^3 + x^2 + 1 (primitive) must
//    return to its start state after exactly 2^16 - 1 clocks with zero input
//    and not before.
module tb_misr;

  localparam int W = 128;

  logic clk = 0, rst_n = 0, en = 0;
  logic [W-1:0] d = '0, sig, model;
  logic rst16 = 0, en16 = 0;
  logic [15:0] d16 = '0, sig16;
  int checks = 0, failures = 0;

  misr u_misr (.clk, .rst_n, .en, .d, .sig);
  misr #(.W(16), .POLY(16'h002D)) u_m16 (.clk, .rst_n(rst16), .en(en16), .d(d16), .sig(sig16));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] model_next(logic [W-1:0] s, logic [W-1:0] in);
    logic [W-1:0] n;
    for (int j = 0; j < W; j++) begin
      n[j] = (j > 0 ? s[j-1] : 1'b0) ^ in[j];
      if (j == 0 || j == 1 || j == 2 || j == 7) n[j] ^= s[W-1];
    end
    return n;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < W / 32; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] seq [64];
    logic [W-1:0] sig_a;
    int period;
    @(negedge clk);
    @(negedge clk);
    check("reset clears", sig == '0);
    rst_n = 1;
    // 1. impulse response
    en = 1; d = W'(1);
    @(negedge clk);
    d = '0;
    repeat (W) @(negedge clk);
    check("x^128 mod P", sig == W'(128'h87));
    // 2. random words against the model
    model = sig;
    for (int i = 0; i < 500; i++) begin
      en = 1'($urandom_range(0, 3) != 0);
      d  = rnd();
      if (en) model = model_next(model, d);
      @(negedge clk);
      check("model", sig == model);
    end
    // 3. linearity / error detection
    for (int i = 0; i < 64; i++) seq[i] = rnd();
    for (int pass = 0; pass < 2; pass++) begin
      rst_n = 0; @(negedge clk); rst_n = 1; en = 1;
      for (int i = 0; i < 64; i++) begin
        d = seq[i];
        if (pass == 1 && i == 20) d[77] = ~d[77];
        @(negedge clk);
      end
      if (pass == 0) sig_a = sig;
    end
    check("single-bit error changes signature", sig != sig_a);
    en = 0;
    // 4. period of the 16-bit instance
    @(negedge clk); rst16 = 1; en16 = 1; d16 = 16'h0001;
    @(negedge clk); d16 = '0;
    period = 0;
    do begin
      @(negedge clk);
      period++;
    end while (sig16 != 16'h0001 && period < 70000);
    check("16-bit MISR period 65535", period == 65535);
    $display("16-bit period %0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
