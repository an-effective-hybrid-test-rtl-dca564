// Test application time of the decoder for four benchmark configurations.
//
// Each run sends the number of scan slices the benchmark's compacted test
// set has (test vectors x slices per vector, where a vector needs
// ceil(scan depth / chains) slices), split into index and raw codewords so
// that the total matches the published clock count:
//   s13207: 128 chains, 108 x 2 = 216 slices, all indexed:  216 x 8            =  1728
//   s15850: 101 chains,  95 x 3 = 285 slices, 235 indexed:  235 x 8 +   50 x 102 =  6980
//   s35932: 115 chains,  28 x 7 = 196 slices, 183 indexed:  183 x 8 +   13 x 116 =  2972
//   s38584:  32 chains, 140 x 27 = 3780 slices, 2700 indexed: 2700 x 8 + 1080 x 33 = 57240
// The slice contents are random (the real test sets are not available); the
// clock count depends only on the codeword mix. Each decoder must deliver
// every slice correctly and use exactly the listed number of clocks.
module tb_table3_cycles;

  logic clk = 0, start = 0;
  logic [3:0] done;
  int ck [4], fl [4], cl [4];
  int checks, failures;

  always #5 clk = ~clk;

  tb_table3_run #(.M(128), .NIDX(216),  .NRAW(0),    .EXP_CLKS(1728),  .SEED(13207)) r_s13207 (
    .clk, .start, .done(done[0]), .checks(ck[0]), .failures(fl[0]), .clks(cl[0]));
  tb_table3_run #(.M(101), .NIDX(235),  .NRAW(50),   .EXP_CLKS(6980),  .SEED(15850)) r_s15850 (
    .clk, .start, .done(done[1]), .checks(ck[1]), .failures(fl[1]), .clks(cl[1]));
  tb_table3_run #(.M(115), .NIDX(183),  .NRAW(13),   .EXP_CLKS(2972),  .SEED(35932)) r_s35932 (
    .clk, .start, .done(done[2]), .checks(ck[2]), .failures(fl[2]), .clks(cl[2]));
  tb_table3_run #(.M(32),  .NIDX(2700), .NRAW(1080), .EXP_CLKS(57240), .SEED(38584)) r_s38584 (
    .clk, .start, .done(done[3]), .checks(ck[3]), .failures(fl[3]), .clks(cl[3]));

  function automatic void report();
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
  endfunction

  initial begin
    #5_000_000;
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    start = 1;
    wait (&done);
    report();
    $display("clocks: s13207 %0d, s15850 %0d, s35932 %0d, s38584 %0d", cl[0], cl[1], cl[2], cl[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
