// Multiple-input signature register (MISR) for the scan chain responses.
//
// Each scan chain's serial output is one input bit of the MISR. On every
// clock with en high the register shifts one place towards the MSB, the bit
// leaving the MSB is fed back through the polynomial POLY (internal XOR,
// Galois form), and the W chain output bits are XORed in:
//   sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ d
// After the last response has been shifted out, sig is the test signature.
//
// The register's use follows the compression scheme (chain outputs are
// compacted into a MISR); its width (one bit per chain), the feedback form,
// the default polynomial x^128 + x^7 + x^2 + x + 1 (irreducible for W = 128,
// lower terms kept for other widths) and the active-low synchronous clear are
// this design's own choices.
module misr #(
  parameter int unsigned W = 128,
  parameter logic [W-1:0] POLY = W'(128'h87)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk) begin
    if (!rst_n)  sig <= '0;
    else if (en) sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ d;
  end

endmodule
