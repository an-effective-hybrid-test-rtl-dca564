// Control logic of the dictionary-based test data decompressor.
//
// The tester sends one bit per clock on ate_si (qualified by bit_valid).
// Bits form codewords: a 1-bit prefix, then a tail. Prefix 1 means the tail
// is an IDX_W-bit dictionary index; prefix 0 means the tail is the M-bit
// scan slice itself, sent uncompressed. The control logic is a three-state
// FSM (prefix / index tail / raw tail), a shift register that collects the
// tail and a down-counter of the tail bits still to come.
//
// Timing: the slice is produced in the very cycle the last tail bit is on
// ate_si: slice_valid is high for that one cycle, and the tail is presented
// combinationally as {shift register, ate_si}, so the scan chains can shift
// on the same clock edge that consumes the last bit. A codeword of L bits
// therefore costs exactly L clocks, and the scan chains need no clock of
// their own and no handshake with the tester. When bit_valid is low the FSM,
// register and counter hold.
//
// Tails are sent most significant bit first: the first tail bit becomes
// raw_slice[M-1] (or index[IDX_W-1]). Bit i of a slice drives scan chain i.
// The prefix meaning, the 7-bit index and the M-bit raw tail follow the
// compression scheme; the bit order, state encoding and the bit_valid
// qualifier are this design's choices. rst_n is an active-low synchronous
// reset to the prefix state.
module decoder_control
  import hdc_pkg::dec_state_t, hdc_pkg::ST_PREFIX, hdc_pkg::ST_INDEX, hdc_pkg::ST_RAW,
         hdc_pkg::PREFIX_INDEX;
#(
  parameter int unsigned M     = 128,
  parameter int unsigned IDX_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bit_valid,   // a tester bit is present on ate_si
  input  logic             ate_si,      // serial compressed test data
  output logic [IDX_W-1:0] index,       // dictionary index (valid with use_dict)
  output logic [M-1:0]     raw_slice,   // uncompressed slice (valid with !use_dict)
  output logic             use_dict,    // 1: take the slice from the dictionary
  output logic             slice_valid  // one-cycle strobe: shift the scan chains now
);

  localparam int unsigned W   = (M > IDX_W) ? M : IDX_W;  // tail register width
  localparam int unsigned CNT_W = $clog2(W);

  dec_state_t       state;
  logic [W-2:0]     sreg;      // tail bits received so far
  logic [CNT_W-1:0] cnt;       // tail bits still to come after the current one
  logic [W-1:0]     word;      // tail including the bit on ate_si
  logic             last_bit;

  assign word        = {sreg, ate_si};
  assign last_bit    = (state != ST_PREFIX) && (cnt == '0);
  assign slice_valid = bit_valid && last_bit;
  assign use_dict    = (state == ST_INDEX);
  assign index       = word[IDX_W-1:0];
  assign raw_slice   = word[M-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_PREFIX;
      cnt   <= '0;
      sreg  <= '0;
    end else if (bit_valid) begin
      unique case (state)
        ST_PREFIX: begin
          if (ate_si == PREFIX_INDEX) begin
            state <= ST_INDEX;
            cnt   <= CNT_W'(IDX_W - 1);
          end else begin
            state <= ST_RAW;
            cnt   <= CNT_W'(M - 1);
          end
        end
        ST_INDEX, ST_RAW: begin
          sreg <= word[W-2:0];
          if (cnt == '0) state <= ST_PREFIX;
          else           cnt   <= cnt - 1'b1;
        end
        default: state <= ST_PREFIX;
      endcase
    end
  end

  // The tail register must hold at least two bits for the shift above.
  initial assert (W >= 2) else $error("decoder_control: M or IDX_W must be at least 2");

  // Only the three defined states may ever be reached.
  always_ff @(posedge clk) begin
    if (rst_n) assert (state inside {ST_PREFIX, ST_INDEX, ST_RAW})
      else $error("decoder_control: illegal FSM state");
  end

endmodule
