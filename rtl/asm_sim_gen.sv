// asm_sim_gen: test data generator of the SCA controller (Tx mode 10). It
// drives the G-Link transmitter with the data an ASM II board would send, so
// that a fiber looped from the transmitter to a receiver exercises the whole
// BPI FPGA input path with predictable samples.
//
// One time slice is 24 triplets of G-Link words, one word per clock while
// `dav` (the readout sequencer's data-valid window) is high. Within a
// triplet the four nibbles of the 16-bit word carry, in turn:
//   word 0: 0 A M M  - nibble index MM (0 = bits 3:0) and ADC A,
//   word 1: C C C C  - SCA channel, the same in every nibble,
//   word 2: T T T T  - time slice number with its MSB inverted.
// A toggles every triplet and C increments every other triplet, so the 24
// triplets cover channels 0-11 of both ADCs. T is 0 for the first slice of a
// trigger and counts up for each further slice. A receiver that assembles the
// three nibbles least significant first and re-inverts the top bit sees the
// 12-bit sample TTTT CCCC 0AMM.
module asm_sim_gen (
  input  logic        clk,
  input  logic        srst,
  input  logic        slice_start,  // pulse before each slice
  input  logic        first,        // slice is the first of its trigger
  input  logic        dav,
  output logic [15:0] word
);
  logic [1:0] w;       // word within the triplet
  logic [4:0] trip;    // triplet within the slice
  logic [3:0] t;       // time slice number

  wire a = trip[0];
  wire [3:0] c = trip[4:1];

  always_comb begin
    case (w)
      2'd0:    word = {1'b0, a, 2'd3, 1'b0, a, 2'd2, 1'b0, a, 2'd1, 1'b0, a, 2'd0};
      2'd1:    word = {4{c}};
      default: word = {4{~t[3], t[2:0]}};
    endcase
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      w    <= '0;
      trip <= '0;
      t    <= '0;
    end else if (slice_start) begin
      w    <= '0;
      trip <= '0;
      t    <= first ? 4'd0 : t + 1'b1;
    end else if (dav) begin
      if (w == 2'd2) begin
        w    <= '0;
        trip <= trip + 1'b1;
      end else begin
        w <= w + 1'b1;
      end
    end
  end
endmodule
