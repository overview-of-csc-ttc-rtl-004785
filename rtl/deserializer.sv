// deserializer: one G-Link input of the BPI FPGA. Each 16-bit G-Link word
// carries four nibbles, one from each ASM mux chip; three consecutive valid
// words make one 12-bit ADC sample per nibble, least significant nibble
// first. Four 4-to-12 shift registers assemble the samples; after every third
// valid word the four samples are registered together as one 48-bit word
// {N3, N2, N1, N0} (N0 from G-Link bits 3:0) and `valid` pulses for a clock.
//
// Cycle alignment: `align` restarts the three-word count, so the first valid
// word after it is the first nibble of a sample. The input sequencer pulses
// it at the start of every time slice. `in_valid` is the validated-word
// strobe (EXPECTED_RXDATA in normal mode).
// ADC reformat (BPIR_AuxControl): 0 none, 1 invert the sample MSB, 2 invert
// the eleven LSBs, 3 none.
module deserializer (
  input  logic        clk,
  input  logic        srst,
  input  logic        align,
  input  logic        in_valid,
  input  logic [15:0] bg,
  input  logic [1:0]  reformat,
  output logic [47:0] word,
  output logic        valid,
  output logic        aligned
);
  logic [11:0] sr [4];
  logic [1:0]  k;

  function automatic logic [11:0] reform(input logic [11:0] s, input logic [1:0] m);
    case (m)
      2'd1:    return s ^ 12'h800;
      2'd2:    return s ^ 12'h7ff;
      default: return s;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (srst) begin
      k       <= '0;
      valid   <= 1'b0;
      aligned <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (align) begin
        k       <= '0;
        aligned <= 1'b1;
      end else if (in_valid) begin
        for (int j = 0; j < 4; j++) sr[j] <= {bg[4*j +: 4], sr[j][11:4]};
        if (k == 2'd2) begin
          k     <= '0;
          valid <= 1'b1;
          for (int j = 0; j < 4; j++)
            word[12*j +: 12] <= reform({bg[4*j +: 4], sr[j][11:4]}, reformat);
        end else begin
          k <= k + 1'b1;
        end
      end
    end
  end
endmodule
