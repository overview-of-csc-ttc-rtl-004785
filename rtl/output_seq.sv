// output_seq: output sequencer of the BPI FPGA, in the output clock domain
// (about 50 MHz). When the input sequencer hands over a finished page it
// sends out_wc words to the DPU: word k carries on IC_DPU[23:12] the sample
// of Data DPRAM A at the address named by bits 15:8 of channel-order table
// entry k, and on IC_DPU[11:0] the sample of Data DPRAM B named by bits 7:0;
// IC_DPU[24] is the enable. Two samples leave per clock.
//
// The hand-over is a toggle (frame_done) that is synchronized with two
// flip-flops; the page number is stable from the toggle until the next one.
// The path table -> DPRAM -> output has two registers, so word k appears two
// clocks after its table read. A hand-over while a frame is still being sent
// sets the sticky overrun flag (BPIR_Status O) and is dropped.
module output_seq (
  input  logic        oclk,
  input  logic        orst,
  input  logic        frame_done,
  input  logic        frame_page,
  input  logic [7:0]  out_wc,
  output logic [7:0]  lut_addr,
  input  logic [15:0] lut_entry,
  output logic [9:0]  raddr_a,
  output logic [9:0]  raddr_b,
  input  logic [11:0] q_a,
  input  logic [11:0] q_b,
  output logic [24:0] ic_dpu,
  output logic        overrun
);
  logic [2:0] sync;
  logic       busy, page, v1, v2;
  logic [7:0] k;

  wire newf = sync[2] ^ sync[1];

  assign lut_addr = k;
  assign raddr_a  = {1'b0, page, lut_entry[15:8]};
  assign raddr_b  = {1'b0, page, lut_entry[7:0]};
  assign ic_dpu   = {v2, q_a, q_b};

  always_ff @(posedge oclk) begin
    if (orst) begin
      sync    <= '0;
      busy    <= 1'b0;
      page    <= 1'b0;
      k       <= '0;
      v1      <= 1'b0;
      v2      <= 1'b0;
      overrun <= 1'b0;
    end else begin
      sync <= {sync[1:0], frame_done};
      v1   <= busy;
      v2   <= v1;
      if (newf) begin
        if (busy) overrun <= 1'b1;
        else if (out_wc != '0) begin
          busy <= 1'b1;
          page <= frame_page;
          k    <= '0;
        end
      end
      if (busy && !newf) begin
        if (k == out_wc - 1'b1) busy <= 1'b0;
        k <= k + 1'b1;
      end
    end
  end
endmodule
