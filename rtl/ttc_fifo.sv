// ttc_fifo: the TTC FIFO, 256 x 32 on the write side and 512 x 16 on the
// read side. The trigger information stream generator writes 32-bit words;
// the HPU reads them as halfwords through TTCR_TTCC_Fifo, most significant
// halfword first.
//
// The read side is first-word-fall-through: dout shows the next halfword and
// rd (one pulse per HPU read) advances to the next one. A write into a full
// FIFO sets the sticky overflow flag; a read from an empty one sets the sticky
// underflow flag (the U and O fault bits of TTCR_Status). srst empties the
// FIFO and clears both flags.
module ttc_fifo #(
  parameter int unsigned DEPTH = 256   // 32-bit words
) (
  input  logic        clk,
  input  logic        srst,
  input  logic        wr,
  input  logic [31:0] din,
  input  logic        rd,
  output logic [15:0] dout,
  output logic        empty,
  output logic        overflow,
  output logic        underflow,
  output logic [$clog2(DEPTH):0] words
);
  logic [31:0] head;
  logic        full, lo_half;

  sync_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .clr(srst),
    .push(wr), .wdata(din),
    .pop(rd && lo_half && !empty), .rdata(head),
    .empty(empty), .full(full), .count(words)
  );

  assign dout = lo_half ? head[15:0] : head[31:16];

  always_ff @(posedge clk) begin
    if (srst) begin
      lo_half   <= 1'b0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (wr && full) overflow <= 1'b1;
      if (rd && empty) underflow <= 1'b1;
      else if (rd) lo_half <= !lo_half;
    end
  end
endmodule
