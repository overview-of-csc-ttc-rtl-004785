// latency_pipe: SCA latency pipeline, 128 (max) entries of {valid, cell}.
// It holds each written cell for the trigger latency, so that the cell that
// leaves the pipeline in a write step is the one written `tap` steps earlier,
// when the sample that a trigger arriving now refers to was taken.
//
// The pipeline is a circular buffer that advances on each write step; `tap`
// (1 .. DEPTH-1) is the latency in write steps. srst clears the valid bits
// by flushing: for DEPTH steps after reset the output is reported invalid.
module latency_pipe #(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     srst,
  input  logic                     step,
  input  logic [$clog2(DEPTH)-1:0] tap,
  input  logic                     in_valid,
  input  logic [7:0]               in_addr,
  output logic                     out_valid,
  output logic [7:0]               out_addr
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [8:0]    mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW:0]   flush;      // steps left before the buffer holds only new entries

  wire [AW-1:0] rptr = wptr - tap;

  always_ff @(posedge clk) begin
    if (step) mem[wptr] <= {in_valid, in_addr};
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      wptr  <= '0;
      flush <= (AW+1)'(DEPTH);
    end else if (step) begin
      wptr <= wptr + 1'b1;
      if (flush != '0) flush <= flush - 1'b1;
    end
  end

  // an entry is valid only if it was written after the reset
  wire written = ({1'b0, tap} <= (AW+1)'(DEPTH) - flush);
  assign out_valid = mem[rptr][8] && written && (tap != '0);
  assign out_addr  = mem[rptr][7:0];
endmodule
