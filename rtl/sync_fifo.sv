// sync_fifo: single-clock first-word-fall-through FIFO used for the SCA cell
// queues (Free FIFO and Done FIFO, 256x8; Readout FIFO, 256x11) and inside the
// trigger information stream generator.
//
// The head entry is always visible on rdata while empty is low; a pop in the
// same cycle as the push is allowed. count reports the occupancy. A push into
// a full FIFO is dropped and a pop from an empty one is ignored; the owner of
// the FIFO flags those as faults. clr is a synchronous clear (the system's
// synchronous reset). The depth must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     clr,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[AW:0]);
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
