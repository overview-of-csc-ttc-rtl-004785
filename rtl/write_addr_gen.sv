// write_addr_gen: Write Address Generator of the SCA controller. It chooses
// the SCA cell written in each write cycle and starts the cell's trip through
// the latency pipeline.
//
// After a synchronous reset it first loads the Free FIFO with the cell
// numbers 0 .. cells-1, one per clock (filling is high meanwhile). Then, on
// every write step (every clock at 40 MHz, every other clock at 20 MHz), it
// takes the next cell from the Done FIFO if that holds one (cells coming back
// from readout) and otherwise from the Free FIFO. The chosen cell appears on
// new_addr/new_valid in the step clock and on wa from the next clock on. If
// both FIFOs are empty no cell is written in that step and the sticky
// free_empty fault is set; a cell number outside 0 .. cells-1 sets the sticky
// bad_wa fault (checked before the gray-code table). step_phase is the
// 20 MHz phase (0 in the clock of a step).
module write_addr_gen (
  input  logic       clk,
  input  logic       srst,
  input  logic [7:0] cells,
  input  logic       rate40,
  input  logic       done_empty,
  input  logic [7:0] done_head,
  output logic       done_pop,
  input  logic       free_empty,
  input  logic [7:0] free_head,
  output logic       free_pop,
  output logic       fill_push,
  output logic [7:0] fill_addr,
  output logic       filling,
  output logic       step,
  output logic       step_phase,
  output logic [7:0] new_addr,
  output logic       new_valid,
  output logic [7:0] wa,
  output logic       bad_wa,
  output logic       free_empty_fault
);
  logic [8:0] fcnt;
  logic       ph;

  assign filling    = (fcnt < {1'b0, cells});
  assign fill_push  = filling;
  assign fill_addr  = fcnt[7:0];
  assign step       = !filling && (rate40 || !ph);
  assign step_phase = ph;

  assign done_pop  = step && !done_empty;
  assign free_pop  = step && done_empty && !free_empty;
  assign new_valid = done_pop || free_pop;
  assign new_addr  = done_pop ? done_head : free_head;

  always_ff @(posedge clk) begin
    if (srst) begin
      fcnt             <= '0;
      ph               <= 1'b0;
      wa               <= '0;
      bad_wa           <= 1'b0;
      free_empty_fault <= 1'b0;
    end else begin
      if (filling) fcnt <= fcnt + 1'b1;
      else         ph   <= rate40 ? 1'b0 : !ph;
      if (new_valid) begin
        wa <= new_addr;
        if (new_addr >= cells) bad_wa <= 1'b1;
      end
      if (step && done_empty && free_empty) free_empty_fault <= 1'b1;
    end
  end
endmodule
