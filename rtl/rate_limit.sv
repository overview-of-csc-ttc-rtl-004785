// rate_limit: trigger inhibit that allows at most max_trig triggers in any
// window of WINDOW clocks (80 us at 40 MHz, the ATLAS rule of fewer than 8 L1A
// in 80 us).
//
// The time of every TRIGGER is pushed into a FIFO of free-running 16-bit
// timestamps; the head entry is dropped once it is WINDOW or more clocks old,
// so the FIFO occupancy is the number of triggers in the last WINDOW clocks.
// inhibit is high while that number has reached max_trig. max_trig = 0
// switches the limit off. The FIFO holds DEPTH entries, enough for the 7-bit
// register field.
module rate_limit #(
  parameter int unsigned WINDOW = 3200,
  parameter int unsigned DEPTH  = 128
) (
  input  logic       clk,
  input  logic       srst,
  input  logic       trigger,
  input  logic [6:0] max_trig,
  output logic       inhibit
);
  localparam int unsigned CW = $clog2(DEPTH);
  logic [15:0] now;
  logic [15:0] head;
  logic        empty, full;
  logic [CW:0] count;

  always_ff @(posedge clk) begin
    if (srst) now <= '0;
    else      now <= now + 1'b1;
  end

  wire expire = !empty && ((now - head) >= 16'(WINDOW));

  sync_fifo #(.WIDTH(16), .DEPTH(DEPTH)) u_times (
    .clk(clk), .clr(srst),
    .push(trigger), .wdata(now),
    .pop(expire), .rdata(head),
    .empty(empty), .full(full), .count(count)
  );

  assign inhibit = (max_trig != '0) && (count >= (CW+1)'(max_trig));
endmodule
