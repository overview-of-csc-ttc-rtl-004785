// delay_line: programmable-length delay pipeline. It serves as the Trigger
// Delay Pipeline of the TTC controller (TDC and synchronous-trigger-generator
// triggers, with the TDC value, delayed by TTCR_TriggerDelay clocks).
//
// A circular buffer of DEPTH entries is written every clock; the output reads
// the entry written `delay` clocks earlier, so out(t) = in(t - delay). A delay
// of 0 passes the input straight through. The register is 8 bits wide in the
// register map, so the default depth is 256. Changing the delay while signals
// are in flight shifts them, which is acceptable because the delay is set
// before a run. The pipeline has no reset: the owner clears the contents by
// holding `in` at zero for a full depth, or ignores the output until then.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                       clk,
  input  logic [$clog2(DEPTH)-1:0]   delay,
  input  logic [WIDTH-1:0]           in,
  output logic [WIDTH-1:0]           out
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr;

  always_ff @(posedge clk) begin
    mem[wptr] <= in;
    wptr      <= wptr + 1'b1;
  end

  wire [AW-1:0] rptr = wptr - delay;
  assign out = (delay == '0) ? in : mem[rptr];
endmodule
