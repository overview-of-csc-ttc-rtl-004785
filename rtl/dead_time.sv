// dead_time: trigger inhibit that enforces a minimum spacing between triggers.
//
// Each TRIGGER pulse (the output of the TRIGGER flip-flop) loads a down
// counter with TTCR_DeadTime; inhibit is high while the counter is non-zero.
// The trigger gate is also blocked by TRIGGER itself, so after a trigger is
// accepted the gate stays closed for dead_clks+1 clocks in all, which is the
// published meaning of the register (the flip-flop's clock included).
module dead_time (
  input  logic        clk,
  input  logic        srst,
  input  logic        trigger,
  input  logic [15:0] dead_clks,
  output logic        inhibit
);
  logic [15:0] cnt;
  always_ff @(posedge clk) begin
    if (srst)             cnt <= '0;
    else if (trigger)     cnt <= dead_clks;
    else if (cnt != '0)   cnt <= cnt - 1'b1;
  end
  assign inhibit = (cnt != '0);
endmodule
