// tdc: trigger input stage for the asynchronous triggers (front panel and
// software). It turns a trigger that may arrive at any time into a one-clock
// TDC_TRIGGER pulse and records in which half of the clock period it arrived.
//
// The asynchronous input is sampled on both clock edges. The rising-edge path
// is a two-flop synchronizer followed by an edge detector, so tdc_trigger is a
// single-clock pulse three clocks after the input rises. The falling-edge
// sample tells whether the input was already high half a clock before the
// rising-edge sample saw it; that bit is the trigger phase and is reported as
// bit 0 of the 6-bit TDC value. A finer time measurement would need a delay
// line in the I/O fabric, which this RTL does not model: the upper five TDC
// bits are zero. The software trigger is a synchronous one-clock pulse and is
// merged after the synchronizer with phase 0.
module tdc (
  input  logic       clk,
  input  logic       async_trig,   // front-panel trigger, already enabled
  input  logic       sw_trig,      // software trigger, synchronous pulse
  output logic       tdc_trigger,
  output logic [5:0] tdc_value
);
  logic neg_s;                       // falling-edge sample
  logic s1, s2, s3, n2, n3;

  always_ff @(negedge clk) neg_s <= async_trig;

  always_ff @(posedge clk) begin
    s1 <= async_trig;
    n2 <= neg_s;
    s2 <= s1;
    n3 <= n2;
    s3 <= s2;
  end

  // rising edge seen by the posedge synchronizer at s2 while s3 is low
  wire fp_edge = s2 && !s3;
  // the input was high at the falling edge before the posedge sample took it
  wire early   = n3;

  always_ff @(posedge clk) begin
    tdc_trigger <= fp_edge || sw_trig;
    tdc_value   <= {5'd0, fp_edge && early};
  end
endmodule
