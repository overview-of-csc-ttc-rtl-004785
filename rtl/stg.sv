// stg: Synchronous Trigger Generator. It produces bursts of low-priority
// triggers: BURST_N triggers BURST_I clocks apart, the first trigger of a
// burst repeating every PERIOD clocks (periodic mode) or, in one-shot mode,
// once per TDC trigger, PERIOD+1 clocks after it.
//
// Three down counters do the work, as in the published timing diagram: the
// period counter (loaded with PERIOD), the interval counter (loaded with
// BURST_I after every trigger) and the burst counter (triggers left in the
// burst). stg_trigger is a registered one-clock pulse. In one-shot mode a TDC
// trigger at clock t gives burst triggers at t+PERIOD+1, t+PERIOD+1+BURST_I,
// ... A new TDC trigger during a countdown restarts it. srst (synchronous
// reset) stops everything. A burst count of zero produces no triggers;
// a BURST_I of zero is treated as one.
module stg (
  input  logic        clk,
  input  logic        srst,
  input  logic [15:0] period,
  input  logic [6:0]  burst_n,
  input  logic [7:0]  burst_i,
  input  logic        one_shot,
  input  logic        tdc_trigger,
  output logic        stg_trigger
);
  logic [15:0] pcnt;
  logic [7:0]  icnt;
  logic [6:0]  ncnt;
  logic        start;

  always_comb begin
    if (one_shot) start = (pcnt == 16'd1);
    else          start = (pcnt == 16'd1) || (period == 16'd1);
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      pcnt        <= '0;
      icnt        <= '0;
      ncnt        <= '0;
      stg_trigger <= 1'b0;
    end else begin
      stg_trigger <= 1'b0;
      // period counter
      if (one_shot) begin
        if (tdc_trigger)       pcnt <= period;
        else if (pcnt != '0)   pcnt <= pcnt - 1'b1;
      end else begin
        if (pcnt <= 16'd1)     pcnt <= period;
        else                   pcnt <= pcnt - 1'b1;
      end
      // burst
      if (start && burst_n != '0) begin
        stg_trigger <= 1'b1;
        ncnt        <= burst_n - 1'b1;
        icnt        <= burst_i;
      end else if (ncnt != '0) begin
        if (icnt <= 8'd1) begin
          stg_trigger <= 1'b1;
          ncnt        <= ncnt - 1'b1;
          icnt        <= burst_i;
        end else begin
          icnt <= icnt - 1'b1;
        end
      end
    end
  end
endmodule
