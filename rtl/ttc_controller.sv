// ttc_controller: the TTC Controller of the TTC FPGA. It collects the trigger
// sources, enforces the trigger rules, produces the TRIGGER and TRIGGER_TYPE
// pulses for the SCA controller and the CAL pulse for the transition module,
// counts triggers and missed triggers, and writes one record per trigger into
// the TTC FIFO that the HPU reads.
//
// Trigger path: front-panel and software triggers enter the TDC; its
// TDC_TRIGGER also drives the synchronous trigger generator in one-shot mode.
// TDC and STG triggers (and the TDC value) pass the trigger delay pipeline;
// their enables (T and G bits) act at its output. An enabled trigger is
// accepted unless the TRIGGER flip-flop itself, the dead-time inhibit, the
// rate-limit inhibit, SCAC_BUSY, INSUF_FREE (when the I bit is set) or the end
// of the run blocks it; a blocked trigger counts as missed. When the L bit is
// set, the external ATLAS L1A input drives TRIGGER instead, since the trigger
// rules are then enforced upstream. TRIGGER and TRIGGER_TYPE are registered:
// a trigger seen at the pipeline output in clock t appears on TRIGGER in t+1.
// TRIGGER_TYPE is 1 for TDC or L1A triggers and 0 for STG-only triggers.
//
// Counting: the 32-bit L1ID counter counts accepted triggers, except STG
// triggers when the N bit is set (they are neither counted nor queued). The
// record of a trigger carries the L1ID before the increment, so the first
// trigger of a run has L1ID 0. The run stops (running low) when the S bit is
// set and the L1ID count reaches max_triggers. The missed-trigger counter
// saturates at 0xffff. srst, the synchronous reset, clears the counters, the
// timestamp, the FIFO and the generators.
module ttc_controller
  import sit_pkg::*;
(
  input  logic         clk,
  input  logic         srst,
  input  logic         fp_trig,        // asynchronous front-panel trigger
  input  logic         sw_trig,        // software trigger pulse
  input  logic         l1a,            // ATLAS L1A (not used in the SIT)
  input  ttcc_setup_t  setup,
  input  logic [15:0]  dead_time,
  input  logic [15:0]  max_triggers,
  input  logic [7:0]   trig_delay,
  input  logic [15:0]  stg_period,
  input  stg_burst_t   stg_burst,
  input  logic         insuf_free,
  input  logic         scac_busy,
  input  logic [6:0]   status,
  input  logic         nop_req,
  input  logic         fifo_rd,
  output logic         trigger,
  output logic         trigger_type,
  output logic         cal,
  output logic [15:0]  fifo_dout,
  output logic         fifo_empty,
  output logic         fifo_overflow,
  output logic         fifo_underflow,
  output logic [15:0]  missed,
  output logic [15:0]  triggers,
  output logic [31:0]  l1id,
  output logic         running
);
  logic       tdc_trig, stg_trig;
  logic [5:0] tdc_val;
  logic [7:0] dly_out;
  logic       dead_inh, rate_inh;
  logic [39:0] ts;
  logic [31:0] fifo_word;
  logic        fifo_wr, tis_lost;
  logic [5:0]  tdc_val_q;
  logic [8:0]  fifo_words;

  tdc u_tdc (.clk(clk), .async_trig(fp_trig && setup.fp_en), .sw_trig(sw_trig),
             .tdc_trigger(tdc_trig), .tdc_value(tdc_val));

  stg u_stg (.clk(clk), .srst(srst), .period(stg_period), .burst_n(stg_burst.burst_n),
             .burst_i(stg_burst.burst_i), .one_shot(stg_burst.one_shot),
             .tdc_trigger(tdc_trig), .stg_trigger(stg_trig));

  cal_logic u_cal (.clk(clk), .cal_en_tdc(setup.cal_en_tdc), .cal_en_stg(setup.cal_en_stg),
                   .tdc_trigger(tdc_trig), .stg_trigger(stg_trig), .cal(cal));

  delay_line #(.WIDTH(8), .DEPTH(256)) u_delay (
    .clk(clk), .delay(trig_delay), .in({tdc_val, stg_trig, tdc_trig}), .out(dly_out));

  wire tt0   = dly_out[0] && setup.tdc_en;          // high-priority synchronous trigger
  wire stg_t = dly_out[1] && setup.stg_en;          // low-priority synchronous trigger
  wire tt1   = l1a && setup.l1a_en;
  wire any_t = tt0 || stg_t;

  wire accept = any_t && running && !trigger && !dead_inh && !rate_inh && !scac_busy
                && !(setup.inhibit_insuf && insuf_free);

  dead_time u_dead (.clk(clk), .srst(srst), .trigger(trigger), .dead_clks(dead_time),
                    .inhibit(dead_inh));

  rate_limit #(.WINDOW(RATE_WINDOW_CLKS), .DEPTH(128)) u_rate (
    .clk(clk), .srst(srst), .trigger(trigger), .max_trig(setup.max_rate), .inhibit(rate_inh));

  ts_counter #(.WIDTH(40)) u_ts (.clk(clk), .srst(srst), .ts(ts));

  always_ff @(posedge clk) begin
    if (srst) begin
      trigger      <= 1'b0;
      trigger_type <= 1'b0;
      tdc_val_q    <= '0;
    end else begin
      trigger      <= setup.l1a_en ? tt1 : accept;
      trigger_type <= tt1 || tt0;
      tdc_val_q    <= dly_out[7:2];
    end
  end

  wire counted = trigger && !(setup.stg_no_queue && !trigger_type);

  always_ff @(posedge clk) begin
    if (srst) begin
      l1id    <= '0;
      missed  <= '0;
      running <= 1'b0;
    end else begin
      if (counted) l1id <= l1id + 1'b1;
      if (!setup.l1a_en && any_t && running && !accept && missed != 16'hffff)
        missed <= missed + 1'b1;
      running <= !(setup.stop_at_max && ({16'd0, max_triggers} <= l1id + 32'(counted)));
    end
  end

  assign triggers = (l1id[31:16] != '0) ? 16'hffff : l1id[15:0];

  tis_gen #(.QDEPTH(4)) u_tis (
    .clk(clk), .srst(srst), .trig_req(counted), .nop_req(nop_req),
    .ttype(trigger_type), .tdc_value(tdc_val_q), .status(status), .timestamp(ts),
    .l1id(l1id), .wr(fifo_wr), .word(fifo_word), .lost(tis_lost));

  ttc_fifo #(.DEPTH(256)) u_fifo (
    .clk(clk), .srst(srst), .wr(fifo_wr), .din(fifo_word), .rd(fifo_rd),
    .dout(fifo_dout), .empty(fifo_empty), .overflow(fifo_overflow),
    .underflow(fifo_underflow), .words(fifo_words));
endmodule
