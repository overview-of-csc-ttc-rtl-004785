// ttc_fpga: the TTC FPGA. It generates and regulates the triggers (TTC
// controller), runs the SCA pipelines on the front-end boards over the
// G-Link transmitters (SCA controller), and tells the BPI FPGAs what is
// coming (TTC mode, LOCKED, EXPECTED_RXDATA and the SERIAL command stream).
//
// HPU bus: 16-bit data, 4-bit address. An access happens on the falling edge
// of stb_n (sampled by clk through two flip-flops); wr_n low makes it a
// write. Read data is combinational from hpu_a; reading TTCR_TTCC_Fifo pops a
// halfword. Register map (TTCR_*, see sit_pkg):
//   0 R status {U O W F S C D, 0*6, P R L}     W DLL reset (no effect here)
//   1 R link status {signal detect[7:0], RXREADY[7:0]}
//   2 control {P C S N 0 A R T, E[7:0]}: P, C, S and N are actions (send
//     tscAlignFine, send tscAlignCoarse, software trigger, NOP record) and
//     read back as 0; A enables periodic tscCheckCoarse, R = run (else
//     synchronous reset), T = Tx enable, E = link enables for LOCKED
//   3 TTC FIFO, 4 missed triggers, 5 triggers, 6 TTCC setup, 7 dead time,
//   8 max triggers, 9 trigger delay, 10 STG period, 11 STG burst,
//   12 SCAC setup, 13 readout setup, 14 {latency, cells}, 15 table port
// The table port reaches the gray-code tables when G (register 13) is 1;
// the address increments after each access and is cleared by a read while
// L (register 12) is set. The readout-sequencer table (G = 0) is not part of
// this design: it reads 0 and ignores writes.
//
// LOCKED is the AND of RXREADY over the enabled links. TMODE is SyncReset
// while R is 0, Stopped when the run has ended, Trigger in a TRIGGER clock
// and Running otherwise. tscRunEnd is sent once after the run stops at the
// maximum trigger count and the SCA controller has read out everything.
// Register defaults after rst are listed at the reset branch below.
module ttc_fpga
  import sit_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // HPU
  input  logic [3:0]  hpu_a,
  input  logic [15:0] hpu_din,
  output logic [15:0] hpu_dout,
  input  logic        hpu_stb_n,
  input  logic        hpu_wr_n,
  // triggers
  input  logic        fp_ttc,
  input  logic        l1a,
  output logic        cal,
  // transition module
  input  logic        tmp_n,
  input  logic [7:0]  sig_detect,
  output logic [15:0] fe,
  output logic        tx_enable,
  // to / from the BPI FPGAs
  input  logic [7:0]  rxready,
  output logic [1:0]  tmode,
  output logic        locked,
  output logic        expected_rxdata,
  output logic        serial
);
  // ---------------- registers
  logic [2:0]   stb_s;
  ttc_control_t ctl;
  ttcc_setup_t  setup;
  logic [15:0]  dead, maxtrig, period;
  logic [7:0]   tdelay, latency, cells, lut_addr;
  stg_burst_t   burst;
  scac_setup_t  scac;
  roseq_setup_t roseq;
  logic         sw_trig, nop_req, req_fine, req_coarse;
  logic         run_end_sent, tsc_grant_fine, tsc_grant_coarse, tsc_grant_end;

  wire acc = stb_s[2] && !stb_s[1];
  wire wr  = acc && !hpu_wr_n;
  wire rd  = acc && hpu_wr_n;
  wire srst = !ctl.run;

  always_ff @(posedge clk) begin
    if (rst) begin
      stb_s   <= '1;
      ctl     <= '0;
      setup   <= '{default: '0, max_rate: 7'd7};
      dead    <= 16'd3;           // 4 clocks between triggers
      maxtrig <= 16'hffff;
      tdelay  <= '0;
      period  <= 16'd4000;
      burst   <= '{one_shot: 1'b0, burst_n: 7'd1, burst_i: 8'd1};
      scac    <= '{default: '0, slices: 8'd5};
      roseq   <= '{default: '0, lut_sel: 1'b1, trig_delay: 5'd2};
      latency <= 8'd100;
      cells   <= 8'd144;
      lut_addr <= '0;
      sw_trig <= 1'b0; nop_req <= 1'b0; req_fine <= 1'b0; req_coarse <= 1'b0;
    end else begin
      stb_s   <= {stb_s[1:0], hpu_stb_n};
      sw_trig <= 1'b0;
      nop_req <= 1'b0;
      if (wr) case (hpu_a)
        TTCR_CONTROL: begin
          ctl        <= ttc_control_t'(hpu_din & 16'h0fff);
          sw_trig    <= hpu_din[13];
          nop_req    <= hpu_din[12];
          if (hpu_din[15]) req_fine   <= 1'b1;
          if (hpu_din[14]) req_coarse <= 1'b1;
        end
        TTCR_TTCC_SETUP:    setup   <= ttcc_setup_t'(hpu_din);
        TTCR_DEAD_TIME:     dead    <= hpu_din;
        TTCR_MAX_TRIGGERS:  maxtrig <= hpu_din;
        TTCR_TRIGGER_DELAY: tdelay  <= hpu_din[7:0];
        TTCR_STG_PERIOD:    period  <= hpu_din;
        TTCR_STG_BURST:     burst   <= stg_burst_t'(hpu_din);
        TTCR_SCAC_SETUP:    scac    <= scac_setup_t'(hpu_din);
        TTCR_ROSEQ_SETUP:   roseq   <= roseq_setup_t'(hpu_din);
        TTCR_LATENCY_CELLS: begin latency <= hpu_din[15:8]; cells <= hpu_din[7:0]; end
        default: ;
      endcase
      if (acc && hpu_a == TTCR_LUT) begin
        if (rd && scac.lut_addr_reset) lut_addr <= '0;
        else                           lut_addr <= lut_addr + 1'b1;
      end
      if (tsc_grant_fine)   req_fine   <= 1'b0;
      if (tsc_grant_coarse) req_coarse <= 1'b0;
    end
  end

  // ---------------- status
  logic       running, trigger, trigger_type, insuf_free, scac_busy;
  logic       f_wa, f_free, f_ro, fifo_empty, fifo_over, fifo_under;
  logic [15:0] fifo_dout, missed, triggers;
  logic [31:0] l1id;
  logic [6:0] tis_status;

  assign locked     = &(rxready | ~ctl.link_en);
  assign tis_status = {f_wa, f_free, f_ro, 1'b0, tmp_n, running, locked};
  assign tx_enable  = ctl.tx_enable;

  always_comb begin
    if (srst)          tmode = TMODE_SYNC_RESET;
    else if (!running) tmode = TMODE_STOPPED;
    else if (trigger)  tmode = TMODE_TRIGGER;
    else               tmode = TMODE_RUNNING;
  end

  // ---------------- TTC controller
  ttc_controller u_ttcc (
    .clk(clk), .srst(srst), .fp_trig(fp_ttc), .sw_trig(sw_trig), .l1a(l1a),
    .setup(setup), .dead_time(dead), .max_triggers(maxtrig), .trig_delay(tdelay),
    .stg_period(period), .stg_burst(burst), .insuf_free(insuf_free), .scac_busy(scac_busy),
    .status(tis_status), .nop_req(nop_req), .fifo_rd(rd && hpu_a == TTCR_TTCC_FIFO),
    .trigger(trigger), .trigger_type(trigger_type), .cal(cal),
    .fifo_dout(fifo_dout), .fifo_empty(fifo_empty), .fifo_overflow(fifo_over),
    .fifo_underflow(fifo_under), .missed(missed), .triggers(triggers), .l1id(l1id),
    .running(running));

  // ---------------- SCA controller
  logic        s_req, s_hasp, tsc_busy, scac_idle;
  logic [3:0]  s_cmd;
  logic [23:0] s_param;
  logic [7:0]  lut_rdata;

  sca_controller u_scac (
    .clk(clk), .srst(srst), .setup(scac), .roseq(roseq), .latency(latency), .cells(cells),
    .check_align(ctl.check_align), .trigger(trigger), .trigger_type(trigger_type),
    .lut_we(wr && hpu_a == TTCR_LUT && roseq.lut_sel), .lut_addr(lut_addr),
    .lut_wdata(hpu_din[7:0]), .lut_rdata(lut_rdata),
    .tsc_req(s_req), .tsc_cmd(s_cmd), .tsc_param(s_param), .tsc_has_param(s_hasp),
    .tsc_busy(tsc_busy), .fe(fe), .expected_rxdata(expected_rxdata),
    .insuf_free(insuf_free), .scac_busy(scac_busy), .scac_idle(scac_idle),
    .fault_bad_wa(f_wa), .fault_free_empty(f_free), .fault_readout(f_ro));

  // ---------------- serial command arbitration: slice traffic first
  logic        t_req, t_hasp;
  logic [3:0]  t_cmd;
  logic [23:0] t_param;

  always_comb begin
    tsc_grant_fine = 1'b0; tsc_grant_coarse = 1'b0; tsc_grant_end = 1'b0;
    t_req = s_req; t_cmd = s_cmd; t_param = s_param; t_hasp = s_hasp;
    if (!s_req && !tsc_busy) begin
      t_param = '0; t_hasp = 1'b0;
      if (req_fine) begin
        t_req = 1'b1; t_cmd = TSC_ALIGN_FINE; tsc_grant_fine = 1'b1;
      end else if (req_coarse) begin
        t_req = 1'b1; t_cmd = TSC_ALIGN_COARSE; tsc_grant_coarse = 1'b1;
      end else if (!srst && !running && scac_idle && !run_end_sent) begin
        t_req = 1'b1; t_cmd = TSC_RUN_END; tsc_grant_end = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || srst)        run_end_sent <= 1'b0;
    else if (tsc_grant_end) run_end_sent <= 1'b1;
  end

  tsc_tx u_tsc (.clk(clk), .srst(rst), .req(t_req), .cmd(t_cmd), .param(t_param),
                .has_param(t_hasp), .busy(tsc_busy), .serial(serial));

  // ---------------- read mux
  always_comb begin
    case (hpu_a)
      TTCR_STATUS:        hpu_dout = {fifo_under, fifo_over, f_wa, f_free, f_ro, 1'b0, 1'b0,
                                      6'd0, !tmp_n, running, locked};
      TTCR_LINK_STATUS:   hpu_dout = {sig_detect, rxready};
      TTCR_CONTROL:       hpu_dout = 16'(ctl) & 16'h0fff;
      TTCR_TTCC_FIFO:     hpu_dout = fifo_dout;
      TTCR_MISSED_TRIG:   hpu_dout = missed;
      TTCR_TRIGGERS:      hpu_dout = triggers;
      TTCR_TTCC_SETUP:    hpu_dout = setup;
      TTCR_DEAD_TIME:     hpu_dout = dead;
      TTCR_MAX_TRIGGERS:  hpu_dout = maxtrig;
      TTCR_TRIGGER_DELAY: hpu_dout = {8'd0, tdelay};
      TTCR_STG_PERIOD:    hpu_dout = period;
      TTCR_STG_BURST:     hpu_dout = burst;
      TTCR_SCAC_SETUP:    hpu_dout = scac;
      TTCR_ROSEQ_SETUP:   hpu_dout = roseq;
      TTCR_LATENCY_CELLS: hpu_dout = {latency, cells};
      default:            hpu_dout = roseq.lut_sel ? {8'd0, lut_rdata} : 16'd0;   // TTCR_LUT
    endcase
  end
endmodule
