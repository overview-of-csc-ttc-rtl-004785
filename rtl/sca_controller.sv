// sca_controller: SCA Controller of the TTC FPGA. It steers the analog
// pipelines (switched-capacitor arrays, SCAs) on the front-end boards: it
// chooses the cell written in every write cycle, keeps written cells for the
// trigger latency, sets aside the cells a trigger needs, has the readout
// sequencer read them, and recycles every cell. Its control word goes to the
// G-Link transmitters on FE[15:0]; EXPECTED_RXDATA and SERIAL go to the BPI
// FPGAs.
//
// Cell flow: Free FIFO / Done FIFO -> write address generator -> latency
// pipeline -> either back to the Free FIFO, or, for the `slices` cells that
// follow a trigger, into the Readout FIFO {first, phase, type, cell}; after
// readout the cell enters the Done FIFO, which the write address generator
// drains first. The latency register counts 40 MHz clocks; at 20 MHz write
// rate the pipeline holds latency/2 write steps and an odd latency delays the
// trigger by one extra clock (the latency fudge). PHASE is the 20 MHz phase of
// the clock in which the trigger arrived.
//
// INSUF_FREE is high when the Free and Done FIFOs together hold no more cells
// than one trigger takes; SCAC_BUSY is high while the cells of a trigger are
// still being selected or the Free FIFO is being loaded. Both feed the
// trigger gate of the TTC controller.
//
// FE bit map (control mode): 15 CLK_20M, 14 ADCCLK, 13 TRIG_DATA, 12..5
// WA0..WA7, 4 G0, 3 G1, 2 RD, 1 SD, 0 RDCLK. Tx mode 01 sends a walking one,
// mode 10 the simulated ASM data of asm_sim_gen, mode 11 zero. FE is
// registered. Faults (sticky until srst): bad write address, Free FIFO empty,
// Readout FIFO overflow.
//
// Read phase: the P bit of the setup register picks which of the two clocks
// of a 20 MHz write step each slice's RDCLK sequence starts in (the register
// description gives only 'read clock phase w.r.t. write addresses'; which
// value means which clock is this design's choice). It has no effect at
// 40 MHz. The simultaneous read/write bit S is stored but has no effect.
module sca_controller
  import sit_pkg::*;
(
  input  logic         clk,
  input  logic         srst,
  input  scac_setup_t  setup,
  input  roseq_setup_t roseq,
  input  logic [7:0]   latency,
  input  logic [7:0]   cells,
  input  logic         check_align,
  input  logic         trigger,
  input  logic         trigger_type,
  // gray-code table load/read-back
  input  logic         lut_we,
  input  logic [7:0]   lut_addr,
  input  logic [7:0]   lut_wdata,
  output logic [7:0]   lut_rdata,
  // serial command interface
  output logic         tsc_req,
  output logic [3:0]   tsc_cmd,
  output logic [23:0]  tsc_param,
  output logic         tsc_has_param,
  input  logic         tsc_busy,
  output logic [15:0]  fe,
  output logic         expected_rxdata,
  output logic         insuf_free,
  output logic         scac_busy,
  output logic         scac_idle,
  output logic         fault_bad_wa,
  output logic         fault_free_empty,
  output logic         fault_readout
);
  // FIFOs
  logic       done_empty, done_full, free_empty, free_full, ro_empty, ro_full;
  logic [7:0] done_head, free_head;
  logic [10:0] ro_head, ro_din;
  logic [8:0] done_cnt, free_cnt, ro_cnt;
  logic       done_pop, free_pop, ro_pop, ro_push, done_push, free_push;
  logic [7:0] free_din, done_din;

  // write side
  logic       fill_push, filling, step, step_phase, new_valid;
  logic [7:0] fill_addr, new_addr, wa, wa_gray, gray_ro;
  logic       lp_valid;
  logic [7:0] lp_addr;
  logic       rate40;
  logic       seq_busy;

  assign rate40 = (setup.write_rate == 2'b11);

  sync_fifo #(.WIDTH(8), .DEPTH(256)) u_done (
    .clk(clk), .clr(srst), .push(done_push), .wdata(done_din), .pop(done_pop),
    .rdata(done_head), .empty(done_empty), .full(done_full), .count(done_cnt));

  sync_fifo #(.WIDTH(8), .DEPTH(256)) u_free (
    .clk(clk), .clr(srst), .push(free_push), .wdata(free_din), .pop(free_pop),
    .rdata(free_head), .empty(free_empty), .full(free_full), .count(free_cnt));

  sync_fifo #(.WIDTH(11), .DEPTH(256)) u_ro (
    .clk(clk), .clr(srst), .push(ro_push), .wdata(ro_din), .pop(ro_pop),
    .rdata(ro_head), .empty(ro_empty), .full(ro_full), .count(ro_cnt));

  write_addr_gen u_wag (
    .clk(clk), .srst(srst), .cells(cells), .rate40(rate40),
    .done_empty(done_empty), .done_head(done_head), .done_pop(done_pop),
    .free_empty(free_empty), .free_head(free_head), .free_pop(free_pop),
    .fill_push(fill_push), .fill_addr(fill_addr), .filling(filling),
    .step(step), .step_phase(step_phase), .new_addr(new_addr), .new_valid(new_valid),
    .wa(wa), .bad_wa(fault_bad_wa), .free_empty_fault(fault_free_empty));

  // latency in write steps
  logic [6:0] tap;
  always_comb begin
    logic [7:0] l;
    l = rate40 ? latency : {1'b0, latency[7:1]};
    tap = (l > 8'd127) ? 7'd127 : l[6:0];
  end

  latency_pipe #(.DEPTH(128)) u_lat (
    .clk(clk), .srst(srst), .step(step), .tap(tap),
    .in_valid(new_valid), .in_addr(new_addr),
    .out_valid(lp_valid), .out_addr(lp_addr));

  // trigger capture (F flip-flop) with latency fudge
  logic trig_f, type_f, phase_f, trig_x, type_x, phase_x;
  logic pend, pend_type, pend_phase, sel_first;
  logic [7:0] sel_cnt;
  wire fudge = !rate40 && latency[0];

  always_ff @(posedge clk) begin
    if (srst) begin
      trig_f <= 1'b0; type_f <= 1'b0; phase_f <= 1'b0;
    end else begin
      trig_f <= trigger; type_f <= trigger_type; phase_f <= step_phase;
    end
  end
  assign trig_x  = fudge ? trig_f  : trigger;
  assign type_x  = fudge ? type_f  : trigger_type;
  assign phase_x = fudge ? phase_f : step_phase;

  wire [7:0] eff_cnt = (pend && step) ? setup.slices : sel_cnt;
  wire       take    = step && lp_valid && (eff_cnt != '0);

  always_ff @(posedge clk) begin
    if (srst) begin
      pend <= 1'b0; pend_type <= 1'b0; pend_phase <= 1'b0;
      sel_cnt <= '0; sel_first <= 1'b0;
      fault_readout <= 1'b0;
    end else begin
      if (step) begin
        if (pend) sel_first <= 1'b1;
        if (take) sel_first <= 1'b0;
        sel_cnt <= eff_cnt - 8'(take);
        pend    <= 1'b0;
      end
      if (trig_x) begin
        pend       <= 1'b1;
        pend_type  <= type_x;
        pend_phase <= phase_x;
      end
      if (ro_push && ro_full) fault_readout <= 1'b1;
    end
  end

  wire first_now = (pend && step) ? 1'b1 : sel_first;
  assign ro_push   = take;
  assign ro_din    = {first_now, pend_phase, pend_type, lp_addr};
  assign free_push = fill_push || (step && lp_valid && !take);
  assign free_din  = fill_push ? fill_addr : lp_addr;

  assign insuf_free = ({1'b0, free_cnt} + {1'b0, done_cnt}) <= {2'b0, setup.slices};
  assign scac_busy  = pend || (sel_cnt != '0) || filling;
  assign scac_idle  = !scac_busy && ro_empty && !seq_busy;

  // gray-code tables: one for write addresses, one for read addresses
  logic [7:0] lut_rd_unused;
  gray_lut u_gray_wr (.clk(clk), .we(lut_we), .waddr(lut_addr), .wdata(lut_wdata),
                      .addr_a(wa), .data_a(wa_gray), .addr_b(lut_addr), .data_b(lut_rdata));

  // readout
  logic [7:0] ro_graddr;
  logic       rd_clk, sd, rd, adc_clk, trig_data, dav, slice_start, slice_first;
  logic [1:0] gain;
  gray_lut u_gray_rd (.clk(clk), .we(lut_we), .waddr(lut_addr), .wdata(lut_wdata),
                      .addr_a(ro_graddr), .data_a(gray_ro), .addr_b(lut_addr), .data_b(lut_rd_unused));

  // read clock phase w.r.t. write addresses (P): at 20 MHz the address phase
  // of a slice starts in the clock whose write-step phase equals P
  wire rd_align = (setup.write_rate == 2'b11) || (step_phase == setup.read_phase);

  readout_seq u_seq (
    .clk(clk), .srst(srst), .ro_empty(ro_empty), .ro_head(ro_head), .ro_pop(ro_pop),
    .done_push(done_push), .done_addr(done_din), .gray_raddr(ro_graddr), .gray_rdata(gray_ro),
    .fault_code({1'b0, fault_bad_wa, fault_free_empty, fault_readout}),
    .read_rate(setup.read_rate), .adc_phase(roseq.adc_phase), .sd_phase(roseq.sd_phase),
    .trig_delay(roseq.trig_delay), .check_align(check_align), .rd_align(rd_align),
    .tsc_req(tsc_req), .tsc_cmd(tsc_cmd), .tsc_param(tsc_param), .tsc_has_param(tsc_has_param),
    .tsc_busy(tsc_busy), .slice_start(slice_start), .slice_first(slice_first),
    .rd_clk(rd_clk), .sd(sd), .rd(rd), .gain(gain), .adc_clk(adc_clk),
    .trig_data(trig_data), .dav(dav), .busy(seq_busy));

  assign expected_rxdata = dav;

  // simulated ASM data and walking-one pattern
  logic [15:0] sim_word, walk;
  asm_sim_gen u_sim (.clk(clk), .srst(srst), .slice_start(slice_start), .first(slice_first),
                     .dav(dav), .word(sim_word));

  // CLK_20M: toggled in phase (00) or in antiphase (01) with the write
  // address changes, held low otherwise
  logic clk20;
  always_comb begin
    case (setup.write_rate)
      2'b00:   clk20 = step_phase;
      2'b01:   clk20 = !step_phase;
      default: clk20 = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (srst) begin
      walk <= 16'h0001;
      fe   <= '0;
    end else begin
      walk <= {walk[14:0], walk[15]};
      case (tx_mode_e'(setup.tx_mode))
        TX_SCA_CONTROL:  fe <= {clk20, adc_clk, trig_data,
                                wa_gray[0], wa_gray[1], wa_gray[2], wa_gray[3],
                                wa_gray[4], wa_gray[5], wa_gray[6], wa_gray[7],
                                gain[0], gain[1], rd, sd, rd_clk};
        TX_TEST_PATTERN: fe <= walk;
        TX_SIM_ASM:      fe <= dav ? sim_word : 16'h0000;
        default:         fe <= '0;
      endcase
    end
  end
endmodule
