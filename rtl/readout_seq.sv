// readout_seq: SCA readout sequencer. For each cell in the Readout FIFO it
// reads one time slice out of the SCAs and tells the BPI FPGAs what is coming.
//
// Sequence per slice (one state each):
//   CMD  - send tscSliceStart with the slice descriptor (fault code, cell,
//          trigger type, phase, first flag) on SERIAL; wait until it is sent.
//   ADDR - shift the gray-coded cell address onto SD, MSB first, one bit per
//          read clock (RDCLK) period.
//   RD   - one RDCLK period with the RD pulse high.
//   CONV - 12 RDCLK periods, one per SCA channel. ADCCLK runs, and in each
//          period the data-valid window (EXPECTED_RXDATA, `dav`) is high for
//          6 clocks: eight 12-bit samples per link per channel.
//   DONE - the cell goes to the Done FIFO and the Readout FIFO entry is popped.
// RDCLK is 40 MHz / 8 (5 MHz) or / 6 (6.67 MHz) and is high in the first half
// of its period. SD and ADCCLK are delayed by sd_phase and adc_phase clocks
// with respect to RDCLK; TRIG_DATA (DAV_N on the ASM transmitters, active low)
// follows dav delayed by trig_delay clocks (at least 2). When check_align is
// set, a tscCheckCoarse is sent between slices every CHECK_PERIOD clocks.
// The address phase starts only in a clock where rd_align is high; the SCA
// controller uses it to put RDCLK at a chosen phase of the 20 MHz write steps
// (RDCLK periods are whole write steps, so the phase then holds throughout).
// The gain lines are driven low (gain selection is not part of this design).
module readout_seq
  import sit_pkg::*;
#(
  parameter int unsigned CHECK_PERIOD = 65536
) (
  input  logic        clk,
  input  logic        srst,
  input  logic        ro_empty,
  input  logic [10:0] ro_head,       // {first, phase, type, cell}
  output logic        ro_pop,
  output logic        done_push,
  output logic [7:0]  done_addr,
  output logic [7:0]  gray_raddr,
  input  logic [7:0]  gray_rdata,
  input  logic [3:0]  fault_code,
  input  logic        read_rate,     // 0 = 5 MHz, 1 = 6.67 MHz
  input  logic [2:0]  adc_phase,
  input  logic [2:0]  sd_phase,
  input  logic [4:0]  trig_delay,
  input  logic        check_align,
  input  logic        rd_align,      // address phase may start this clock
  output logic        tsc_req,
  output logic [3:0]  tsc_cmd,
  output logic [23:0] tsc_param,
  output logic        tsc_has_param,
  input  logic        tsc_busy,
  output logic        slice_start,
  output logic        slice_first,
  output logic        rd_clk,
  output logic        sd,
  output logic        rd,
  output logic [1:0]  gain,
  output logic        adc_clk,
  output logic        trig_data,
  output logic        dav,
  output logic        busy
);
  typedef enum logic [2:0] {S_IDLE, S_CMD, S_CMDWAIT, S_ADDR, S_RD, S_CONV, S_DONE} state_e;
  state_e      st;
  logic [3:0]  pc;        // clock within RDCLK period
  logic [3:0]  n;         // bit or channel index
  logic [7:0]  code;      // gray-coded cell address
  logic [7:0]  sd_sr, adc_sr;
  logic [31:0] dav_sr;
  logic [16:0] chk;
  logic        rdclk_i, sd_i, adc_i, dav_i;

  wire [3:0] per  = read_rate ? 4'd6 : 4'd8;
  wire       pend = (pc == per - 1'b1);

  slice_info_t info;
  always_comb begin
    info          = '0;
    info.fault    = fault_code;
    info.sca_addr = ro_head[7:0];
    info.ttype    = ro_head[8];
    info.phase    = ro_head[9];
    info.first    = ro_head[10];
  end

  assign gray_raddr = ro_head[7:0];
  assign done_addr  = ro_head[7:0];
  assign ro_pop     = (st == S_DONE);
  assign done_push  = (st == S_DONE);
  assign slice_first = ro_head[10];

  // tsc requests: slice start in S_CMD, coarse check while idle
  wire chk_due = check_align && (chk >= 17'(CHECK_PERIOD));
  always_comb begin
    tsc_req       = 1'b0;
    tsc_cmd       = TSC_SLICE_START;
    tsc_param     = info;
    tsc_has_param = 1'b1;
    if (st == S_CMD) begin
      tsc_req = 1'b1;
    end else if (st == S_IDLE && ro_empty && chk_due) begin
      tsc_req       = 1'b1;
      tsc_cmd       = TSC_CHECK_COARSE;
      tsc_has_param = 1'b0;
    end
  end
  assign slice_start = (st == S_CMD) && !tsc_busy;

  always_ff @(posedge clk) begin
    if (srst) begin
      st   <= S_IDLE;
      pc   <= '0;
      n    <= '0;
      code <= '0;
      chk  <= '0;
    end else begin
      if (tsc_req && !tsc_busy && st == S_IDLE) chk <= '0;
      else if (chk != 17'h1ffff) chk <= chk + 1'b1;
      case (st)
        S_IDLE: if (!ro_empty && !tsc_busy) st <= S_CMD;
        S_CMD:  if (!tsc_busy) begin
                  st   <= S_CMDWAIT;
                  code <= gray_rdata;
                end
        S_CMDWAIT: if (!tsc_busy && rd_align) begin
                  st <= S_ADDR; pc <= '0; n <= '0;
                end
        S_ADDR: begin
                  pc <= pend ? 4'd0 : pc + 1'b1;
                  if (pend) begin
                    n <= n + 1'b1;
                    if (n == 4'd7) begin st <= S_RD; n <= '0; end
                  end
                end
        S_RD:   begin
                  pc <= pend ? 4'd0 : pc + 1'b1;
                  if (pend) st <= S_CONV;
                end
        S_CONV: begin
                  pc <= pend ? 4'd0 : pc + 1'b1;
                  if (pend) begin
                    n <= n + 1'b1;
                    if (n == 4'd11) begin st <= S_DONE; n <= '0; end
                  end
                end
        default: st <= S_IDLE;   // S_DONE
      endcase
    end
  end

  // raw (undelayed) waveforms
  wire in_rd = (st == S_ADDR) || (st == S_RD) || (st == S_CONV);
  assign rdclk_i = in_rd && (pc < (per >> 1));
  assign sd_i    = (st == S_ADDR) && code[3'd7 - n[2:0]];
  assign adc_i   = (st == S_CONV) && (pc < (per >> 1));
  assign dav_i   = (st == S_CONV) && (pc < 4'd6);

  always_ff @(posedge clk) begin
    if (srst) begin
      sd_sr  <= '0;
      adc_sr <= '0;
      dav_sr <= '0;
      rd_clk <= 1'b0;
      rd     <= 1'b0;
      dav    <= 1'b0;
    end else begin
      sd_sr  <= {sd_sr[6:0], sd_i};
      adc_sr <= {adc_sr[6:0], adc_i};
      dav_sr <= {dav_sr[30:0], dav_i};
      rd_clk <= rdclk_i;
      rd     <= (st == S_RD);
      dav    <= dav_i;
    end
  end

  assign sd        = sd_sr[sd_phase];
  assign adc_clk   = adc_sr[adc_phase];
  assign trig_data = !dav_sr[(trig_delay < 5'd2) ? 5'd2 : trig_delay];
  assign gain      = 2'b00;
  assign busy      = (st != S_IDLE);
endmodule
