// input_seq: input sequencer of the BPI FPGA. It writes each time slice
// (input frame) from the two deserializers into the Data DPRAMs, appends the
// eight slice status registers, and hands the finished page to the output
// sequencer.
//
// Modes (BPIR_Control M): 0 disabled, 1 normal, 2/3 capture raw data of link
// 0/1. The sequencer is armed by the (pipelined) synchronous reset in a
// non-zero mode (it starts when the reset ends) and returns to disabled on
// tscRunEnd.
//
// Normal mode: tscSliceStart (its command bits) opens a slice: the word
// counts and error summary are cleared and both deserializers are
// cycle-aligned. Each deserialized 48-bit word is written at input address
// 2k (link 0) and 2k+1 (link 1) for the k-th triplet of the slice, so with
// 72 validated G-Link cycles addresses 0-47 hold the 192 samples. When
// in_wc cycles of EXPECTED_RXDATA have arrived and the last word is written,
// status registers 56-63 follow in that order, the frame is handed over
// (frame_done toggles, frame_page names the page) and the page flips. A
// slice start before all words arrived aborts the slice (FERR_CMD_MIDSLICE,
// reported in the next slice). A slice command that arrives while the status
// words are being written takes effect when the last one is written.
//
// Capture mode: every G-Link cycle of the chosen link, whatever RXDATA says,
// becomes a 24-bit value {R V S E M[7:0]} {T K 0 D L[7:0]}; two cycles make
// one DPRAM word (first value in bits 23:0). In the clock between the two
// cycles of a pair, one status register is written, 56 .. 63 in turn. After
// in_wc words a frame is complete. Capture runs from the synchronous reset
// until the TTC mode shows Stopped.
//
// Status word layout: {SH, SL, 24'h0}; 56 fae/fed, 57 RXERROR counts,
// 58 RXDATA-mismatch counts (12-bit, saturating, counted only while LOCKED),
// 59 alignment status {0, phase=0, RXREADY, cycle aligned, history=0},
// 60 zero, 61 slice descriptor {C, A} / {chip id, 0, T, P, F}, 62 event and
// slice counters, 63 error summary {000 D E Y 000 d e y} / {0000_0000 L C R S}.
// Input addresses are {0, page, a[5:0]}.
module input_seq
  import sit_pkg::*;
(
  input  logic        clk,
  input  ism_mode_e   mode,
  input  logic [7:0]  in_wc,
  input  logic [3:0]  chip_id,
  input  logic        tl_sync_reset,
  input  logic        tl_stopped,
  input  logic        tl_trigger,
  input  logic        tl_locked,
  input  logic        tl_expected_rxdata,
  input  logic        tl_serial,
  // serial commands
  input  logic        cmd_slice,
  input  logic        info_valid,
  input  slice_info_t info,
  input  logic        run_end,
  // G-Link receivers
  input  logic [15:0] bg [2],
  input  logic [1:0]  rxdata,
  input  logic [1:0]  rxerror,
  input  logic [1:0]  rxready,
  // deserializers
  input  logic [47:0] dw [2],
  input  logic [1:0]  dv,
  input  logic [1:0]  aligned,
  output logic        des_align,
  // Data DPRAM write port
  output logic        we,
  output logic [7:0]  waddr,
  output logic [47:0] wdata,
  output logic        frame_done,
  output logic        frame_page
);
  typedef enum logic [1:0] {I_OFF, I_NORMAL, I_CAPTURE} istate_e;
  istate_e     st;
  logic        page;
  logic [7:0]  wcnt;            // validated cycles (normal) or words (capture)
  logic [4:0]  k;               // triplet index
  logic        hv;              // link-1 word waiting
  logic [47:0] hold;
  logic        in_slice, ending, exp_d;
  logic [3:0]  sidx;            // status register 0..7, 8 = idle
  slice_info_t sinfo;
  logic [11:0] errc [2], datc [2];
  logic [11:0] evcnt, slcnt;
  logic [2:0]  fe_rxdata, fe_rxerror, fe_rxready;   // {unused, link1, link0}
  logic        fe_lost_lock, fe_midslice, fe_recover;
  logic        cap_half;
  logic [23:0] cap_lo;
  logic        clink;
  logic        arm;               // armed by a synchronous reset
  logic        pend_start;        // slice command seen during a status write

  wire [23:0] cap_val = {tl_sync_reset, tl_expected_rxdata, tl_serial, rxerror[clink], bg[clink][15:8],
                         tl_trigger, tl_locked, 1'b0, rxdata[clink], bg[clink][7:0]};

  // status register contents
  function automatic logic [47:0] status_word(input logic [2:0] i);
    logic [11:0] sh, sl;
    logic        s;
    s = |fe_rxdata | |fe_rxerror | |fe_rxready | fe_lost_lock | fe_midslice | fe_recover;
    case (i)
      3'd0: begin sh = 12'hfae; sl = 12'hfed; end
      3'd1: begin sh = errc[1]; sl = errc[0]; end
      3'd2: begin sh = datc[1]; sl = datc[0]; end
      3'd3: begin sh = {2'b00, rxready[1], aligned[1], 8'h00};
                  sl = {2'b00, rxready[0], aligned[0], 8'h00}; end
      3'd4: begin sh = '0; sl = '0; end
      3'd5: begin sh = {sinfo.fault, sinfo.sca_addr};
                  sl = {chip_id, 5'd0, sinfo.ttype, sinfo.phase, sinfo.first}; end
      3'd6: begin sh = evcnt; sl = slcnt; end
      default: begin
                  sh = {3'b000, fe_rxdata[1], fe_rxerror[1], fe_rxready[1],
                        3'b000, fe_rxdata[0], fe_rxerror[0], fe_rxready[0]};
                  sl = {8'h00, fe_lost_lock, fe_midslice, fe_recover, s};
               end
    endcase
    return {sh, sl, 24'h000000};
  endfunction

  // the last status word of a slice is written in this clock
  wire fin   = (st == I_NORMAL) && !dv[0] && !hv && (sidx == 4'd7);
  // a slice starts on its command, or once the previous slice's status is
  // written if the command came during that write
  wire start = (st == I_NORMAL) && ((cmd_slice && (!ending || fin)) || (pend_start && fin));
  assign des_align = start;

  // one DPRAM write per clock
  always_comb begin
    we    = 1'b0;
    waddr = {1'b0, page, 6'd0};
    wdata = '0;
    if (st == I_NORMAL) begin
      if (dv[0]) begin
        we = 1'b1; waddr = {1'b0, page, k, 1'b0}; wdata = dw[0];
      end else if (hv) begin
        we = 1'b1; waddr = {1'b0, page, k, 1'b1}; wdata = hold;
      end else if (sidx != 4'd8) begin
        we = 1'b1; waddr = {1'b0, page, 3'b111, sidx[2:0]}; wdata = status_word(sidx[2:0]);
      end
    end else if (st == I_CAPTURE) begin
      if (cap_half) begin
        we = 1'b1; waddr = {1'b0, page, wcnt[5:0]}; wdata = {cap_val, cap_lo};
      end else begin
        we = 1'b1; waddr = {1'b0, page, 3'b111, sidx[2:0]}; wdata = status_word(sidx[2:0]);
      end
    end
  end

  always_ff @(posedge clk) begin
    frame_done <= frame_done;
    exp_d      <= tl_expected_rxdata;
    if (tl_sync_reset) begin
      st           <= I_OFF;
      arm          <= 1'b1;
      pend_start   <= 1'b0;
      clink        <= (mode == ISM_CAPTURE1);
      page         <= 1'b0;
      wcnt         <= '0;
      k            <= '0;
      hv           <= 1'b0;
      in_slice     <= 1'b0;
      ending       <= 1'b0;
      sidx         <= (mode == ISM_NORMAL) ? 4'd8 : 4'd0;
      sinfo        <= '0;
      errc         <= '{default: '0};
      datc         <= '{default: '0};
      evcnt        <= '0;
      slcnt        <= '0;
      fe_rxdata    <= '0; fe_rxerror <= '0; fe_rxready <= '0;
      fe_lost_lock <= 1'b0; fe_midslice <= 1'b0; fe_recover <= 1'b0;
      cap_half     <= 1'b0;
      frame_done   <= 1'b0;
      frame_page   <= 1'b0;
    end else begin
      // saturating link error counters
      for (int l = 0; l < 2; l++) begin
        if (tl_locked && rxerror[l] && errc[l] != 12'hfff) errc[l] <= errc[l] + 1'b1;
        if (tl_locked && (rxdata[l] != tl_expected_rxdata) && datc[l] != 12'hfff)
          datc[l] <= datc[l] + 1'b1;
      end
      if (arm) begin
        arm <= 1'b0;
        st  <= (mode == ISM_NORMAL) ? I_NORMAL : (mode == ISM_DISABLED) ? I_OFF : I_CAPTURE;
      end
      if (run_end) st <= I_OFF;
      case (st)
        I_NORMAL: begin
          if (cmd_slice && ending && !fin) pend_start <= 1'b1;
          if (info_valid) begin
            sinfo <= info;
            if (info.first && slcnt != '0) evcnt <= evcnt + 1'b1;
          end
          if (in_slice && !ending) begin
            if (tl_expected_rxdata) wcnt <= wcnt + 1'b1;
            for (int l = 0; l < 2; l++) begin
              if (tl_expected_rxdata && rxdata[l] != 1'b1) fe_rxdata[l] <= 1'b1;
              if (tl_expected_rxdata && rxerror[l]) fe_rxerror[l] <= 1'b1;
              if (tl_expected_rxdata && !rxready[l]) fe_rxready[l] <= 1'b1;
            end
            if (!tl_locked) fe_lost_lock <= 1'b1;
            if (wcnt == in_wc && !exp_d && !dv[0] && !hv) begin
              ending <= 1'b1;
              sidx   <= 4'd0;
            end
          end
          if (dv[0]) begin
            hv   <= 1'b1;
            hold <= dw[1];
          end else if (hv) begin
            hv <= 1'b0;
            k  <= k + 1'b1;
          end else if (sidx != 4'd8) begin
            sidx <= sidx + 1'b1;
          end
          if (fin) begin
            frame_done <= !frame_done;
            frame_page <= page;
            page       <= !page;
            in_slice   <= 1'b0;
            ending     <= 1'b0;
            slcnt      <= slcnt + 1'b1;
          end
          if (start) begin
            // a start while data is still expected aborts that slice
            fe_midslice  <= in_slice && !ending;
            in_slice     <= 1'b1;
            ending       <= 1'b0;
            pend_start   <= 1'b0;
            wcnt         <= '0;
            k            <= '0;
            hv           <= 1'b0;
            sidx         <= 4'd8;
            fe_rxdata    <= '0; fe_rxerror <= '0; fe_rxready <= '0;
            fe_lost_lock <= 1'b0; fe_recover <= 1'b0;
          end
        end
        I_CAPTURE: begin
          if (tl_stopped) st <= I_OFF;
          cap_half <= !cap_half;
          if (!cap_half) cap_lo <= cap_val;
          else begin
            if (wcnt + 1'b1 >= in_wc) begin
              wcnt       <= '0;
              frame_done <= !frame_done;
              frame_page <= page;
              page       <= !page;
            end else begin
              wcnt <= wcnt + 1'b1;
            end
          end
          if (!cap_half) sidx <= {1'b0, sidx[2:0] + 3'd1};
        end
        default: ;
      endcase
    end
  end
endmodule
