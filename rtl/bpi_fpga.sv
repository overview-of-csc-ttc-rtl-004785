// bpi_fpga: one BPI FPGA. It receives the ADC data of two G-Link receivers,
// assembles the 12-bit samples, stores each time slice with its status words
// in two Data DPRAMs and streams it, reordered, to its DPU, two samples per
// output clock.
//
// Path: G-Link words -> deserializer (one per link) -> input sequencer ->
// Data DPRAM A and B (identical contents) -> output sequencer through the
// channel-order table -> IC_DPU[24:0]. The TTC FPGA's lines (TTC mode,
// LOCKED, EXPECTED_RXDATA, SERIAL) pass the TTC pipeline so that they line up
// with the received data; the serial commands are decoded by tsc_rx.
//
// Register bus: 4-bit data, 4-bit address. An access happens on the falling
// edge of reg_stb_n (sampled by clk, two-flop synchronized); reg_wr_n low
// makes it a write. Read data is combinational from reg_a. Registers follow
// the BPIR_* map in sit_pkg: chip id (W1), status {0,0,bad command,overrun}
// (R1), link and cycle-alignment status (2-5), alignment control (6, stored
// only), control {mode[1:0], 0, L} (7), TTC latency (8/9), input words per
// frame (10/11), output words per frame (12/13), channel-order table nibble
// port (14, address auto-increments, reset while L is set), ADC reformat
// (15). Defaults after rst: mode 0, latency 0, 72 input cycles, 128 output
// words, reformat 0.
//
// Clocks: clk is the 40 MHz link clock, oclk the DPU output clock; rst and
// orst are their synchronous resets. The RXREADY lines of both receivers are
// passed back to the TTC FPGA.
module bpi_fpga
  import sit_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        oclk,
  input  logic        orst,
  // from the TTC FPGA
  input  logic [1:0]  tmode,
  input  logic        locked,
  input  logic        expected_rxdata,
  input  logic        serial,
  output logic [1:0]  rxready_out,
  // G-Link receivers
  input  logic [15:0] bg_a,
  input  logic [15:0] bg_b,
  input  logic [1:0]  rxdata,
  input  logic [1:0]  rxerror,
  input  logic [1:0]  rxready,
  // register bus
  input  logic [3:0]  reg_a,
  input  logic [3:0]  reg_din,
  output logic [3:0]  reg_dout,
  input  logic        reg_stb_n,
  input  logic        reg_wr_n,
  // to the DPU
  output logic [24:0] ic_dpu
);
  // ---------------- registers
  logic [2:0] stb_s;
  logic [3:0] chip_id, align_ctl, aux;
  logic [1:0] mode;
  logic       lut_rst;
  logic [7:0] ttc_lat, in_wc, out_wc;
  logic [9:0] lut_na;
  logic [3:0] lut_rn;
  logic       bad_cmd_f;
  logic [1:0] ovr_s;
  logic       overrun;

  wire acc = stb_s[2] && !stb_s[1];
  wire wr  = acc && !reg_wr_n;

  always_ff @(posedge clk) begin
    if (rst) begin
      stb_s <= '1; chip_id <= '0; align_ctl <= '0; aux <= '0; mode <= '0; lut_rst <= 1'b0;
      ttc_lat <= '0; in_wc <= 8'd72; out_wc <= 8'd128; lut_na <= '0; ovr_s <= '0;
    end else begin
      stb_s <= {stb_s[1:0], reg_stb_n};
      ovr_s <= {ovr_s[0], overrun};
      if (wr) case (reg_a)
        BPIR_CHIP_ID:     chip_id   <= reg_din;
        BPIR_ALIGN:       align_ctl <= reg_din;
        BPIR_CONTROL:     begin mode <= reg_din[3:2]; lut_rst <= reg_din[0]; end
        BPIR_TTC_LAT_L:   ttc_lat[3:0] <= reg_din;
        BPIR_TTC_LAT_H:   ttc_lat[7:4] <= reg_din;
        BPIR_IN_WC_L:     in_wc[3:0]   <= reg_din;
        BPIR_IN_WC_H:     in_wc[7:4]   <= reg_din;
        BPIR_OUT_WC_L:    out_wc[3:0]  <= reg_din;
        BPIR_OUT_WC_H:    out_wc[7:4]  <= reg_din;
        BPIR_AUX_CONTROL: aux <= reg_din;
        default: ;
      endcase
      if (lut_rst) lut_na <= '0;
      else if (acc && reg_a == BPIR_REORDER_LUT) lut_na <= lut_na + 1'b1;
    end
  end

  // ---------------- TTC pipeline and serial commands
  logic tl_sync_reset, tl_trigger, tl_running, tl_stopped, tl_locked, tl_exp, tl_serial;
  bpi_ttc_pipe u_pipe (
    .clk(clk), .latency(ttc_lat), .tmode(tmode), .locked(locked),
    .expected_rxdata(expected_rxdata), .serial(serial),
    .tl_sync_reset(tl_sync_reset), .tl_trigger(tl_trigger), .tl_running(tl_running),
    .tl_stopped(tl_stopped), .tl_locked(tl_locked), .tl_expected_rxdata(tl_exp),
    .tl_serial(tl_serial));

  logic        cmd_slice, info_valid, run_end, align_fine, align_coarse, check_coarse, bad_cmd;
  slice_info_t info;
  tsc_rx u_rx (
    .clk(clk), .srst(rst), .serial(tl_serial), .cmd_slice(cmd_slice), .info_valid(info_valid),
    .info(info), .run_end(run_end), .align_fine(align_fine), .align_coarse(align_coarse),
    .check_coarse(check_coarse), .bad_cmd(bad_cmd));

  always_ff @(posedge clk) begin
    if (rst || tl_sync_reset) bad_cmd_f <= 1'b0;
    else if (bad_cmd)         bad_cmd_f <= 1'b1;
  end

  // ---------------- deserializers
  logic [47:0] dw [2];
  logic [1:0]  dv, aligned;
  logic        des_align;
  logic [15:0] bgs [2];
  assign bgs[0] = bg_a;
  assign bgs[1] = bg_b;

  for (genvar l = 0; l < 2; l++) begin : g_des
    deserializer u_des (
      .clk(clk), .srst(tl_sync_reset), .align(des_align), .in_valid(tl_exp),
      .bg(bgs[l]), .reformat(aux[1:0]), .word(dw[l]), .valid(dv[l]), .aligned(aligned[l]));
  end

  // ---------------- input sequencer and Data DPRAMs
  logic        we, frame_done, frame_page;
  logic [7:0]  waddr;
  logic [47:0] wdata;
  input_seq u_in (
    .clk(clk), .mode(ism_mode_e'(mode)), .in_wc(in_wc), .chip_id(chip_id),
    .tl_sync_reset(tl_sync_reset), .tl_stopped(tl_stopped), .tl_trigger(tl_trigger),
    .tl_locked(tl_locked), .tl_expected_rxdata(tl_exp), .tl_serial(tl_serial),
    .cmd_slice(cmd_slice), .info_valid(info_valid), .info(info), .run_end(run_end),
    .bg(bgs), .rxdata(rxdata), .rxerror(rxerror), .rxready(rxready),
    .dw(dw), .dv(dv), .aligned(aligned), .des_align(des_align),
    .we(we), .waddr(waddr), .wdata(wdata), .frame_done(frame_done), .frame_page(frame_page));

  logic [9:0]  raddr_a, raddr_b;
  logic [11:0] q_a, q_b;
  data_dpram u_dpa (.wclk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                    .rclk(oclk), .raddr(raddr_a), .rdata(q_a));
  data_dpram u_dpb (.wclk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                    .rclk(oclk), .raddr(raddr_b), .rdata(q_b));

  // ---------------- output side
  logic [7:0]  lut_ra;
  logic [15:0] lut_entry;
  reorder_lut u_lut (
    .clk(clk), .we(wr && reg_a == BPIR_REORDER_LUT && !lut_rst), .naddr(lut_na), .wdata(reg_din),
    .rdata_n(lut_rn), .rclk(oclk), .raddr(lut_ra), .entry(lut_entry));

  output_seq u_out (
    .oclk(oclk), .orst(orst), .frame_done(frame_done), .frame_page(frame_page), .out_wc(out_wc),
    .lut_addr(lut_ra), .lut_entry(lut_entry), .raddr_a(raddr_a), .raddr_b(raddr_b),
    .q_a(q_a), .q_b(q_b), .ic_dpu(ic_dpu), .overrun(overrun));

  // ---------------- read mux
  always_comb begin
    case (reg_a)
      BPIR_STATUS:       reg_dout = {2'b00, bad_cmd_f, ovr_s[1]};
      BPIR_LINK_STATUS0: reg_dout = {1'b0, rxready[0], 2'b00};
      BPIR_LINK_STATUS1: reg_dout = {1'b0, rxready[1], 2'b00};
      BPIR_FAL_STATUS0:  reg_dout = {aligned[0], 3'b000};
      BPIR_FAL_STATUS1:  reg_dout = {aligned[1], 3'b000};
      BPIR_ALIGN:        reg_dout = align_ctl;
      BPIR_CONTROL:      reg_dout = {mode, 1'b0, lut_rst};
      BPIR_TTC_LAT_L:    reg_dout = ttc_lat[3:0];
      BPIR_TTC_LAT_H:    reg_dout = ttc_lat[7:4];
      BPIR_IN_WC_L:      reg_dout = in_wc[3:0];
      BPIR_IN_WC_H:      reg_dout = in_wc[7:4];
      BPIR_OUT_WC_L:     reg_dout = out_wc[3:0];
      BPIR_OUT_WC_H:     reg_dout = out_wc[7:4];
      BPIR_REORDER_LUT:  reg_dout = lut_rn;
      BPIR_AUX_CONTROL:  reg_dout = aux;
      default:           reg_dout = 4'h0;
    endcase
  end

  assign rxready_out = rxready;
endmodule
