// sit_top: the TTC FPGA and its BPI FPGAs as wired on the readout board for
// the system integration test. The TTC FPGA drives the same TTC mode,
// LOCKED, EXPECTED_RXDATA and SERIAL lines to every BPI FPGA (separate
// point-to-point lines carrying the same values) and collects two RXREADY
// lines from each. The G-Link transmitters and receivers of the transition
// module, the HPU and the DPUs are outside this design: their signals are
// the ports. Each BPI FPGA has its own register bus and DPU output.
//
// Clocks: rclk (40 MHz) runs the TTC FPGA and the input side of the BPI
// FPGAs; oclk runs the BPI output side. rst and orst are synchronous power-on
// resets of the two domains.
module sit_top
  import sit_pkg::*;
#(
  parameter int unsigned N_BPI = 4
) (
  input  logic        rclk,
  input  logic        rst,
  input  logic        oclk,
  input  logic        orst,
  // HPU
  input  logic [3:0]  hpu_a,
  input  logic [15:0] hpu_din,
  output logic [15:0] hpu_dout,
  input  logic        hpu_stb_n,
  input  logic        hpu_wr_n,
  // triggers and transition module
  input  logic        fp_ttc,
  input  logic        l1a,
  output logic        cal,
  input  logic        tmp_n,
  input  logic [2*N_BPI-1:0] sig_detect,
  output logic [15:0] fe,
  output logic        tx_enable,
  // G-Link receivers, two per BPI FPGA
  input  logic [15:0] bg_a    [N_BPI],
  input  logic [15:0] bg_b    [N_BPI],
  input  logic [1:0]  rxdata  [N_BPI],
  input  logic [1:0]  rxerror [N_BPI],
  input  logic [1:0]  rxready [N_BPI],
  // BPI register buses
  input  logic [3:0]  bpi_a     [N_BPI],
  input  logic [3:0]  bpi_din   [N_BPI],
  output logic [3:0]  bpi_dout  [N_BPI],
  input  logic [N_BPI-1:0] bpi_stb_n,
  input  logic [N_BPI-1:0] bpi_wr_n,
  // DPU outputs
  output logic [24:0] ic_dpu  [N_BPI]
);
  logic [1:0]         tmode;
  logic               locked, expected_rxdata, serial;
  logic [2*N_BPI-1:0] rxready_ttc;

  ttc_fpga u_ttc (
    .clk(rclk), .rst(rst), .hpu_a(hpu_a), .hpu_din(hpu_din), .hpu_dout(hpu_dout),
    .hpu_stb_n(hpu_stb_n), .hpu_wr_n(hpu_wr_n), .fp_ttc(fp_ttc), .l1a(l1a), .cal(cal),
    .tmp_n(tmp_n), .sig_detect(8'(sig_detect)), .fe(fe), .tx_enable(tx_enable),
    .rxready(8'(rxready_ttc)), .tmode(tmode), .locked(locked),
    .expected_rxdata(expected_rxdata), .serial(serial));

  for (genvar b = 0; b < N_BPI; b++) begin : g_bpi
    bpi_fpga u_bpi (
      .clk(rclk), .rst(rst), .oclk(oclk), .orst(orst),
      .tmode(tmode), .locked(locked), .expected_rxdata(expected_rxdata), .serial(serial),
      .rxready_out(rxready_ttc[2*b +: 2]),
      .bg_a(bg_a[b]), .bg_b(bg_b[b]), .rxdata(rxdata[b]), .rxerror(rxerror[b]),
      .rxready(rxready[b]),
      .reg_a(bpi_a[b]), .reg_din(bpi_din[b]), .reg_dout(bpi_dout[b]),
      .reg_stb_n(bpi_stb_n[b]), .reg_wr_n(bpi_wr_n[b]), .ic_dpu(ic_dpu[b]));
  end
endmodule
