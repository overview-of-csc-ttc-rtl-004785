// tb_bpi_fpga: one BPI FPGA driven as the TTC FPGA and the G-Links would.
// Checks register defaults and read-back, the channel-order table through
// the nibble port (one entry changed), then sends four time slices: TTC
// mode, SERIAL SliceStart commands and EXPECTED_RXDATA are delayed in the
// FPGA's TTC pipeline (latency 3) and the G-Link words arrive three clocks
// after the matching EXPECTED_RXDATA. Every DPU output word of every frame
// is compared with the samples sent, in table order, plus the header and
// the chip id in the status words.
`timescale 1ns/1ps
module tb_bpi_fpga;
  import sit_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, oclk = 0, rst = 1, orst = 1;
  logic [1:0] tmode = TMODE_SYNC_RESET;
  logic exp_rx = 0, serial = 0;
  logic [1:0] rxr_out;
  logic [15:0] bg_src [2] = '{16'h0, 16'h0};
  logic [15:0] bgd [2][LAT];
  logic [3:0] reg_a = 0, reg_din = 0, reg_dout;
  logic reg_stb_n = 1, reg_wr_n = 1;
  logic [24:0] ic;
  always #12.5 clk = !clk;
  always #9 oclk = !oclk;
  always @(posedge clk) for (int l = 0; l < 2; l++) begin
    bgd[l][0] <= bg_src[l];
    for (int i = 1; i < LAT; i++) bgd[l][i] <= bgd[l][i-1];
  end
  bpi_fpga dut (.clk(clk), .rst(rst), .oclk(oclk), .orst(orst), .tmode(tmode), .locked(1'b1),
    .expected_rxdata(exp_rx), .serial(serial), .rxready_out(rxr_out), .bg_a(bgd[0][LAT-1]), .bg_b(bgd[1][LAT-1]),
    .rxdata(2'b11), .rxerror(2'b00), .rxready(2'b11), .reg_a(reg_a), .reg_din(reg_din), .reg_dout(reg_dout),
    .reg_stb_n(reg_stb_n), .reg_wr_n(reg_wr_n), .ic_dpu(ic));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", s); end
  endtask
  task automatic wr(input logic [3:0] a, input logic [3:0] d);
    @(posedge clk); reg_a <= a; reg_din <= d; reg_wr_n <= 0; reg_stb_n <= 0;
    repeat (3) @(posedge clk); reg_stb_n <= 1; reg_wr_n <= 1; repeat (3) @(posedge clk);
  endtask
  task automatic rd(input logic [3:0] a, output logic [3:0] d);
    @(posedge clk); reg_a <= a; reg_wr_n <= 1; reg_stb_n <= 0;
    repeat (2) @(posedge clk); d = reg_dout; @(posedge clk); reg_stb_n <= 1; repeat (3) @(posedge clk);
  endtask
  // table model and sent samples
  logic [15:0] lut [256];
  logic [11:0] samp [$][2][24][4];
  function automatic logic [11:0] sample_at(input int f, input logic [7:0] e);
    return samp[f][e[2]][e[7:3]][e[1:0]];
  endfunction
  int frame = 0, wk = 0;
  logic [11:0] got [256];
  always @(posedge oclk) if (!orst && ic[24]) begin
    got[2*wk+1] = ic[23:12]; got[2*wk] = ic[11:0];
    wk++;
    if (wk == 128) begin
      wk = 0;
      for (int i = 0; i < 96; i++) begin
        check(got[2*i+1] == sample_at(frame, lut[i][15:8]) && got[2*i] == sample_at(frame, lut[i][7:0]),
              $sformatf("frame %0d word %0d", frame, i));
      end
      check(got[56*4+3] == 12'hfae && got[56*4+2] == 12'hfed, "header");
      check(got[61*4+2][11:8] == 4'hc, "chip id");
      check(got[62*4+2] == 12'(frame), "slice counter");
      frame++;
    end
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [3:0] r;
  initial begin
    for (int k = 0; k < 256; k++) lut[k] = {8'(2*k+1), 8'(2*k)};
    repeat (4) @(posedge clk); rst = 0; @(posedge oclk); orst = 0;
    rd(BPIR_IN_WC_L, r);  check(r == 4'h8, "in wc low default");
    rd(BPIR_IN_WC_H, r);  check(r == 4'h4, "in wc high default");
    rd(BPIR_OUT_WC_H, r); check(r == 4'h8, "out wc high default");
    wr(BPIR_CHIP_ID, 4'hc);
    wr(BPIR_TTC_LAT_L, 4'(LAT));
    rd(BPIR_TTC_LAT_L, r); check(r == 4'(LAT), "latency read-back");
    wr(BPIR_ALIGN, 4'h9); rd(BPIR_ALIGN, r); check(r == 4'h9, "align read-back");
    // change table entry 2 to {8'h05, 8'h04} through the nibble port
    wr(BPIR_CONTROL, 4'b0101); rd(BPIR_REORDER_LUT, r); wr(BPIR_CONTROL, 4'b0100);
    for (int n = 0; n < 12; n++) wr(BPIR_REORDER_LUT, n < 8 ? lut[n / 4][4*(n%4) +: 4] : (n == 8 ? 4'h4 : n == 10 ? 4'h5 : 4'h0));
    lut[2] = 16'h0504;
    wr(BPIR_CONTROL, 4'b0101); rd(BPIR_REORDER_LUT, r); wr(BPIR_CONTROL, 4'b0100);
    for (int n = 0; n < 16; n++) begin
      rd(BPIR_REORDER_LUT, r);
      check(r == lut[n / 4][4*(n%4) +: 4], $sformatf("table nibble %0d", n));
    end
    // run: sync reset, then four slices
    tmode = TMODE_SYNC_RESET; repeat (20) @(negedge clk);
    tmode = TMODE_RUNNING; repeat (10) @(negedge clk);
    for (int f = 0; f < 4; f++) begin
      logic [27:0] cmd;
      slice_info_t si;
      si = '0; si.sca_addr = 8'(f * 7); si.first = (f == 0);
      cmd = {TSC_SLICE_START, 24'(si)};
      samp.push_back('{default: '0});
      for (int l = 0; l < 2; l++) for (int k = 0; k < 24; k++) for (int j = 0; j < 4; j++) samp[f][l][k][j] = 12'($urandom);
      for (int b = 27; b >= 0; b--) begin serial = cmd[b]; @(negedge clk); end
      serial = 0; repeat (10) @(negedge clk);
      for (int k = 0; k < 24; k++) for (int n = 0; n < 3; n++) begin
        exp_rx = 1;
        for (int l = 0; l < 2; l++) for (int j = 0; j < 4; j++) bg_src[l][4*j +: 4] = samp[f][l][k][j][4*n +: 4];
        @(negedge clk);
      end
      exp_rx = 0; bg_src = '{16'h0, 16'h0};
      repeat (150) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    check(frame == 4, $sformatf("frames %0d", frame));
    rd(BPIR_STATUS, r); check(r == 4'h0, "no bad command, no overrun");
    rd(BPIR_FAL_STATUS0, r); check(r[3], "link 0 aligned");
    check(rxr_out == 2'b11, "rxready passed back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
