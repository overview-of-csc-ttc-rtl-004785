// tb_ttc_fpga: the TTC FPGA through its HPU bus. Checks register defaults
// and read-back, link status and LOCKED, the gray-code table port, the TTC
// mode sequence (SyncReset, Running, Trigger, Stopped), the serial command
// stream decoded from SERIAL (alignment commands on request, SliceStart per
// slice of each trigger, one RunEnd after the run stops at the maximum
// trigger count) and the trigger records in the TTC FIFO.
`timescale 1ns/1ps
module tb_ttc_fpga;
  import sit_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0]  hpu_a = 0;
  logic [15:0] hpu_din = 0, hpu_dout, fe;
  logic hpu_stb_n = 1, hpu_wr_n = 1, cal, tx_enable, locked, exp_rx, serial;
  logic [7:0] rxready = 8'hff;
  logic [1:0] tmode;
  always #12.5 clk = !clk;
  ttc_fpga dut (.clk(clk), .rst(rst), .hpu_a(hpu_a), .hpu_din(hpu_din), .hpu_dout(hpu_dout),
    .hpu_stb_n(hpu_stb_n), .hpu_wr_n(hpu_wr_n), .fp_ttc(1'b0), .l1a(1'b0), .cal(cal), .tmp_n(1'b1),
    .sig_detect(8'h5a), .fe(fe), .tx_enable(tx_enable), .rxready(rxready), .tmode(tmode),
    .locked(locked), .expected_rxdata(exp_rx), .serial(serial));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", s); end
  endtask
  task automatic hpu_write(input logic [3:0] a, input logic [15:0] d);
    @(posedge clk); hpu_a <= a; hpu_din <= d; hpu_wr_n <= 0; hpu_stb_n <= 0;
    repeat (3) @(posedge clk); hpu_stb_n <= 1; hpu_wr_n <= 1;
    repeat (3) @(posedge clk);
  endtask
  task automatic hpu_read(input logic [3:0] a, output logic [15:0] d);
    @(posedge clk); hpu_a <= a; hpu_wr_n <= 1; hpu_stb_n <= 0;
    repeat (2) @(posedge clk); d = hpu_dout; @(posedge clk); hpu_stb_n <= 1;
    repeat (3) @(posedge clk);
  endtask
  // serial command decoder and TTC mode counters
  int n_slice = 0, n_end = 0, n_fine = 0, n_coarse = 0, n_other = 0, n_trig = 0, n_stop = 0;
  initial forever begin
    logic [3:0] c;
    @(posedge clk);
    if (!rst && serial) begin
      c[3] = 1;
      for (int i = 2; i >= 0; i--) begin @(posedge clk); c[i] = serial; end
      case (c)
        TSC_SLICE_START: begin n_slice++; repeat (24) @(posedge clk); end
        TSC_RUN_END: n_end++;
        TSC_ALIGN_FINE: n_fine++;
        TSC_ALIGN_COARSE: n_coarse++;
        default: n_other++;
      endcase
    end
  end
  always @(posedge clk) if (!rst) begin
    if (tmode == TMODE_TRIGGER) n_trig++;
    if (tmode == TMODE_STOPPED) n_stop++;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [15:0] r;
  initial begin
    repeat (4) @(posedge clk); rst = 0;
    hpu_read(TTCR_DEAD_TIME, r);     check(r == 16'd3, "default dead time");
    hpu_read(TTCR_MAX_TRIGGERS, r);  check(r == 16'hffff, "default max triggers");
    hpu_read(TTCR_STG_PERIOD, r);    check(r == 16'd4000, "default STG period");
    hpu_read(TTCR_LATENCY_CELLS, r); check(r == {8'd100, 8'd144}, "default latency/cells");
    hpu_read(TTCR_SCAC_SETUP, r);    check(r[7:0] == 8'd5, "default slices");
    hpu_read(TTCR_LINK_STATUS, r);   check(r == 16'h5aff, "link status");
    check(tmode == TMODE_SYNC_RESET, "sync reset while not running");
    for (int a = 6; a <= 14; a++) begin
      logic [15:0] v;
      v = 16'($urandom);
      hpu_write(4'(a), v); hpu_read(4'(a), r);
      check(r == (a == TTCR_TRIGGER_DELAY ? {8'd0, v[7:0]} : v), $sformatf("register %0d read-back", a));
    end
    // link enables and LOCKED
    hpu_write(TTCR_CONTROL, 16'h0003); rxready = 8'hfe; repeat (2) @(posedge clk);
    check(!locked, "LOCKED needs enabled links ready");
    hpu_write(TTCR_CONTROL, 16'h0002); check(locked, "disabled link ignored");
    rxready = 8'hff;
    // gray table: clear address with L=1, then read consecutive entries
    hpu_write(TTCR_ROSEQ_SETUP, 16'h0082);           // G = 1, trigger delay 2
    hpu_write(TTCR_SCAC_SETUP, 16'h2003);            // L = 1
    hpu_read(TTCR_LUT, r);
    hpu_write(TTCR_SCAC_SETUP, 16'h0003);
    for (int i = 0; i < 4; i++) begin
      hpu_read(TTCR_LUT, r);
      check(r == 16'(i ^ (i >> 1)), $sformatf("gray table entry %0d = %h", i, r));
    end
    // a short run: two STG triggers, three slices each, stop at max
    hpu_write(TTCR_LATENCY_CELLS, {8'd60, 8'd144});
    hpu_write(TTCR_DEAD_TIME, 16'd5);
    hpu_write(TTCR_MAX_TRIGGERS, 16'd2);
    hpu_write(TTCR_TRIGGER_DELAY, 16'd4);
    hpu_write(TTCR_STG_PERIOD, 16'd400);
    hpu_write(TTCR_STG_BURST, {1'b0, 7'd1, 8'd1});
    hpu_write(TTCR_TTCC_SETUP, 16'h2207);            // stop at max, STG enabled, rate 7
    hpu_write(TTCR_CONTROL, 16'h03ff);
    check(tmode == TMODE_RUNNING, "running");
    hpu_write(TTCR_CONTROL, 16'h83ff);               // align fine
    hpu_write(TTCR_CONTROL, 16'h43ff);               // align coarse
    repeat (6000) @(posedge clk);
    check(tmode == TMODE_STOPPED, "stopped at max triggers");
    check(n_trig == 2, $sformatf("trigger clocks %0d", n_trig));
    check(n_slice == 6, $sformatf("slice commands %0d", n_slice));
    check(n_fine == 1 && n_coarse == 1, "alignment commands");
    check(n_end == 1 && n_other == 0, $sformatf("run end %0d other %0d", n_end, n_other));
    hpu_read(TTCR_TRIGGERS, r); check(r == 2, "trigger register");
    for (int t = 0; t < 2; t++) begin
      logic [15:0] h [6];
      for (int i = 0; i < 6; i++) hpu_read(TTCR_TTCC_FIFO, h[i]);
      check(h[0][15:14] == 2'b10 && h[2] == 16'h2000 && h[3] == 16'(t) && h[4][15:12] == 4'b0100,
            $sformatf("record %0d", t));
    end
    hpu_read(TTCR_STATUS, r); check(r[15:9] == 0 && r[1] == 1'b0, $sformatf("status %h", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
