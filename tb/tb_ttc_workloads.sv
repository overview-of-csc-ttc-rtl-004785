// tb_ttc_workloads: the TTC FPGA, at its default parameters, under the loads
// its cell budget and trigger rules are sized for. Four phases, each started
// from a synchronous reset through the HPU bus:
//   1. 20 MHz write: after the Free FIFO fill, the write address on FE[12:5]
//      changes every second clock and all 144 cells are written in 288
//      clocks (7.2 us).
//   2. Trigger rule: ten software triggers 50 clocks apart with at most 7
//      allowed per 80 us give 7 triggers and 3 missed; one more trigger is
//      accepted once the first has left the 3200-clock window.
//   3. Readout FIFO: eight triggers of 5 slices, queued faster than they are
//      read, give 40 SliceStart commands without a cell fault. The spacing of
//      back-to-back slices is checked: 28 clocks of command, 21 RDCLK
//      periods of 6 clocks, 3 clocks in the sequencer's idle, command and
//      done states and up to 1 clock to start on the selected 20 MHz read
//      phase: 157 or 158 clocks (about 3.95 us) per slice.
//   4. Sustained 100 kHz: an STG trigger every 400 clocks with 5 slices each
//      asks for more readout than the sequencer gives, so the
//      insufficient-free-cells inhibit must refuse some triggers, while the
//      Free FIFO never runs dry.
// SERIAL is decoded bit by bit; TMODE gives the trigger clocks. The figures
// checked (288 clocks, 7 of 10, 157-158 clocks per slice) are worked out from the
// register settings, not read from the design.
`timescale 1ns/1ps
module tb_ttc_workloads;
  import sit_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0]  hpu_a = 0;
  logic [15:0] hpu_din = 0, hpu_dout, fe;
  logic hpu_stb_n = 1, hpu_wr_n = 1, cal, tx_enable, locked, exp_rx, serial;
  logic [1:0] tmode;
  always #12.5 clk = !clk;
  ttc_fpga dut (.clk(clk), .rst(rst), .hpu_a(hpu_a), .hpu_din(hpu_din), .hpu_dout(hpu_dout),
    .hpu_stb_n(hpu_stb_n), .hpu_wr_n(hpu_wr_n), .fp_ttc(1'b0), .l1a(1'b0), .cal(cal), .tmp_n(1'b1),
    .sig_detect(8'hff), .fe(fe), .tx_enable(tx_enable), .rxready(8'hff), .tmode(tmode),
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

  // clock counter, SliceStart decoder with the spacing of consecutive slices
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int n_slice = 0, min_gap = 1 << 30, max_gap = 0;
  longint last_ss = -1;
  initial forever begin
    logic [3:0] c;
    @(posedge clk);
    if (!rst && serial) begin
      longint t0;
      t0 = cyc;
      c[3] = 1;
      for (int i = 2; i >= 0; i--) begin @(posedge clk); c[i] = serial; end
      if (c == TSC_SLICE_START) begin
        if (last_ss >= 0 && t0 - last_ss < 1000) begin
          if (int'(t0 - last_ss) < min_gap) min_gap = int'(t0 - last_ss);
          if (int'(t0 - last_ss) > max_gap) max_gap = int'(t0 - last_ss);
        end
        last_ss = t0;
        n_slice++;
        repeat (24) @(posedge clk);
      end
    end
  end
  int n_trig = 0;
  always @(posedge clk) if (!rst && tmode == TMODE_TRIGGER) n_trig++;

  // synchronous reset, then a run with the given settings
  task automatic start_run(input logic [15:0] ttcc, input logic [7:0] latency);
    hpu_write(TTCR_CONTROL, 16'h00ff);
    hpu_write(TTCR_SCAC_SETUP, 16'h0405);            // 20 MHz write, 6.67 MHz read, 5 slices
    hpu_write(TTCR_LATENCY_CELLS, {latency, 8'd144});
    hpu_write(TTCR_TTCC_SETUP, ttcc);
    n_trig = 0; n_slice = 0; last_ss = -1; min_gap = 1 << 30; max_gap = 0;
    hpu_write(TTCR_CONTROL, 16'h03ff);
    repeat (200) @(posedge clk);                     // Free FIFO fill, 144 clocks
  endtask

  initial begin repeat (80000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [15:0] r;
  initial begin
    repeat (4) @(posedge clk); rst = 0;

    // 1. write all 144 cells at 20 MHz
    start_run(16'h0000, 8'd100);
    repeat (50) @(posedge clk);
    begin
      bit seen [256];
      logic [7:0] prev;
      longint t_first, t_prev;
      int steps = 0, bad_gap = 0, distinct = 0;
      prev = fe[12:5]; t_prev = -1; t_first = -1;
      while (steps < 144) begin
        @(posedge clk); #1;
        if (fe[12:5] != prev) begin
          if (t_prev >= 0 && cyc - t_prev != 2) bad_gap++;
          if (t_first < 0) t_first = cyc;
          t_prev = cyc; prev = fe[12:5];
          if (!seen[prev]) distinct++;
          seen[prev] = 1; steps++;
        end
      end
      check(bad_gap == 0, $sformatf("write step every 2 clocks (%0d bad)", bad_gap));
      check(distinct == 144, $sformatf("144 steps write %0d distinct cells", distinct));
      check(t_prev - t_first + 2 == 288, $sformatf("144 cells in %0d clocks", t_prev - t_first + 2));
    end

    // 2. at most 7 triggers in 80 us; dead time 3 does not bite at 50 clocks
    start_run(16'h0407, 8'd20);                      // T enabled, max rate 7
    for (int i = 0; i < 10; i++) begin
      hpu_write(TTCR_CONTROL, 16'h23ff);
      repeat (43) @(posedge clk);
    end
    check(n_trig == 7, $sformatf("7 of 10 triggers in the window, got %0d", n_trig));
    hpu_read(TTCR_MISSED_TRIG, r); check(r == 16'd3, $sformatf("3 missed, got %0d", r));
    repeat (3200) @(posedge clk);
    hpu_write(TTCR_CONTROL, 16'h23ff);
    repeat (20) @(posedge clk);
    check(n_trig == 8, "trigger accepted after the window");
    repeat (6000) @(posedge clk);
    check(n_slice == 40, $sformatf("slices %0d", n_slice));

    // 3. eight triggers x 5 slices queued in the Readout FIFO
    start_run(16'h0400, 8'd20);                      // no rate limit
    for (int i = 0; i < 8; i++) begin
      hpu_write(TTCR_CONTROL, 16'h23ff);
      repeat (43) @(posedge clk);
    end
    check(n_trig == 8, $sformatf("8 triggers, got %0d", n_trig));
    repeat (7000) @(posedge clk);
    check(n_slice == 40, $sformatf("40 slices read, got %0d", n_slice));
    check(min_gap >= 157 && max_gap <= 158, $sformatf("slice spacing %0d..%0d clocks", min_gap, max_gap));
    hpu_read(TTCR_STATUS, r); check(r[13:12] == 2'b00, $sformatf("no cell fault, status %h", r));
    $display("back-to-back slice spacing %0d..%0d clocks", min_gap, max_gap);

    // 4. STG at 100 kHz, 5 slices per trigger, insufficient-cell inhibit on
    hpu_write(TTCR_STG_PERIOD, 16'd400);
    hpu_write(TTCR_STG_BURST, {1'b0, 7'd1, 8'd1});
    start_run(16'h0280, 8'd100);                     // G enabled, I set, no rate limit
    repeat (24000) @(posedge clk);
    hpu_read(TTCR_MISSED_TRIG, r);
    $display("100 kHz for 600 us: %0d triggers, %0d missed, %0d slices read", n_trig, r, n_slice);
    check(r > 0, "sustained 100 kHz x 5 slices exceeds the readout rate");
    check(n_trig + int'(r) >= 59 && n_trig + int'(r) <= 61, $sformatf("STG offered %0d", n_trig + int'(r)));
    check(n_slice <= 24000 / 157 + 1, "slices limited by the readout time");
    hpu_read(TTCR_STATUS, r); check(r[13:12] == 2'b00, $sformatf("Free FIFO never empty, status %h", r));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
