// tb_sit_top: end-to-end test of the TTC FPGA with four BPI FPGAs, all
// parameters at their defaults.
//
// The transmitter output FE is looped back (LOOP clocks of fiber and
// serializer delay) into both G-Link receivers of every BPI FPGA, with the
// SCA controller in Tx mode 10, so the BPI FPGAs receive simulated ASM data
// of known content. Triggers come from the software trigger and from the
// synchronous trigger generator at a rate that runs into the dead time, the
// rate limit and the SCA controller's busy signal. The test checks every
// sample of every frame on all four DPU outputs against the data pattern,
// the header and slice-descriptor status words, the number of frames (one
// per time slice of each accepted trigger), the trigger records read from
// the TTC FIFO and the walking-one Tx test pattern, and counts how often
// each mechanism occurred.
`timescale 1ns/1ps
module tb_sit_top;
  import sit_pkg::*;
  localparam int NB = 4, LOOP = 5, SLICES = 3;

  logic rclk = 0, oclk = 0, rst = 1, orst = 1;
  always #12.5 rclk = !rclk;
  always #10   oclk = !oclk;

  logic [3:0]  hpu_a = '0;
  logic [15:0] hpu_din = '0, hpu_dout;
  logic        hpu_stb_n = 1, hpu_wr_n = 1;
  logic        fp_ttc = 0, l1a = 0, cal, tx_enable;
  logic [15:0] fe;
  logic [15:0] bg_a [NB], bg_b [NB];
  logic [1:0]  rxdata [NB], rxerror [NB], rxready [NB];
  logic [3:0]  bpi_a [NB], bpi_din [NB], bpi_dout [NB];
  logic [NB-1:0] bpi_stb_n = '1, bpi_wr_n = '1;
  logic [24:0] ic_dpu [NB];

  sit_top dut (
    .rclk(rclk), .rst(rst), .oclk(oclk), .orst(orst),
    .hpu_a(hpu_a), .hpu_din(hpu_din), .hpu_dout(hpu_dout), .hpu_stb_n(hpu_stb_n), .hpu_wr_n(hpu_wr_n),
    .fp_ttc(fp_ttc), .l1a(l1a), .cal(cal), .tmp_n(1'b0), .sig_detect('1), .fe(fe), .tx_enable(tx_enable),
    .bg_a(bg_a), .bg_b(bg_b), .rxdata(rxdata), .rxerror(rxerror), .rxready(rxready),
    .bpi_a(bpi_a), .bpi_din(bpi_din), .bpi_dout(bpi_dout), .bpi_stb_n(bpi_stb_n), .bpi_wr_n(bpi_wr_n),
    .ic_dpu(ic_dpu));

  // loopback fiber
  logic [15:0] loopq [LOOP];
  always_ff @(posedge rclk) begin
    loopq[0] <= fe;
    for (int i = 1; i < LOOP; i++) loopq[i] <= loopq[i-1];
  end
  always_comb for (int b = 0; b < NB; b++) begin
    bg_a[b] = loopq[LOOP-1]; bg_b[b] = loopq[LOOP-1];
    rxdata[b] = {2{tx_enable}}; rxerror[b] = 2'b00; rxready[b] = 2'b11;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  task automatic hpu_write(input logic [3:0] a, input logic [15:0] d);
    @(posedge rclk); hpu_a <= a; hpu_din <= d; hpu_wr_n <= 0; hpu_stb_n <= 0;
    repeat (3) @(posedge rclk); hpu_stb_n <= 1; hpu_wr_n <= 1;
    repeat (3) @(posedge rclk);
  endtask
  task automatic hpu_read(input logic [3:0] a, output logic [15:0] d);
    @(posedge rclk); hpu_a <= a; hpu_wr_n <= 1; hpu_stb_n <= 0;
    repeat (2) @(posedge rclk); d = hpu_dout; @(posedge rclk); hpu_stb_n <= 1;
    repeat (3) @(posedge rclk);
  endtask
  task automatic bpi_write(input logic [3:0] a, input logic [3:0] d);
    @(posedge rclk);
    for (int b = 0; b < NB; b++) begin bpi_a[b] <= a; bpi_din[b] <= (a == BPIR_CHIP_ID) ? 4'(b + 5) : d; end
    bpi_wr_n <= '0; bpi_stb_n <= '0;
    repeat (3) @(posedge rclk); bpi_stb_n <= '1; bpi_wr_n <= '1;
    repeat (3) @(posedge rclk);
  endtask

  // ---------------- mechanism counters
  int n_stg = 0, n_sw = 0, n_dead = 0, n_rate = 0, n_busy = 0, n_cal = 0, n_trig = 0, n_cmd = 0, n_walk = 0;
  always @(posedge rclk) if (!rst) begin
    if (dut.u_ttc.u_ttcc.stg_trig) n_stg++;
    if (dut.u_ttc.sw_trig) n_sw++;
    if (dut.u_ttc.u_ttcc.any_t && dut.u_ttc.u_ttcc.dead_inh) n_dead++;
    if (dut.u_ttc.u_ttcc.any_t && dut.u_ttc.u_ttcc.rate_inh) n_rate++;
    if (dut.u_ttc.u_ttcc.any_t && dut.u_ttc.scac_busy) n_busy++;
    if (cal) n_cal++;
    if (dut.u_ttc.trigger && dut.u_ttc.running) n_trig++;
    if (dut.g_bpi[0].u_bpi.cmd_slice) n_cmd++;
  end

  // ---------------- DPU output checker
  int frames [NB];
  int wordk [NB];
  logic [11:0] smp [NB][256];
  function automatic logic [11:0] expect_sample(input int s, input int t);
    int a, d, k;
    a = s / 4; d = s % 4; k = a / 2;
    return {4'(t), 4'(k / 2), 1'b0, 1'(k % 2), 2'(d)};
  endfunction
  int tslice [NB];
  for (genvar b = 0; b < NB; b++) begin : g_chk
    always @(posedge oclk) if (!orst && ic_dpu[b][24]) begin
      smp[b][2*wordk[b]+1] = ic_dpu[b][23:12];
      smp[b][2*wordk[b]]   = ic_dpu[b][11:0];
      wordk[b]++;
      if (wordk[b] == 128) begin
        logic [11:0] sl61;
        wordk[b] = 0;
        sl61 = smp[b][61*4+2];
        if (sl61[0]) tslice[b] = 0; else tslice[b]++;
        for (int s = 0; s < 192; s++)
          check(smp[b][s] == expect_sample(s, tslice[b]),
                $sformatf("bpi %0d frame %0d sample %0d = %h", b, frames[b], s, smp[b][s]));
        check(smp[b][56*4+3] == 12'hfae && smp[b][56*4+2] == 12'hfed, "header fae/fed");
        check(sl61[11:8] == 4'(b + 5), "chip id in status 61");
        check(smp[b][62*4+2] == 12'(frames[b]), "slice counter");
        check(smp[b][63*4+2][0] == 1'b0, "error summary clean");
        frames[b]++;
      end
    end
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge rclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] r;
  initial begin
    for (int b = 0; b < NB; b++) begin frames[b] = 0; wordk[b] = 0; tslice[b] = 0; end
    repeat (5) @(posedge rclk); rst = 0;
    @(posedge oclk); orst = 0;
    // BPI setup: latency = FE register + loop, normal mode, MSB re-inversion
    bpi_write(BPIR_CHIP_ID, 0);
    bpi_write(BPIR_TTC_LAT_L, 4'(LOOP + 1));
    bpi_write(BPIR_AUX_CONTROL, 4'd1);
    bpi_write(BPIR_CONTROL, 4'b0100);
    // Tx test pattern while in synchronous reset
    hpu_write(TTCR_SCAC_SETUP, {2'b01, 1'b0, 2'b00, 1'b1, 1'b0, 1'b0, 8'(SLICES)});
    hpu_write(TTCR_CONTROL, 16'h0000);
    hpu_write(TTCR_CONTROL, 16'h02ff);          // run
    repeat (4) @(posedge rclk);
    begin
      logic [15:0] p;
      #1 p = fe;
      for (int i = 0; i < 20; i++) begin
        @(posedge rclk); #1;
        check($onehot(fe) && fe == {p[14:0], p[15]}, "walking one");
        if ($onehot(fe)) n_walk++;
        p = fe;
      end
    end
    hpu_write(TTCR_CONTROL, 16'h01ff);          // back to synchronous reset
    // Tx mode 10 (simulated ASM), 20 MHz write, 6.67 MHz read, SLICES slices
    hpu_write(TTCR_SCAC_SETUP, {2'b10, 1'b0, 2'b00, 1'b1, 1'b0, 1'b0, 8'(SLICES)});
    hpu_write(TTCR_LATENCY_CELLS, {8'd100, 8'd144});
    hpu_write(TTCR_DEAD_TIME, 16'd20);
    hpu_write(TTCR_STG_PERIOD, 16'd150);
    hpu_write(TTCR_STG_BURST, {1'b0, 7'd2, 8'd10});
    // T, G enabled, CAL from STG, insufficient-cell inhibit, max 3 triggers / 80 us
    hpu_write(TTCR_TTCC_SETUP, {1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 7'd3});
    hpu_write(TTCR_CONTROL, 16'h03ff);          // run, Tx enable, all links
    repeat (300) @(posedge rclk);
    hpu_write(TTCR_CONTROL, 16'h23ff);          // software trigger
    repeat (9000) @(posedge rclk);
    hpu_write(TTCR_TTCC_SETUP, {1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 7'd3}); // STG off
    repeat (4000) @(posedge rclk);
    // trigger records
    hpu_read(TTCR_TRIGGERS, r);
    check(int'(r) == n_trig, $sformatf("trigger count %0d vs %0d", r, n_trig));
    for (int t = 0; t < n_trig; t++) begin
      logic [15:0] h [6];
      for (int i = 0; i < 6; i++) hpu_read(TTCR_TTCC_FIFO, h[i]);
      check(h[0][15] == 1'b1, "record word 0 marker");
      check(h[2][15:12] == 4'b0010 && h[3] == 16'(t), $sformatf("record %0d L1ID %h", t, h[3]));
      check(h[4][15:12] == 4'b0100, "record word 2 marker");
    end
    hpu_read(TTCR_STATUS, r);
    check(r[15:9] == 7'd0, $sformatf("no faults, status %h", r));
    hpu_read(TTCR_MISSED_TRIG, r);
    check(r != 0, "missed triggers counted");
    for (int b = 0; b < NB; b++)
      check(frames[b] == n_trig * SLICES, $sformatf("bpi %0d frames %0d expected %0d", b, frames[b], n_trig * SLICES));
    check(n_stg > 0, "STG triggered");
    check(n_sw > 0, "software trigger");
    check(n_dead > 0, "dead-time inhibit");
    check(n_rate > 0, "rate-limit inhibit");
    check(n_busy > 0, "SCAC busy inhibit");
    check(n_cal > 0, "CAL pulses");
    check(n_cmd == n_trig * SLICES, "slice commands");
    check(n_walk > 0, "walking one");
    $display("triggers=%0d stg=%0d sw=%0d dead=%0d rate=%0d busy=%0d cal=%0d frames=%0d",
             n_trig, n_stg, n_sw, n_dead, n_rate, n_busy, n_cal, frames[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
