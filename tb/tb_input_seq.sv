// tb_input_seq: the input sequencer in normal mode. After a synchronous
// reset, each slice is announced by a slice command and its information,
// followed by 72 expected-data clocks carrying 24 deserialized words per
// link. The DPRAM writes are collected in a model memory; at each
// frame-done toggle the completed page must hold link-0 and link-1 words
// interleaved at 0..47, and the status words at 56..63 (header, link
// status, slice information with chip id, event/slice counters, fault
// bits all clear). Pages must alternate.
`timescale 1ns/1ps
module tb_input_seq;
  import sit_pkg::*;
  logic clk = 0, srst_l = 1, cs = 0, iv = 0, re = 0, expd = 0;
  slice_info_t info;
  logic [15:0] bg [2];
  logic [47:0] dw [2];
  logic [1:0] dv = 0;
  logic des_align, we, fd, fp;
  logic [7:0] waddr;
  logic [47:0] wdata;
  always #12.5 clk = !clk;
  input_seq dut (.clk(clk), .mode(ISM_NORMAL), .in_wc(8'd72), .chip_id(4'hb), .tl_sync_reset(srst_l),
    .tl_stopped(1'b0), .tl_trigger(1'b0), .tl_locked(1'b1), .tl_expected_rxdata(expd), .tl_serial(1'b0),
    .cmd_slice(cs), .info_valid(iv), .info(info), .run_end(re), .bg(bg), .rxdata({expd, expd}),
    .rxerror(2'b00), .rxready(2'b11), .dw(dw), .dv(dv), .aligned(2'b11), .des_align(des_align),
    .we(we), .waddr(waddr), .wdata(wdata), .frame_done(fd), .frame_page(fp));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  logic [47:0] mem [256];
  always @(posedge clk) if (we) mem[waddr] = wdata;
  logic [47:0] sent [2][$];
  slice_info_t sinfo_q [$];
  int frames = 0;
  logic fd_prev = 0;
  logic expect_page = 0;
  always @(posedge clk) begin
    #1;
    if (fd !== fd_prev && !srst_l) begin
      slice_info_t si;
      check(fp == expect_page, "page alternates");
      expect_page = !expect_page;
      si = sinfo_q.pop_front();
      for (int k = 0; k < 24; k++) begin
        check(mem[{1'b0, fp, 5'(k), 1'b0}] == sent[0][k], $sformatf("frame %0d link0 word %0d", frames, k));
        check(mem[{1'b0, fp, 5'(k), 1'b1}] == sent[1][k], $sformatf("frame %0d link1 word %0d", frames, k));
      end
      check(mem[{1'b0, fp, 6'd56}] == {12'hfae, 12'hfed, 24'h0}, "header");
      check(mem[{1'b0, fp, 6'd59}] == {2'b00, 1'b1, 1'b1, 8'h00, 2'b00, 1'b1, 1'b1, 8'h00, 24'h0}, "link status");
      check(mem[{1'b0, fp, 6'd61}] == {si.fault, si.sca_addr, 4'hb, 5'd0, si.ttype, si.phase, si.first, 24'h0}, "slice info");
      check(mem[{1'b0, fp, 6'd62}][23:0] == 24'h0 && mem[{1'b0, fp, 6'd62}][35:24] == 12'(frames), "slice counter");
      check(mem[{1'b0, fp, 6'd63}] == 48'h0, "no faults");
      for (int l = 0; l < 2; l++) repeat (24) void'(sent[l].pop_front());
      frames++;
    end
    fd_prev = fd;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    bg[0] = 0; bg[1] = 0; dw[0] = 0; dw[1] = 0; info = '0;
    @(negedge clk); srst_l = 1; repeat (3) @(negedge clk); srst_l = 0; repeat (3) @(negedge clk);
    fd_prev = fd;
    for (int s = 0; s < 10; s++) begin
      slice_info_t si;
      si = slice_info_t'(24'($urandom)); si.first = (s % 3 == 0); si.rsvd = 0;
      sinfo_q.push_back(si);
      cs = 1; @(negedge clk); cs = 0;
      repeat (24) @(negedge clk);
      info = si; iv = 1; @(negedge clk); iv = 0;
      repeat (20) @(negedge clk);
      for (int k = 0; k < 24; k++) begin
        expd = 1; @(negedge clk); @(negedge clk);
        dw[0] = {$urandom, 16'($urandom)}; dw[1] = {$urandom, 16'($urandom)};
        sent[0].push_back(dw[0]); sent[1].push_back(dw[1]);
        dv = 2'b11; @(negedge clk); dv = 0;
      end
      expd = 0;
      // the next command may arrive while the status words are written
      repeat (s % 2 ? 2 : 30) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check(frames == 10, $sformatf("frames %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
