// tb_tsc_rx: a behavioural transmitter sends random commands (including
// undefined codes) with random idle gaps; each must produce exactly one
// matching decode pulse, and SliceStart must deliver its 24-bit slice
// information.
`timescale 1ns/1ps
module tb_tsc_rx;
  import sit_pkg::*;
  logic clk = 0, srst = 1, serial = 0;
  logic cs, iv, re, af, ac, cc, bad;
  slice_info_t info;
  always #12.5 clk = !clk;
  tsc_rx dut (.clk(clk), .srst(srst), .serial(serial), .cmd_slice(cs), .info_valid(iv), .info(info),
    .run_end(re), .align_fine(af), .align_coarse(ac), .check_coarse(cc), .bad_cmd(bad));
  int checks = 0, failures = 0;
  int n_cs = 0, n_iv = 0, n_re = 0, n_af = 0, n_ac = 0, n_cc = 0, n_bad = 0;
  int e_cs = 0, e_re = 0, e_af = 0, e_ac = 0, e_cc = 0, e_bad = 0;
  logic [23:0] infoq [$];
  always @(posedge clk) if (!srst) begin
    n_cs += cs; n_re += re; n_af += af; n_ac += ac; n_cc += cc; n_bad += bad;
    if (iv) begin
      n_iv++; checks++;
      if (infoq.size() == 0 || info !== infoq[0]) begin failures++; $display("FAIL info %h", info); end
      if (infoq.size()) void'(infoq.pop_front());
    end
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); srst = 0;
    for (int i = 0; i < 300; i++) begin
      logic [3:0] c;
      logic [23:0] p;
      int k;
      k = $urandom_range(0, 6);
      c = k == 0 ? TSC_SLICE_START : k == 1 ? TSC_RUN_END : k == 2 ? TSC_ALIGN_FINE :
          k == 3 ? TSC_ALIGN_COARSE : k == 4 ? TSC_CHECK_COARSE : k == 5 ? TSC_SLICE_START : 4'b1111;
      p = 24'($urandom);
      case (c)
        TSC_SLICE_START: begin e_cs++; infoq.push_back(p); end
        TSC_RUN_END: e_re++;
        TSC_ALIGN_FINE: e_af++;
        TSC_ALIGN_COARSE: e_ac++;
        TSC_CHECK_COARSE: e_cc++;
        default: e_bad++;
      endcase
      for (int b = 3; b >= 0; b--) begin serial = c[b]; @(negedge clk); end
      if (c == TSC_SLICE_START) for (int b = 23; b >= 0; b--) begin serial = p[b]; @(negedge clk); end
      serial = 0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks += 7;
    if (n_cs != e_cs) failures++;
    if (n_iv != e_cs) failures++;
    if (n_re != e_re) failures++;
    if (n_af != e_af) failures++;
    if (n_ac != e_ac) failures++;
    if (n_cc != e_cc) failures++;
    if (n_bad != e_bad) failures++;
    $display("counts cs %0d/%0d re %0d/%0d af %0d/%0d ac %0d/%0d cc %0d/%0d bad %0d/%0d",
             n_cs, e_cs, n_re, e_re, n_af, e_af, n_ac, e_ac, n_cc, e_cc, n_bad, e_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
