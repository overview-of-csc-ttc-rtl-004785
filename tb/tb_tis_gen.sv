// tb_tis_gen: back-to-back trigger requests and a NOP request must produce
// the published record formats (three words per trigger, one per NOP) with
// the data captured at request time, in request order.
`timescale 1ns/1ps
module tb_tis_gen;
  logic clk = 0, srst = 1, tr = 0, nop = 0, tt = 0, wr, lost;
  logic [5:0] tdc = 0;
  logic [6:0] st = 0;
  logic [39:0] ts = 0;
  logic [31:0] l1 = 0, w;
  always #5 clk = !clk;
  tis_gen #(.QDEPTH(4)) dut (.clk(clk), .srst(srst), .trig_req(tr), .nop_req(nop), .ttype(tt),
    .tdc_value(tdc), .status(st), .timestamp(ts), .l1id(l1), .wr(wr), .word(w), .lost(lost));
  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  always @(posedge clk) if (!srst && wr) begin
    checks++;
    if (expq.size() == 0 || w !== expq[0]) begin failures++; $display("FAIL got %h exp %h", w, expq.size() ? expq[0] : 0); end
    if (expq.size()) void'(expq.pop_front());
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); srst = 0;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      tr = ($urandom_range(0, 2) != 0); nop = !tr && ($urandom_range(0, 1) == 0);
      tt = 1'($urandom); tdc = 6'($urandom); st = 7'($urandom); ts = {8'($urandom), 32'($urandom)}; l1 = $urandom;
      if (expq.size() > 8) begin tr = 0; nop = 0; end
      if (tr) begin
        expq.push_back({2'b10, tdc, st, tt, 4'h0, ts[11:0]});
        expq.push_back({4'b0010, l1[27:0]});
        expq.push_back({4'b0100, ts[39:12]});
      end else if (nop) expq.push_back({8'h00, st, 1'b0, 16'h0});
      @(negedge clk); tr = 0; nop = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
