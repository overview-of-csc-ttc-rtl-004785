// tb_ttc_fifo: 32-bit words written, read back as halfwords (most
// significant first) in order; filling it completely and writing once more
// sets overflow; reading it empty and once more sets underflow.
`timescale 1ns/1ps
module tb_ttc_fifo;
  logic clk = 0, srst = 1, wr = 0, rd = 0, empty, ovf, unf;
  logic [31:0] din;
  logic [15:0] dout;
  logic [8:0] words;
  always #5 clk = !clk;
  ttc_fifo #(.DEPTH(256)) dut (.clk(clk), .srst(srst), .wr(wr), .din(din), .rd(rd), .dout(dout),
    .empty(empty), .overflow(ovf), .underflow(unf), .words(words));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", s); end
  endtask
  logic [31:0] q [$];
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); srst = 0;
    for (int i = 0; i < 256; i++) begin
      din = $urandom; q.push_back(din); wr = 1; @(negedge clk);
    end
    wr = 0;
    check(!ovf && words == 256, "full, no overflow");
    din = 0; wr = 1; @(negedge clk); wr = 0;
    check(ovf, "overflow");
    for (int i = 0; i < 256; i++) begin
      logic [31:0] e;
      e = q.pop_front();
      check(dout == e[31:16], $sformatf("hi %0d", i)); rd = 1; @(negedge clk); rd = 0;
      check(dout == e[15:0], $sformatf("lo %0d", i)); rd = 1; @(negedge clk); rd = 0;
    end
    check(empty && !unf, "empty");
    rd = 1; @(negedge clk); rd = 0;
    check(unf, "underflow");
    srst = 1; @(negedge clk); srst = 0;
    check(!unf && !ovf && empty, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
