// tb_tsc_tx: each command is shifted out MSB first starting the clock after
// the request; 4 bits for bare commands, 28 with the slice information; the
// line is low between commands and requests while busy are ignored.
`timescale 1ns/1ps
module tb_tsc_tx;
  logic clk = 0, srst = 1, req = 0, hp = 0, busy, serial;
  logic [3:0] cmd = 0;
  logic [23:0] par = 0;
  always #12.5 clk = !clk;
  tsc_tx dut (.clk(clk), .srst(srst), .req(req), .cmd(cmd), .param(par), .has_param(hp), .busy(busy), .serial(serial));
  int checks = 0, failures = 0;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); srst = 0;
    for (int n = 0; n < 60; n++) begin
      logic [27:0] exp;
      int len;
      cmd = 4'($urandom); par = 24'($urandom); hp = $urandom_range(0, 1); req = 1;
      exp = hp ? {cmd, par} : {cmd, 24'h0};
      len = hp ? 28 : 4;
      @(negedge clk);
      req = 1; cmd = ~cmd;   // a request while busy must not disturb the shift
      for (int b = 0; b < len; b++) begin
        checks++; if (serial !== exp[27 - b]) begin failures++; if (failures < 6) $display("FAIL cmd %0d bit %0d", n, b); end
        if (b == len - 2) req = 0;
        @(negedge clk);
      end
      req = 0;
      checks++; if (serial !== 0 || busy) begin failures++; $display("FAIL idle after %0d", n); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
