// tb_gray_lut: power-up contents are the 8-bit Gray code; writes change one
// entry, visible on both read ports.
`timescale 1ns/1ps
module tb_gray_lut;
  logic clk = 0, we = 0;
  logic [7:0] wa = 0, wd = 0, aa, ab, da, db;
  always #5 clk = !clk;
  gray_lut dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .addr_a(aa), .data_a(da), .addr_b(ab), .data_b(db));
  int checks = 0, failures = 0;
  logic [7:0] m [256];
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++) begin
      m[i] = 8'(i ^ (i >> 1));
      aa = 8'(i); ab = 8'(255 - i); #1;
      checks++; if (da != m[i] || db != 8'((255 - i) ^ ((255 - i) >> 1))) begin failures++; $display("FAIL init %0d", i); end
    end
    // adjacent entries differ in one bit
    for (int i = 0; i < 255; i++) begin checks++; if ($countones(m[i] ^ m[i+1]) != 1) failures++; end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); we = 1; wa = 8'($urandom); wd = 8'($urandom); m[wa] = wd;
      @(negedge clk); we = 0; aa = 8'($urandom); ab = wa; #1;
      checks++; if (da != m[aa] || db != m[ab]) begin failures++; if (failures < 5) $display("FAIL rw %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
