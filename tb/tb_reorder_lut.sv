// tb_reorder_lut: power-up order is the identity (entry k = {2k+1, 2k});
// nibble writes through the register port are read back on both the nibble
// port and the registered 16-bit entry port.
`timescale 1ns/1ps
module tb_reorder_lut;
  logic clk = 0, rclk = 0, we = 0;
  logic [9:0] na = 0;
  logic [3:0] wd = 0, rn;
  logic [7:0] ra = 0;
  logic [15:0] entry;
  always #12.5 clk = !clk;
  always #9.1 rclk = !rclk;
  reorder_lut dut (.clk(clk), .we(we), .naddr(na), .wdata(wd), .rdata_n(rn), .rclk(rclk), .raddr(ra), .entry(entry));
  int checks = 0, failures = 0;
  logic [15:0] m [256];
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < 256; k++) begin
      m[k] = {8'(2*k+1), 8'(2*k)};
      @(negedge rclk); ra = 8'(k); @(negedge rclk);
      checks++; if (entry !== m[k]) begin failures++; if (failures < 6) $display("FAIL init %0d %h", k, entry); end
    end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); we = 1; na = 10'($urandom); wd = 4'($urandom); m[na[9:2]][4*na[1:0] +: 4] = wd;
      @(negedge clk); we = 0; #1;
      checks++; if (rn !== wd) begin failures++; if (failures < 6) $display("FAIL nibble %0d", na); end
      @(negedge rclk); ra = na[9:2]; @(negedge rclk);
      checks++; if (entry !== m[ra]) begin failures++; if (failures < 6) $display("FAIL entry %0d", ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
