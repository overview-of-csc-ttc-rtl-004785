// tb_data_dpram: 48-bit words written on one clock, read back as 12-bit
// samples (address = word*4 + sample) on an unrelated clock one read-clock
// edge later.
`timescale 1ns/1ps
module tb_data_dpram;
  logic wclk = 0, rclk = 0, we = 0;
  logic [7:0] wa = 0;
  logic [47:0] wd = 0;
  logic [9:0] ra = 0;
  logic [11:0] rd;
  always #12.5 wclk = !wclk;
  always #7.3 rclk = !rclk;
  data_dpram dut (.wclk(wclk), .we(we), .waddr(wa), .wdata(wd), .rclk(rclk), .raddr(ra), .rdata(rd));
  int checks = 0, failures = 0;
  logic [47:0] m [256];
  initial begin repeat (40000) @(posedge wclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge wclk); we = 1; wa = 8'(i); wd = {$urandom, 16'($urandom)}; m[i] = wd;
    end
    @(negedge wclk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge rclk); ra = 10'($urandom);
      @(negedge rclk);
      checks++; if (rd !== m[ra[9:2]][12*ra[1:0] +: 12]) begin failures++; if (failures < 6) $display("FAIL %0d", ra); end
    end
    // overwrite while reading other words
    for (int i = 0; i < 200; i++) begin
      @(negedge wclk); we = 1; wa = 8'($urandom); wd = {$urandom, 16'($urandom)}; m[wa] = wd;
      @(negedge wclk); we = 0;
      @(negedge rclk); ra = {wa, 2'($urandom)};
      @(negedge rclk);
      checks++; if (rd !== m[ra[9:2]][12*ra[1:0] +: 12]) begin failures++; if (failures < 6) $display("FAIL rw %0d", ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
