// tb_delay_line: random data through the programmable delay at several
// delays (0, 1, 17, 255); the output must equal the input `delay` clocks
// earlier.
`timescale 1ns/1ps
module tb_delay_line;
  logic clk = 0;
  logic [7:0] delay = 0, in = 0, out;
  always #5 clk = !clk;
  delay_line #(.WIDTH(8), .DEPTH(256)) dut (.clk(clk), .delay(delay), .in(in), .out(out));
  int checks = 0, failures = 0;
  logic [7:0] hist [$];
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int ds [4] = '{0, 1, 17, 255};
    foreach (ds[j]) begin
      delay = 8'(ds[j]);
      hist.delete();
      for (int i = 0; i < 600; i++) begin
        @(negedge clk);
        in = 8'($urandom);
        hist.push_front(in);
        #1;
        if (hist.size() > ds[j]) begin
          checks++;
          if (out !== hist[ds[j]]) begin failures++; if (failures < 5) $display("FAIL d=%0d %h %h", ds[j], out, hist[ds[j]]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
