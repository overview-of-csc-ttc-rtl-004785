// tb_latency_pipe: addresses pushed at each step must come out exactly
// `tap` steps later, with stale (pre-reset) entries reported invalid.
`timescale 1ns/1ps
module tb_latency_pipe;
  logic clk = 0, srst = 1, step = 0, in_valid = 0, out_valid;
  logic [6:0] tap = 50;
  logic [7:0] in_addr = 0, out_addr;
  always #12.5 clk = !clk;
  latency_pipe #(.DEPTH(128)) dut (.clk(clk), .srst(srst), .step(step), .tap(tap), .in_valid(in_valid),
    .in_addr(in_addr), .out_valid(out_valid), .out_addr(out_addr));
  int checks = 0, failures = 0;
  logic [8:0] hist [$];
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    // leave valid garbage in the buffer, then reset
    repeat (2) @(negedge clk); srst = 0;
    step = 1; in_valid = 1; repeat (200) @(negedge clk); srst = 1; @(negedge clk); srst = 0;
    for (int t = 0; t < 3; t++) begin
      tap = t == 0 ? 50 : t == 1 ? 127 : 1;
      srst = 1; @(negedge clk); srst = 0; hist.delete();
      for (int i = 0; i < 600; i++) begin
        step = $urandom_range(0, 1);
        in_valid = $urandom_range(0, 3) != 0; in_addr = 8'($urandom);
        #1;
        if (step) begin
          // the output during a step is the entry written `tap` steps ago
          checks++;
          if (hist.size() >= tap) begin
            if (out_valid !== hist[hist.size() - tap][8] || (out_valid && out_addr !== hist[hist.size() - tap][7:0])) begin
              failures++; if (failures < 6) $display("FAIL tap %0d i %0d", tap, i);
            end
          end else if (out_valid) begin
            failures++; if (failures < 6) $display("FAIL stale entry valid tap %0d i %0d", tap, i);
          end
          hist.push_back({in_valid, in_addr});
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
