// tb_sync_fifo: random pushes and pops against a queue model; data order,
// count, empty and full must match, and pushes into a full FIFO are dropped.
`timescale 1ns/1ps
module tb_sync_fifo;
  logic clk = 0, clr = 1, push = 0, pop = 0, empty, full;
  logic [10:0] wd, rdata;
  logic [4:0] count;
  always #5 clk = !clk;
  sync_fifo #(.WIDTH(11), .DEPTH(16)) dut (.clk(clk), .clr(clr), .push(push), .wdata(wd), .pop(pop),
    .rdata(rdata), .empty(empty), .full(full), .count(count));
  int checks = 0, failures = 0;
  logic [10:0] q [$];
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); clr = 0;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 3 : 7;
      push = $urandom_range(0, 9) < bias; pop = $urandom_range(0, 9) < 10 - bias; wd = 11'($urandom);
      checks++;
      if (count != 5'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 16) ||
          (q.size() > 0 && rdata != q[0])) begin
        failures++; if (failures < 5) $display("FAIL i=%0d count %0d model %0d", i, count, q.size());
      end
      @(negedge clk);
      begin
        bit pp, pu;
        pp = pop && q.size() > 0;
        pu = push && q.size() < 16;
        if (pp) void'(q.pop_front());
        if (pu) q.push_back(wd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
