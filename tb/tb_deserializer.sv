// tb_deserializer: four 12-bit samples per G-Link word, sent one nibble per
// word low nibble first over three words. Checks the reassembled samples in
// all three reformat modes, gaps in the valid strobe, and re-alignment
// after a misaligned start.
`timescale 1ns/1ps
module tb_deserializer;
  logic clk = 0, srst = 1, align = 0, iv = 0, valid, aligned;
  logic [15:0] bg = 0;
  logic [1:0] rf = 0;
  logic [47:0] word;
  always #12.5 clk = !clk;
  deserializer dut (.clk(clk), .srst(srst), .align(align), .in_valid(iv), .bg(bg), .reformat(rf),
    .word(word), .valid(valid), .aligned(aligned));
  int checks = 0, failures = 0;
  logic [47:0] q [$];
  always @(posedge clk) if (!srst && valid) begin
    checks++;
    if (q.size() == 0 || word !== q[0]) begin failures++; if (failures < 6) $display("FAIL %h exp %h", word, q.size() ? q[0] : 0); end
    if (q.size()) void'(q.pop_front());
  end
  function automatic logic [11:0] rfm(input logic [11:0] s, input logic [1:0] m);
    return m == 1 ? s ^ 12'h800 : m == 2 ? s ^ 12'h7ff : s;
  endfunction
  task automatic send(input logic [47:0] samples, input bit expect_out);
    logic [47:0] e;
    for (int j = 0; j < 4; j++) e[12*j +: 12] = rfm(samples[12*j +: 12], rf);
    if (expect_out) q.push_back(e);
    for (int n = 0; n < 3; n++) begin
      for (int j = 0; j < 4; j++) bg[4*j +: 4] = samples[12*j + 4*n +: 4];
      iv = 1; @(negedge clk); iv = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); srst = 0;
    checks++; if (aligned) failures++;
    // one stray nibble word, then align
    iv = 1; @(negedge clk); iv = 0;
    align = 1; @(negedge clk); align = 0;
    checks++; if (!aligned) failures++;
    for (int m = 0; m < 3; m++) begin
      rf = 2'(m);
      for (int i = 0; i < 100; i++) send({$urandom, 16'($urandom)}, 1);
    end
    repeat (3) @(negedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d words missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
