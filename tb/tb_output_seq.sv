// tb_output_seq: the output sequencer with behavioural (registered) LUT and
// DPRAM models. Each frame-done toggle from the input clock domain must
// produce out_wc valid words, word i holding the two samples named by LUT
// entry i in the announced page; a toggle while busy sets overrun.
`timescale 1ns/1ps
module tb_output_seq;
  logic oclk = 0, orst = 1, fd = 0, fp = 0;
  logic [7:0] owc = 128, la;
  logic [15:0] entry;
  logic [9:0] raa, rab;
  logic [11:0] qa, qb;
  logic [24:0] ic;
  logic ovr;
  always #10 oclk = !oclk;
  output_seq dut (.oclk(oclk), .orst(orst), .frame_done(fd), .frame_page(fp), .out_wc(owc), .lut_addr(la),
    .lut_entry(entry), .raddr_a(raa), .raddr_b(rab), .q_a(qa), .q_b(qb), .ic_dpu(ic), .overrun(ovr));
  logic [15:0] lut [256];
  function automatic logic [11:0] f(input logic [9:0] a);
    return 12'(a * 7 + 12'h123);
  endfunction
  always @(posedge oclk) begin
    entry <= lut[la];
    qa <= f(raa);
    qb <= f(rab);
  end
  int checks = 0, failures = 0;
  int got [$];
  always @(posedge oclk) if (!orst && ic[24]) got.push_back(int'(ic[23:0]));
  initial begin repeat (40000) @(posedge oclk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < 256; k++) lut[k] = 16'($urandom) & 16'h7f7f;
    repeat (3) @(negedge oclk); orst = 0;
    for (int fr = 0; fr < 6; fr++) begin
      owc = fr == 3 ? 8'd5 : 8'd128;
      got.delete();
      #3.7 fp = 1'(fr); fd = !fd;
      repeat (owc + 20) @(negedge oclk);
      checks++; if (got.size() != owc) begin failures++; $display("FAIL frame %0d words %0d", fr, got.size()); end
      for (int i = 0; i < got.size() && i < owc; i++) begin
        logic [9:0] a, b;
        a = {1'b0, fp, lut[i][15:8]}; b = {1'b0, fp, lut[i][7:0]};
        checks++; if (got[i] != int'({f(a), f(b)})) begin failures++; if (failures < 6) $display("FAIL frame %0d word %0d", fr, i); end
      end
    end
    checks++; if (ovr) failures++;
    fd = !fd; repeat (10) @(negedge oclk); fd = !fd; repeat (5) @(negedge oclk);
    checks++; if (!ovr) begin failures++; $display("FAIL no overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
