// tb_asm_sim_gen: the simulated ADC words. Each slice is 24 triplets; in
// triplet j the first word carries four samples' 0AMM fields (A = j[0], MM
// = sample index), the second the channel group j/2 in every nibble, the
// third the time-slice number with its MSB inverted. The slice number
// restarts at 0 on the first slice of a trigger and counts up otherwise.
`timescale 1ns/1ps
module tb_asm_sim_gen;
  logic clk = 0, srst = 1, ss = 0, first = 0, dav = 0;
  logic [15:0] word;
  always #12.5 clk = !clk;
  asm_sim_gen dut (.clk(clk), .srst(srst), .slice_start(ss), .first(first), .dav(dav), .word(word));
  int checks = 0, failures = 0;
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t;
    repeat (2) @(negedge clk); srst = 0;
    t = 0;
    for (int s = 0; s < 12; s++) begin
      first = (s % 4 == 0); ss = 1; @(negedge clk); ss = 0;
      t = first ? 0 : t + 1;
      for (int j = 0; j < 24; j++) begin
        logic [15:0] e [3];
        logic [3:0] a, c, tt;
        a = {1'b0, 1'(j), 2'b00};
        c = 4'(j / 2);
        tt = {~t[3], t[2:0]};
        e[0] = {a | 4'd3, a | 4'd2, a | 4'd1, a};
        e[1] = {c, c, c, c};
        e[2] = {tt, tt, tt, tt};
        for (int w = 0; w < 3; w++) begin
          repeat ($urandom_range(0, 2)) @(negedge clk);
          checks++; if (word !== e[w]) begin failures++; if (failures < 6) $display("FAIL s%0d j%0d w%0d %h exp %h", s, j, w, word, e[w]); end
          dav = 1; @(negedge clk); dav = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
