// tb_bpi_ttc_pipe: the received TTC signals come out `latency` clocks
// later, with the trigger mode decoded into its four conditions.
`timescale 1ns/1ps
module tb_bpi_ttc_pipe;
  import sit_pkg::*;
  logic clk = 0, lk = 0, ex = 0, se = 0;
  logic [1:0] tm = 0;
  logic [7:0] lat = 7;
  logic sr, tr, ru, st, tlk, tex, tse;
  always #12.5 clk = !clk;
  bpi_ttc_pipe dut (.clk(clk), .latency(lat), .tmode(tm), .locked(lk), .expected_rxdata(ex), .serial(se),
    .tl_sync_reset(sr), .tl_trigger(tr), .tl_running(ru), .tl_stopped(st), .tl_locked(tlk),
    .tl_expected_rxdata(tex), .tl_serial(tse));
  int checks = 0, failures = 0;
  logic [4:0] hist [$];
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int p = 0; p < 3; p++) begin
      lat = p == 0 ? 7 : p == 1 ? 1 : 200;
      hist.delete();
      for (int i = 0; i < 600; i++) begin
        tm = 2'($urandom); lk = 1'($urandom); ex = 1'($urandom); se = 1'($urandom);
        hist.push_front({tm, lk, ex, se});
        @(negedge clk);
        if (i >= lat + 2) begin
          logic [4:0] d;
          d = hist[lat - 1];
          checks++;
          if ({tlk, tex, tse} !== d[2:0] || sr !== (d[4:3] == 2'b11) || st !== (d[4:3] == 2'b10) ||
              tr !== (d[4:3] == 2'b01) || ru !== (d[4:3] == 2'b01 || d[4:3] == 2'b00)) begin
            failures++; if (failures < 6) $display("FAIL lat %0d i %0d", lat, i);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
