// ts_counter: 40-bit timestamp counter of the TTC controller. It counts
// clocks since the last synchronous reset; its low 12 bits and high 28 bits
// go into the first and third words of each trigger record.
module ts_counter #(
  parameter int unsigned WIDTH = 40
) (
  input  logic             clk,
  input  logic             srst,
  output logic [WIDTH-1:0] ts
);
  always_ff @(posedge clk) begin
    if (srst) ts <= '0;
    else      ts <= ts + 1'b1;
  end
endmodule
