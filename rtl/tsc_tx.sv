// tsc_tx: serial command transmitter of the TTC FPGA. It sends a TTC serial
// command on the SERIAL line to the BPI FPGAs: four command bits (the first is
// always 1 and marks the start), followed for tscSliceStart by the 24-bit
// slice descriptor, most significant bit first, one bit per clock. The line
// rests at 0. A request is taken when busy is low; serial is registered, so
// the first bit appears in the clock after the request.
module tsc_tx (
  input  logic        clk,
  input  logic        srst,
  input  logic        req,
  input  logic [3:0]  cmd,
  input  logic [23:0] param,
  input  logic        has_param,
  output logic        busy,
  output logic        serial
);
  logic [27:0] sr;
  logic [4:0]  left;

  assign busy = (left != '0);

  always_ff @(posedge clk) begin
    if (srst) begin
      sr     <= '0;
      left   <= '0;
      serial <= 1'b0;
    end else if (req && !busy) begin
      serial <= cmd[3];
      sr     <= {cmd[2:0], param, 1'b0};
      left   <= has_param ? 5'd27 : 5'd3;
    end else if (busy) begin
      serial <= sr[27];
      sr     <= {sr[26:0], 1'b0};
      left   <= left - 1'b1;
    end else begin
      serial <= 1'b0;
    end
  end
endmodule
