// data_dpram: Data DPRAM of the BPI FPGA, 256 x 48 on the write side (input
// clock) and 1024 x 12 on the read side (output clock). Input address a maps
// to output addresses 4a+3 .. 4a+0 for the four 12-bit fields of the 48-bit
// word, left (bits 47:36) to right (bits 11:0). The read is registered.
module data_dpram (
  input  logic        wclk,
  input  logic        we,
  input  logic [7:0]  waddr,
  input  logic [47:0] wdata,
  input  logic        rclk,
  input  logic [9:0]  raddr,
  output logic [11:0] rdata
);
  logic [47:0] mem [256];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr[9:2]][12*raddr[1:0] +: 12];
  end
endmodule
