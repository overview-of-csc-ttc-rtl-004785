// reorder_lut: channel order lookup table of the BPI FPGA. Entry k (0-255)
// gives, for output word k of a frame, the two Data DPRAM sample addresses
// (8 bits each, within the current page) whose samples form IC_DPU[23:12]
// (bits 15:8 of the entry) and IC_DPU[11:0] (bits 7:0). The register bus
// loads it one nibble at a time: nibble address n writes bits
// 4*(n%4)+3 : 4*(n%4) of entry n/4. From configuration the table holds
// entry k = {2k+1, 2k}, which sends the samples in DPRAM order.
// The nibble port is on the register clock; the entry read is registered on
// the output clock.
module reorder_lut (
  input  logic        clk,
  input  logic        we,
  input  logic [9:0]  naddr,
  input  logic [3:0]  wdata,
  output logic [3:0]  rdata_n,
  input  logic        rclk,
  input  logic [7:0]  raddr,
  output logic [15:0] entry
);
  logic [15:0] mem [256];

  initial begin
    for (int k = 0; k < 256; k++) mem[k] = {8'(2*k+1), 8'(2*k)};
  end

  always_ff @(posedge clk) begin
    if (we) mem[naddr[9:2]][4*naddr[1:0] +: 4] <= wdata;
  end
  assign rdata_n = mem[naddr[9:2]][4*naddr[1:0] +: 4];

  always_ff @(posedge rclk) begin
    entry <= mem[raddr];
  end
endmodule
