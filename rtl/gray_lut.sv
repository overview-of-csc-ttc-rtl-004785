// gray_lut: 256 x 8 gray-code lookup table. The SCA takes its write and read
// cell addresses gray-coded; the table maps a cell number to the code put on
// the link. It is loaded by the HPU (write port) and holds the standard
// reflected gray code n ^ (n >> 1) from configuration. Port a is the datapath
// read, port b the HPU read-back; both are asynchronous reads.
module gray_lut (
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] waddr,
  input  logic [7:0] wdata,
  input  logic [7:0] addr_a,
  output logic [7:0] data_a,
  input  logic [7:0] addr_b,
  output logic [7:0] data_b
);
  logic [7:0] mem [256];

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'(i ^ (i >> 1));
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign data_a = mem[addr_a];
  assign data_b = mem[addr_b];
endmodule
