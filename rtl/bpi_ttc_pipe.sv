// bpi_ttc_pipe: TTC pipeline of the BPI FPGA. The TTC FPGA's signals (TTC
// mode, LOCKED, EXPECTED_RXDATA, SERIAL) leave at the time the SCA control
// word leaves; the data they describe returns over the G-Link some clocks
// later. This pipeline delays them by BPIR_TTC_Latency clocks (0-255) so that
// they line up with the received data, and decodes the TTC mode.
module bpi_ttc_pipe
  import sit_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] latency,
  input  logic [1:0] tmode,
  input  logic       locked,
  input  logic       expected_rxdata,
  input  logic       serial,
  output logic       tl_sync_reset,
  output logic       tl_trigger,
  output logic       tl_running,
  output logic       tl_stopped,
  output logic       tl_locked,
  output logic       tl_expected_rxdata,
  output logic       tl_serial
);
  logic [4:0] d;
  delay_line #(.WIDTH(5), .DEPTH(256)) u_dl (
    .clk(clk), .delay(latency), .in({tmode, locked, expected_rxdata, serial}), .out(d));

  tmode_e tm;
  assign tm                 = tmode_e'(d[4:3]);
  assign tl_sync_reset      = (tm == TMODE_SYNC_RESET);
  assign tl_trigger         = (tm == TMODE_TRIGGER);
  assign tl_stopped         = (tm == TMODE_STOPPED);
  assign tl_running         = (tm == TMODE_RUNNING) || (tm == TMODE_TRIGGER);
  assign tl_locked          = d[2];
  assign tl_expected_rxdata = d[1];
  assign tl_serial          = d[0];
endmodule
