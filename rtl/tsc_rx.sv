// tsc_rx: serial command receiver of the BPI FPGA (input side of the TTC
// serial stream, after the TTC pipeline). The line rests at 0; a 1 starts a
// four-bit command, MSB first. tscSliceStart is reported (cmd_slice) as soon
// as its four command bits are in, because the slice's first data may follow
// before the descriptor has arrived; the 24-bit descriptor follows and
// info_valid pulses when it is complete. The other commands pulse their own
// outputs. An unknown code pulses bad_cmd.
module tsc_rx
  import sit_pkg::*;
(
  input  logic        clk,
  input  logic        srst,
  input  logic        serial,
  output logic        cmd_slice,
  output logic        info_valid,
  output slice_info_t info,
  output logic        run_end,
  output logic        align_fine,
  output logic        align_coarse,
  output logic        check_coarse,
  output logic        bad_cmd
);
  typedef enum logic [1:0] {R_IDLE, R_CMD, R_PARAM} rstate_e;
  rstate_e     st;
  logic [4:0]  n;
  logic [23:0] sr;

  always_ff @(posedge clk) begin
    cmd_slice <= 1'b0; info_valid <= 1'b0; run_end <= 1'b0;
    align_fine <= 1'b0; align_coarse <= 1'b0; check_coarse <= 1'b0; bad_cmd <= 1'b0;
    if (srst) begin
      st <= R_IDLE;
      n  <= '0;
      sr <= '0;
    end else begin
      case (st)
        R_IDLE: if (serial) begin
                  st <= R_CMD;
                  sr <= 24'd1;
                  n  <= 5'd3;
                end
        R_CMD: begin
                 sr <= {sr[22:0], serial};
                 n  <= n - 1'b1;
                 if (n == 5'd1) begin
                   st <= R_IDLE;
                   case ({sr[2:0], serial})
                     TSC_SLICE_START:  begin cmd_slice <= 1'b1; st <= R_PARAM; n <= 5'd24; end
                     TSC_RUN_END:      run_end      <= 1'b1;
                     TSC_ALIGN_FINE:   align_fine   <= 1'b1;
                     TSC_ALIGN_COARSE: align_coarse <= 1'b1;
                     TSC_CHECK_COARSE: check_coarse <= 1'b1;
                     default:          bad_cmd      <= 1'b1;
                   endcase
                 end
               end
        default: begin
                 sr <= {sr[22:0], serial};
                 n  <= n - 1'b1;
                 if (n == 5'd1) begin
                   st         <= R_IDLE;
                   info       <= {sr[22:0], serial};
                   info_valid <= 1'b1;
                 end
               end
      endcase
    end
  end
endmodule
