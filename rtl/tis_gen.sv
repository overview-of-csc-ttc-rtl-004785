// tis_gen: Trigger Information Stream generator. For every queued trigger it
// writes a three-word record into the TTC FIFO; on a NOP request it writes a
// one-word NOP record. Word layouts (bit 31 on the left):
//
//   trigger word 0 : 1 r DDDDDD SSSSSSS T rrrr tttttttttttt
//                    D = TDC value, S = TTC FPGA status, T = trigger type,
//                    t = timestamp bits 11:0
//   trigger word 1 : 0010 L(28)   L = L1ID (trigger number, low 28 bits)
//   trigger word 2 : 0100 t(28)   t = timestamp bits 39:12
//   NOP            : 00000000 SSSSSSS r 16'h0000
//
// The trigger's data (TDC value, status, type, timestamp and L1ID) are
// captured in the clock of the request into a small record queue, so
// requests may come back to back; the words then leave at one per clock.
// If the record queue is full the request is lost and `lost` pulses.
module tis_gen #(
  parameter int unsigned QDEPTH = 4
) (
  input  logic        clk,
  input  logic        srst,
  input  logic        trig_req,
  input  logic        nop_req,
  input  logic        ttype,
  input  logic [5:0]  tdc_value,
  input  logic [6:0]  status,
  input  logic [39:0] timestamp,
  input  logic [31:0] l1id,
  output logic        wr,
  output logic [31:0] word,
  output logic        lost
);
  typedef struct packed {
    logic        nop;
    logic        ttype;
    logic [5:0]  tdc;
    logic [6:0]  status;
    logic [39:0] ts;
    logic [27:0] l1id;
  } rec_t;

  rec_t    in_rec, head;
  logic    empty, full;
  logic [1:0] idx;
  logic [$clog2(QDEPTH):0] count;

  always_comb begin
    in_rec.nop    = !trig_req;
    in_rec.ttype  = ttype;
    in_rec.tdc    = tdc_value;
    in_rec.status = status;
    in_rec.ts     = timestamp;
    in_rec.l1id   = l1id[27:0];
  end

  wire last = head.nop || (idx == 2'd2);

  sync_fifo #(.WIDTH($bits(rec_t)), .DEPTH(QDEPTH)) u_q (
    .clk(clk), .clr(srst),
    .push(trig_req || nop_req), .wdata(in_rec),
    .pop(!empty && last), .rdata(head),
    .empty(empty), .full(full), .count(count)
  );

  always_comb begin
    if (head.nop) word = {8'h00, head.status, 1'b0, 16'h0000};
    else case (idx)
      2'd0:    word = {1'b1, 1'b0, head.tdc, head.status, head.ttype, 4'h0, head.ts[11:0]};
      2'd1:    word = {4'b0010, head.l1id};
      default: word = {4'b0100, head.ts[39:12]};
    endcase
  end
  assign wr   = !empty;
  assign lost = (trig_req || nop_req) && full;

  always_ff @(posedge clk) begin
    if (srst)            idx <= '0;
    else if (!empty)     idx <= last ? 2'd0 : idx + 2'd1;
  end
endmodule
