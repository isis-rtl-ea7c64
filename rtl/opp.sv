// opp: output port processor, the output queue manager of one port.
//
// Reassembled packets are queued here and put on the outgoing line, one
// byte per clock. Because a whole packet is present before it is sent, the
// order can be changed to serve quality of service: this implementation
// keeps two queues, high and low priority, and always sends a waiting high
// priority packet first (strict priority between whole packets). The design
// asks for a fair-queuing stage at this point without fixing the discipline;
// two classes with strict priority is this implementation's choice. A packet
// that does not fit in its queue is dropped.
//
// Interface: in is a byte stream with in_prio held for the packet. out is
// the line, a registered byte stream; a packet leaves without gaps. Pulses:
// sent_hi, sent_lo (last byte of a packet sent) and dropped.
//
// Lint: the sop bit of the incoming stream is not needed (packets are
// delimited by eop), and the queues' commit pulses are unused because the
// packet counts carry the same information.
module opp
  import isis_pkg::*;
#(
  parameter int BUF_BYTES = 4096
) (
  input  logic         clk,
  input  logic         rst_n,
  input  byte_stream_t in,
  input  logic         in_prio,
  output byte_stream_t out,
  output logic         sent_hi,
  output logic         sent_lo,
  output logic         dropped
);
  logic [1:0]  avail, last, rd, drp;
  logic [1:0]  cmt;   // commit pulses, unused: npk already counts packets
  logic [7:0]  data [2];
  logic [15:0] npk [2];

  for (genvar c = 0; c < 2; c++) begin : g_q
    pkt_fifo #(.DEPTH(BUF_BYTES)) u_q (
      .clk, .rst_n,
      .wr_valid(in.valid && (in_prio == c[0])), .wr_data(in.data), .wr_last(in.eop),
      .wr_bad(1'b0), .dropped(drp[c]), .committed(cmt[c]),
      .rd_avail(avail[c]), .rd_data(data[c]), .rd_last(last[c]), .rd_en(rd[c]),
      .pkts(npk[c]));
  end

  logic busy, sel, first;   // sel: 1 = high priority queue
  assign rd[1] = busy && sel;
  assign rd[0] = busy && !sel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; sel <= 1'b0; first <= 1'b0;
      out <= '0; sent_hi <= 1'b0; sent_lo <= 1'b0; dropped <= 1'b0;
    end else begin
      out     <= '0;
      sent_hi <= 1'b0;
      sent_lo <= 1'b0;
      dropped <= |drp;
      if (!busy) begin
        if (npk[1] != 0) begin
          busy <= 1'b1; sel <= 1'b1; first <= 1'b1;
        end else if (npk[0] != 0) begin
          busy <= 1'b1; sel <= 1'b0; first <= 1'b1;
        end
      end else begin
        out.valid <= 1'b1;
        out.sop   <= first;
        out.eop   <= last[sel];
        out.data  <= data[sel];
        first     <= 1'b0;
        if (last[sel]) begin
          busy    <= 1'b0;
          sent_hi <= sel;
          sent_lo <= !sel;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> avail[sel])
    else $error("opp: queue ran dry inside a packet");
endmodule
