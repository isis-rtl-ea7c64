// pkt_fifo: byte-wide packet buffer with commit and discard.
//
// Bytes are written as they arrive. A packet only becomes visible to the
// reader when its last byte is written with wr_bad low; if wr_bad is high
// with the last byte, or the buffer ran full while the packet was written,
// the write pointer falls back to the start of the packet and the packet is
// gone (dropped is pulsed). This is how the input port processor drops bad
// packets and how the output queue drops packets it has no room for. The
// mechanism is this implementation's choice; the design only says that
// packets are buffered and bad ones dropped.
//
// Read side: rd_avail is high while a committed byte is waiting; rd_data and
// rd_last (last byte of its packet) show it combinationally and rd_en pops it.
// pkts counts whole committed packets not yet fully read.
module pkt_fifo #(
  parameter int DEPTH = 4096,   // power of two
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  logic [7:0]  wr_data,
  input  logic        wr_last,
  input  logic        wr_bad,
  output logic        dropped,
  output logic        committed,
  output logic        rd_avail,
  output logic [7:0]  rd_data,
  output logic        rd_last,
  input  logic        rd_en,
  output logic [15:0] pkts
);
  logic [8:0]  mem [DEPTH];        // {last, data}
  logic [AW:0] wptr, cptr, rptr;   // one extra bit tells full from empty
  logic        ovf;                // current packet lost bytes

  logic full;
  assign full     = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign rd_avail = (rptr != cptr);
  assign rd_data  = mem[rptr[AW-1:0]][7:0];
  assign rd_last  = mem[rptr[AW-1:0]][8];

  logic fail;
  assign fail = wr_bad || ovf || full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0; cptr <= '0; rptr <= '0; ovf <= 1'b0; pkts <= '0;
      dropped <= 1'b0; committed <= 1'b0;
    end else begin
      dropped   <= 1'b0;
      committed <= 1'b0;
      if (wr_valid) begin
        if (!full && !ovf) mem[wptr[AW-1:0]] <= {wr_last, wr_data};
        if (wr_last) begin
          if (fail) begin
            wptr    <= cptr;
            dropped <= 1'b1;
          end else begin
            wptr      <= wptr + 1'b1;
            cptr      <= wptr + 1'b1;
            committed <= 1'b1;
          end
          ovf <= 1'b0;
        end else if (full) begin
          ovf <= 1'b1;
        end else if (!ovf) begin
          wptr <= wptr + 1'b1;
        end
      end
      if (rd_en && rd_avail) rptr <= rptr + 1'b1;
      pkts <= pkts + ((wr_valid && wr_last && !fail) ? 16'd1 : 16'd0)
                   - ((rd_en && rd_avail && rd_last) ? 16'd1 : 16'd0);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> rd_avail)
    else $error("pkt_fifo: read while empty");
endmodule
