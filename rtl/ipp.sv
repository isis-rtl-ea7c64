// ipp: input port processor, the IP forwarding work done per packet at each
// input port.
//
// For every IPv4 packet arriving on the line it checks the header checksum,
// decrements the TTL, recomputes the checksum, drops the packet when the TTL
// would reach zero, and looks the destination address up in the port's
// routing table to find the output port. These functions are the design's;
// how they are done here is this implementation's choice:
//  * store and forward: the packet is written into a pkt_fifo while the
//    header is examined byte by byte, and committed or discarded after its
//    last byte;
//  * only 20-byte headers (version 4, IHL 5) are accepted, other packets and
//    packets shorter than 20 bytes are dropped;
//  * the new checksum is computed over the header with the new TTL and a
//    zero checksum field; it is written, with the new TTL, into the packet as
//    it leaves;
//  * packets without a route are dropped;
//  * the priority class is bit 7 of the TOS byte (IP precedence 4..7 = high).
//
// Interface: in is a byte stream with no back-pressure. out is a byte
// stream, registered, with the output port and priority held for the whole
// packet. Statistic pulses: fwd, drop_csum (bad checksum or header), drop_ttl,
// drop_route, drop_full (no buffer space). Latency: the first byte leaves
// four clocks after the last byte was on the input; the output runs at one byte per
// clock.
//
// Lint: the packet count of the internal buffer is not used (packets
// are tracked by the descriptor queue).
module ipp
  import isis_pkg::*;
#(
  parameter int BUF_BYTES     = 4096,
  parameter int DESC_DEPTH    = 256,
  parameter int ROUTE_ENTRIES = 16,
  parameter int EW            = (ROUTE_ENTRIES > 1) ? $clog2(ROUTE_ENTRIES) : 1,
  parameter int DW            = $clog2(DESC_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  byte_stream_t      in,
  input  logic              rt_wr_en,
  input  logic [EW-1:0]     rt_wr_idx,
  input  route_entry_t      rt_wr_entry,
  output byte_stream_t      out,
  output logic [PORT_W-1:0] out_port,
  output logic              out_prio,
  output logic              fwd,
  output logic              drop_csum,
  output logic              drop_ttl,
  output logic              drop_route,
  output logic              drop_full
);
  // ---------------- header parsing on the write side ----------------
  logic [15:0] idx;              // index of the current byte within the packet
  logic [19:0] sum_chk, sum_new; // one's complement sums, unfolded
  logic [7:0]  ver_ihl, tos, ttl;
  logic [31:0] dst;

  logic [15:0] idx_c;
  logic [19:0] sum_chk_c, sum_new_c;
  logic [7:0]  ver_ihl_c, tos_c, ttl_c;
  logic [31:0] dst_c;
  logic [7:0]  new_byte;

  always_comb begin
    idx_c     = in.sop ? 16'd0 : idx;
    sum_chk_c = in.sop ? 20'd0 : sum_chk;
    sum_new_c = in.sop ? 20'd0 : sum_new;
    ver_ihl_c = ver_ihl;
    tos_c     = tos;
    ttl_c     = ttl;
    dst_c     = dst;
    new_byte  = in.data;
    if (idx_c < 16'd20) begin
      case (idx_c)
        16'd0:  ver_ihl_c = in.data;
        16'd1:  tos_c     = in.data;
        16'd8:  begin ttl_c = in.data; new_byte = in.data - 8'd1; end
        16'd10, 16'd11: new_byte = 8'd0;
        16'd16: dst_c[31:24] = in.data;
        16'd17: dst_c[23:16] = in.data;
        16'd18: dst_c[15:8]  = in.data;
        16'd19: dst_c[7:0]   = in.data;
        default: ;
      endcase
      // Even bytes are the high half of a 16-bit word.
      sum_chk_c = sum_chk_c + (idx_c[0] ? {12'd0, in.data} : {4'd0, in.data, 8'd0});
      sum_new_c = sum_new_c + (idx_c[0] ? {12'd0, new_byte} : {4'd0, new_byte, 8'd0});
    end
  end

  function automatic logic [15:0] fold(input logic [19:0] s);
    logic [19:0] t;
    t = {4'd0, s[15:0]} + {16'd0, s[19:16]};
    t = {4'd0, t[15:0]} + {16'd0, t[19:16]};
    return t[15:0];
  endfunction

  // Routing table, looked up with the address as it completes.
  logic              rt_hit;
  logic [PORT_W-1:0] rt_port;
  route_table #(.ENTRIES(ROUTE_ENTRIES), .EW(EW)) u_rt (
    .clk, .rst_n, .wr_en(rt_wr_en), .wr_idx(rt_wr_idx), .wr_entry(rt_wr_entry),
    .dst_addr(dst_c), .hit(rt_hit), .out_port(rt_port));

  // ---------------- verdict at the last byte ----------------
  logic hdr_ok, csum_ok, ttl_ok, desc_room;
  logic [DW:0] desc_cnt;
  assign hdr_ok    = (idx_c >= 16'd19) && (ver_ihl_c == 8'h45);
  assign csum_ok   = hdr_ok && (fold(sum_chk_c) == 16'hFFFF);
  assign ttl_ok    = ttl_c > 8'd1;
  assign desc_room = desc_cnt < (DW+1)'(DESC_DEPTH - 1);

  logic last_in, bad;
  assign last_in = in.valid && in.eop;
  assign bad     = !csum_ok || !ttl_ok || !rt_hit || !desc_room;

  typedef struct packed {
    logic [PORT_W-1:0] port;
    logic              prio;
    logic [7:0]        ttl;
    logic [15:0]       csum;
  } desc_t;

  desc_t pend;   // verdict of the packet being committed

  logic f_dropped, f_committed, f_avail, f_last, f_rd;
  logic [7:0] f_data;
  logic [15:0] f_pkts;   // packet count of the buffer, for debug only
  pkt_fifo #(.DEPTH(BUF_BYTES)) u_buf (
    .clk, .rst_n,
    .wr_valid(in.valid), .wr_data(in.data), .wr_last(in.eop), .wr_bad(bad),
    .dropped(f_dropped), .committed(f_committed),
    .rd_avail(f_avail), .rd_data(f_data), .rd_last(f_last), .rd_en(f_rd), .pkts(f_pkts));

  logic pend_bad_reason;  // drop caused by the header, not by buffer space
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx <= '0; sum_chk <= '0; sum_new <= '0;
      ver_ihl <= '0; tos <= '0; ttl <= '0; dst <= '0;
      pend <= '0; pend_bad_reason <= 1'b0;
      drop_csum <= 1'b0; drop_ttl <= 1'b0; drop_route <= 1'b0;
    end else begin
      drop_csum <= 1'b0; drop_ttl <= 1'b0; drop_route <= 1'b0;
      if (in.valid) begin
        idx     <= idx_c + 16'd1;
        sum_chk <= sum_chk_c;
        sum_new <= sum_new_c;
        ver_ihl <= ver_ihl_c;
        tos     <= tos_c;
        ttl     <= ttl_c;
        dst     <= dst_c;
      end
      if (last_in) begin
        pend <= '{port: rt_port, prio: tos_c[7], ttl: ttl_c - 8'd1,
                  csum: ~fold(sum_new_c)};
        pend_bad_reason <= !csum_ok || !ttl_ok || !rt_hit;
        if (!csum_ok)                drop_csum  <= 1'b1;
        else if (!ttl_ok)            drop_ttl   <= 1'b1;
        else if (!rt_hit)            drop_route <= 1'b1;
      end
    end
  end
  assign drop_full = f_dropped && !pend_bad_reason;

  // ---------------- descriptor FIFO ----------------
  desc_t       desc_mem [DESC_DEPTH];
  logic [DW-1:0] d_wr, d_rd;
  desc_t       cur;
  assign cur = desc_mem[d_rd];

  // ---------------- read side: rewrite TTL and checksum ----------------
  logic        sending;
  logic [15:0] ridx;
  logic        start, pop;
  assign start = !sending && f_avail && (desc_cnt != 0);
  assign f_rd  = sending;
  assign pop   = sending && f_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_wr <= '0; d_rd <= '0; desc_cnt <= '0;
      sending <= 1'b0; ridx <= '0;
      out <= '0; out_port <= '0; out_prio <= 1'b0; fwd <= 1'b0;
    end else begin
      if (f_committed) begin
        desc_mem[d_wr] <= pend;
        d_wr <= d_wr + 1'b1;
      end
      if (pop) d_rd <= d_rd + 1'b1;
      desc_cnt <= desc_cnt + (f_committed ? (DW+1)'(1) : (DW+1)'(0))
                           - (pop ? (DW+1)'(1) : (DW+1)'(0));
      fwd <= pop;
      if (start) begin
        sending <= 1'b1;
        ridx    <= '0;
      end else if (pop) begin
        sending <= 1'b0;
      end else if (sending) begin
        ridx <= ridx + 16'd1;
      end
      out.valid <= sending;
      out.sop   <= sending && ridx == 16'd0;
      out.eop   <= sending && f_last;
      case (ridx)
        16'd8:   out.data <= cur.ttl;
        16'd10:  out.data <= cur.csum[15:8];
        16'd11:  out.data <= cur.csum[7:0];
        default: out.data <= f_data;
      endcase
      if (start) begin
        out_port <= cur.port;
        out_prio <= cur.prio;
      end
    end
  end
endmodule
