// framer: segmentation half of the SAR, cutting packets into fixed cells.
//
// Each packet is cut into 64-byte cells: a 6-byte header (input port, output
// port, cell ID, flags and priority) and 58 payload bytes, as the design
// specifies. The cell ID counts the cells of a packet from 0; the first and
// last flags mark the packet's first and last cell (a one-cell packet has
// both). Unused payload bytes of the last cell are zero; the receiving side
// finds the packet length in the IP header. The flag layout is this
// implementation's choice (see isis_pkg).
//
// Interface: in is a byte stream with the packet's output port and priority
// held steady during the packet. A finished cell appears on cell with
// cell_valid high for one clock, registered, in the clock after the byte that
// filled it (the 58th payload byte or the packet's last byte). There is no
// back-pressure: the framer takes one byte per clock.
module framer
  import isis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PORT_W-1:0] port_id,
  input  byte_stream_t      in,
  input  logic [PORT_W-1:0] in_dst,
  input  logic              in_prio,
  output logic              cell_valid,
  output cell_t             cell_out
);
  localparam int CW = $clog2(PAYLOAD_BYTES);

  logic [PAYLOAD_BYTES*8-1:0] payload;
  logic [CW-1:0]              cnt;      // payload bytes already in this cell
  logic [7:0]                 cell_id;
  logic                       first;

  logic [PAYLOAD_BYTES*8-1:0] payload_n;
  logic [CW-1:0]              cnt_c;
  logic                       full_n;

  always_comb begin
    cnt_c     = in.sop ? '0 : cnt;
    payload_n = (cnt_c == 0) ? '0 : payload;
    payload_n[8*cnt_c +: 8] = in.data;
    full_n    = (cnt_c == CW'(PAYLOAD_BYTES - 1)) || in.eop;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      payload <= '0; cnt <= '0; cell_id <= '0; first <= 1'b1;
      cell_valid <= 1'b0; cell_out <= '0;
    end else begin
      cell_valid <= 1'b0;
      if (in.valid) begin
        if (full_n) begin
          cell_valid              <= 1'b1;
          cell_out.hdr.in_port        <= port_id;
          cell_out.hdr.out_port       <= in_dst;
          cell_out.hdr.cell_id        <= in.sop ? 8'd0 : cell_id;
          cell_out.hdr.flags          <= '{first: in.sop || first, last: in.eop,
                                       rsvd: '0, prio: in_prio};
          cell_out.payload            <= payload_n;
          cnt                     <= '0;
          cell_id                 <= (in.sop ? 8'd0 : cell_id) + 8'd1;
          first                   <= in.eop;
        end else begin
          payload <= payload_n;
          cnt     <= cnt_c + 1'b1;
          if (in.sop) begin
            cell_id <= '0;
            first   <= 1'b1;
          end
        end
        if (in.eop) begin
          cell_id <= '0;
          first   <= 1'b1;
        end
      end
    end
  end
endmodule
