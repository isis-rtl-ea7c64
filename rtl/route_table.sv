// route_table: IP routing table of one port, destination address to output
// port.
//
// ENTRIES programmable entries, each a prefix, a prefix length and an output
// port. A lookup returns the matching entry with the longest prefix
// (longest-prefix match, as IP forwarding requires); hit is low when no
// entry matches. The lookup is combinational. Entries are written one per
// clock through wr_en/wr_idx/wr_entry by the control processor; reset
// clears all entries. The table organisation and its size are this
// implementation's choice: the design only names a routing table per port.
module route_table
  import isis_pkg::*;
#(
  parameter int ENTRIES = 16,
  parameter int EW      = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [EW-1:0]     wr_idx,
  input  route_entry_t      wr_entry,
  input  logic [31:0]       dst_addr,
  output logic              hit,
  output logic [PORT_W-1:0] out_port
);
  route_entry_t tbl [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
    end else if (wr_en) begin
      tbl[wr_idx] <= wr_entry;
    end
  end

  function automatic logic [31:0] mask_of(input logic [5:0] len);
    return (len == 0) ? 32'h0 : (32'hFFFF_FFFF << (6'd32 - len));
  endfunction

  always_comb begin
    logic [5:0] best;
    hit      = 1'b0;
    out_port = '0;
    best     = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (tbl[e].valid &&
          ((dst_addr & mask_of(tbl[e].len)) == (tbl[e].prefix & mask_of(tbl[e].len))) &&
          (!hit || tbl[e].len > best)) begin
        hit      = 1'b1;
        best     = tbl[e].len;
        out_port = tbl[e].out_port;
      end
    end
  end
endmodule
