// isis_pkg: types and constants shared by the router.
//
// The router moves variable length IPv4 packets as byte streams on the line
// side and as fixed 64-byte cells through the switch fabric. A cell carries a
// 6-byte header (2 bytes input port, 2 bytes output port, 1 byte cell ID and
// 1 byte of flags and priority) and 58 bytes of payload; these sizes are the
// design's own. The split of the flag/priority byte into first/last flags and
// a priority field is a choice of this implementation.
package isis_pkg;

  localparam int CELL_BYTES    = 64;
  localparam int HDR_BYTES     = 6;
  localparam int PAYLOAD_BYTES = CELL_BYTES - HDR_BYTES;   // 58
  localparam int PORT_W        = 16;                       // 2-byte port numbers

  // Flag/priority byte: bit 7 first cell of a packet, bit 6 last cell,
  // bits 5:1 reserved (zero), bit 0 priority class (1 = high).
  typedef struct packed {
    logic       first;
    logic       last;
    logic [4:0] rsvd;
    logic       prio;
  } cell_flags_t;

  typedef struct packed {
    logic [PORT_W-1:0] in_port;
    logic [PORT_W-1:0] out_port;
    logic [7:0]        cell_id;   // sequence number of the cell within its packet
    cell_flags_t       flags;
  } cell_hdr_t;

  // Payload byte k is at bits [8*k +: 8].
  typedef struct packed {
    cell_hdr_t                       hdr;
    logic [PAYLOAD_BYTES*8-1:0]      payload;
  } cell_t;

  // One byte of a packet on a line-side stream. There is no back-pressure:
  // a line delivers a byte whenever valid is high.
  typedef struct packed {
    logic       valid;
    logic       sop;    // first byte of a packet
    logic       eop;    // last byte of a packet
    logic [7:0] data;
  } byte_stream_t;

  // Entry of the routing table: a prefix of len bits maps to out_port.
  typedef struct packed {
    logic              valid;
    logic [31:0]       prefix;
    logic [5:0]        len;      // 0..32
    logic [PORT_W-1:0] out_port;
  } route_entry_t;


  // One-clock event pulses of one port, for statistics.
  typedef struct packed {
    logic ipp_fwd;        // packet passed IP processing
    logic drop_csum;      // bad header or checksum
    logic drop_ttl;       // TTL expired
    logic drop_route;     // no route
    logic drop_ipp_full;  // input packet buffer full
    logic cell_in;        // cell written into a VOQ
    logic drop_voq;       // cell refused, VOQ buffer full
    logic cell_out;       // cell arrived from the fabric
    logic reasm_done;     // packet reassembled
    logic drop_seq;       // packet lost: missing cell seen in sequence
    logic drop_timeout;   // packet lost: reassembly timeout
    logic drop_reasm_full;// packet lost: reassembly buffer full
    logic sent_hi;        // high priority packet sent on the line
    logic sent_lo;        // low priority packet sent on the line
    logic drop_opp;       // output queue full
  } port_events_t;

endpackage
