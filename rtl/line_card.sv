// line_card: one line card with P ports (four OC-48 ports in the design).
//
// Each port has an ingress path and an egress path. Ingress: the line's
// byte stream goes through the input port processor (checksum, TTL, route
// lookup), the framer cuts the packet into cells and the cells are written
// into the port's virtual output queues, one queue per output port of the
// router, held in a shared cell buffer. A cell for a full buffer is dropped
// (drop_voq), which later costs its whole packet at the output. Egress:
// cells from the fabric are reassembled into packets by the reframer and
// queued by the output port processor, which sends them on the line.
// This per-port chain follows the design's line card; the sizes are
// parameters.
//
// Fabric side: voq_req[k] shows which VOQs of port k hold cells. When
// deq[k] is high the head cell of VOQ deq_out[k] is removed; it is offered
// on to_fab[k] combinationally in the same clock. from_fab/from_fab_valid
// carry the cells the crossbar delivers to port k. Route table writes are
// broadcast to the tables of all ports. events[k] are per-port statistic
// pulses.
//
// Lint: the VOQ memories' count and free outputs are not needed here (the
// scheduler only uses the non-empty flags).
module line_card
  import isis_pkg::*;
#(
  parameter int N             = 64,
  parameter int P             = 4,
  parameter int CARD          = 0,
  parameter int VOQ_CELLS     = 256,
  parameter int REASM_CELLS   = 128,
  parameter int REASM_TIMEOUT = 16384,
  parameter int IPP_BUF       = 4096,
  parameter int OPP_BUF       = 4096,
  parameter int ROUTES        = 16,
  parameter int IW            = (N > 1) ? $clog2(N) : 1,
  parameter int EW            = (ROUTES > 1) ? $clog2(ROUTES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  byte_stream_t  line_in  [P],
  output byte_stream_t  line_out [P],
  input  logic          rt_wr_en,
  input  logic [EW-1:0] rt_wr_idx,
  input  route_entry_t  rt_wr_entry,
  output logic [N-1:0]  voq_req  [P],
  input  logic [P-1:0]  deq,
  input  logic [IW-1:0] deq_out  [P],
  output cell_t         to_fab   [P],
  input  logic [P-1:0]  from_fab_valid,
  input  cell_t         from_fab [P],
  output port_events_t  events   [P]
);
  localparam int VAW = $clog2(VOQ_CELLS);

  for (genvar k = 0; k < P; k++) begin : g_port
    // ---------------- ingress ----------------
    byte_stream_t      ip_out;
    logic [PORT_W-1:0] ip_port;
    logic              ip_prio;
    logic              fr_valid;
    cell_t             fr_cell;
    logic              voq_ok;
    logic [VAW:0]      voq_cnt [N];
    logic [VAW:0]      voq_free;

    ipp #(.BUF_BYTES(IPP_BUF), .ROUTE_ENTRIES(ROUTES), .EW(EW)) u_ipp (
      .clk, .rst_n, .in(line_in[k]),
      .rt_wr_en, .rt_wr_idx, .rt_wr_entry,
      .out(ip_out), .out_port(ip_port), .out_prio(ip_prio),
      .fwd(events[k].ipp_fwd), .drop_csum(events[k].drop_csum),
      .drop_ttl(events[k].drop_ttl), .drop_route(events[k].drop_route),
      .drop_full(events[k].drop_ipp_full));

    framer u_framer (
      .clk, .rst_n, .port_id(PORT_W'(CARD * P + k)),
      .in(ip_out), .in_dst(ip_port), .in_prio(ip_prio),
      .cell_valid(fr_valid), .cell_out(fr_cell));

    mq_buffer #(.NQ(N), .DEPTH(VOQ_CELLS), .W($bits(cell_t))) u_voq (
      .clk, .rst_n,
      .enq_valid(fr_valid), .enq_q(fr_cell.hdr.out_port[IW-1:0]), .enq_data(fr_cell),
      .enq_ok(voq_ok),
      .deq_valid(deq[k]), .deq_q(deq_out[k]), .deq_data(to_fab[k]),
      .nonempty(voq_req[k]), .count(voq_cnt), .free_slots(voq_free));

    assign events[k].cell_in  = fr_valid && voq_ok;
    assign events[k].drop_voq = fr_valid && !voq_ok;

    // ---------------- egress ----------------
    byte_stream_t rf_out;
    logic         rf_prio;

    reframer #(.N(N), .DEPTH(REASM_CELLS), .TIMEOUT(REASM_TIMEOUT)) u_reframer (
      .clk, .rst_n, .in_valid(from_fab_valid[k]), .in_cell(from_fab[k]),
      .out(rf_out), .out_prio(rf_prio),
      .pkt_done(events[k].reasm_done), .drop_seq(events[k].drop_seq),
      .drop_timeout(events[k].drop_timeout), .drop_full(events[k].drop_reasm_full));

    assign events[k].cell_out = from_fab_valid[k];

    opp #(.BUF_BYTES(OPP_BUF)) u_opp (
      .clk, .rst_n, .in(rf_out), .in_prio(rf_prio), .out(line_out[k]),
      .sent_hi(events[k].sent_hi), .sent_lo(events[k].sent_lo),
      .dropped(events[k].drop_opp));
  end
endmodule
