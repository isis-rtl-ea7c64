// isis_top: the ISIS router, N ports of OC-48 on N/P line cards around a
// crossbar switch fabric with a centralized iSLIP scheduler.
//
// Packets enter on the line ports as byte streams, are checked and routed
// by the input port processor, cut into 64-byte cells and held in virtual
// output queues on their line card (input queuing). The fabric works in
// slots: every SLOT_CLKS clocks the scheduler matches inputs to outputs from
// the VOQ occupancy, each matched input sends the head cell of the chosen
// VOQ through the crossbar, and the output line card reassembles and queues
// the packet before sending it on the line. With a line of one byte per
// clock, SLOT_CLKS = 64 is a fabric speedup of 1 (one 64-byte cell per
// port per cell time); a smaller value models a faster fabric, as the fabric
// pull interval does in the design's evaluation.
//
// Defaults follow the design: 64 ports, 4 ports per line card (16 cards),
// 64-byte cells. Buffer sizes, iSLIP iterations and the reassembly timeout
// are this implementation's choices.
//
// Ports: line_in/line_out per router port; rt_wr_* writes an entry into the
// routing table of every port (the control processor's job); events are
// per-port statistic pulses; slot marks the fabric slot clocks.
module isis_top
  import isis_pkg::*;
#(
  parameter int N_PORTS        = 64,
  parameter int PORTS_PER_CARD = 4,
  parameter int ISLIP_ITER     = 4,
  parameter int SLOT_CLKS      = 64,
  parameter int VOQ_CELLS      = 256,
  parameter int REASM_CELLS    = 128,
  parameter int REASM_TIMEOUT  = 16384,
  parameter int IPP_BUF        = 4096,
  parameter int OPP_BUF        = 4096,
  parameter int ROUTES         = 16,
  parameter int IW             = (N_PORTS > 1) ? $clog2(N_PORTS) : 1,
  parameter int EW             = (ROUTES > 1) ? $clog2(ROUTES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  byte_stream_t  line_in  [N_PORTS],
  output byte_stream_t  line_out [N_PORTS],
  input  logic          rt_wr_en,
  input  logic [EW-1:0] rt_wr_idx,
  input  route_entry_t  rt_wr_entry,
  output port_events_t  events   [N_PORTS],
  output logic          slot
);
  localparam int CARDS = N_PORTS / PORTS_PER_CARD;
  localparam int P     = PORTS_PER_CARD;

  logic [N_PORTS-1:0] voq_req   [N_PORTS];
  logic [N_PORTS-1:0] deq;
  logic [IW-1:0]      deq_out   [N_PORTS];
  cell_t              to_fab    [N_PORTS];
  logic [N_PORTS-1:0] fab_valid;
  cell_t              fab_cell  [N_PORTS];

  // ---------------- fabric slot timer ----------------
  logic [$clog2(SLOT_CLKS+1)-1:0] slot_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) slot_cnt <= '0;
    else        slot_cnt <= (int'(slot_cnt) == SLOT_CLKS - 1) ? '0 : slot_cnt + 1'b1;
  end
  assign slot = (int'(slot_cnt) == SLOT_CLKS - 1);

  // ---------------- line cards ----------------
  for (genvar c = 0; c < CARDS; c++) begin : g_card
    byte_stream_t l_in  [P];
    byte_stream_t l_out [P];
    logic [N_PORTS-1:0] l_req [P];
    logic [IW-1:0]      l_deq_out [P];
    cell_t              l_to  [P];
    cell_t              l_from [P];
    port_events_t       l_ev  [P];

    for (genvar k = 0; k < P; k++) begin : g_map
      assign l_in[k]                = line_in[c*P + k];
      assign line_out[c*P + k]      = l_out[k];
      assign voq_req[c*P + k]       = l_req[k];
      assign l_deq_out[k]           = deq_out[c*P + k];
      assign to_fab[c*P + k]        = l_to[k];
      assign l_from[k]              = fab_cell[c*P + k];
      assign events[c*P + k]        = l_ev[k];
    end

    line_card #(
      .N(N_PORTS), .P(P), .CARD(c), .VOQ_CELLS(VOQ_CELLS),
      .REASM_CELLS(REASM_CELLS), .REASM_TIMEOUT(REASM_TIMEOUT),
      .IPP_BUF(IPP_BUF), .OPP_BUF(OPP_BUF), .ROUTES(ROUTES), .IW(IW), .EW(EW)
    ) u_card (
      .clk, .rst_n, .line_in(l_in), .line_out(l_out),
      .rt_wr_en, .rt_wr_idx, .rt_wr_entry,
      .voq_req(l_req), .deq(deq[c*P +: P]), .deq_out(l_deq_out), .to_fab(l_to),
      .from_fab_valid(fab_valid[c*P +: P]), .from_fab(l_from), .events(l_ev));
  end

  // ---------------- scheduler and crossbar ----------------
  logic [N_PORTS-1:0] in_matched, out_matched;
  logic [IW-1:0]      in_match  [N_PORTS];
  logic [IW-1:0]      out_match [N_PORTS];

  islip_sched #(.N(N_PORTS), .ITER(ISLIP_ITER), .IW(IW)) u_sched (
    .clk, .rst_n, .slot, .req(voq_req),
    .in_matched, .in_match, .out_matched, .out_match);

  assign deq     = slot ? in_matched : '0;
  assign deq_out = in_match;

  crossbar #(.N(N_PORTS), .IW(IW)) u_xbar (
    .clk, .rst_n, .slot, .in_cell(to_fab), .sel_valid(out_matched), .sel(out_match),
    .out_cell(fab_cell), .out_valid(fab_valid));
endmodule
