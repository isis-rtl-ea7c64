// reframer: reassembly half of the SAR at each output port.
//
// Cells of one output arrive from many inputs interleaved, but the cells of
// one input reach an output in order. The reframer therefore keeps one
// reassembly context per source input and one queue per source in a shared
// mq_buffer. A packet is complete when its cells arrived with cell IDs 0,1,..
// and the last one carries the last flag. As the design requires, the whole
// packet is dropped when one of its cells is missing: a cell ID out of
// sequence, a cell refused for lack of buffer space, or no cell for TIMEOUT
// clocks while a packet is half assembled. The choice of timeout, buffer size
// and this queueing structure is this implementation's.
//
// Complete and dropped packets are put, in order, in a list of descriptors
// (source, number of cells, drop). An output engine works through the list:
// cells of a dropped packet are freed one per clock; a good packet is sent
// as a byte stream, one byte per clock, its length taken from the IP total
// length field in the first cell. Timeouts are handled in clocks with no
// arriving cell (cells arrive at most once per fabric slot).
//
// Interface: in_valid/in_cell from the fabric (no back-pressure). out is a
// registered byte stream with out_prio held for the packet. Pulses:
// pkt_done, drop_seq, drop_timeout, drop_full.
//
// Lint: the header bits of the cell being sent are not read (only its
// payload is), and the cell memory's nonempty, count and free outputs are
// unused because the per-source contexts already track every packet.
module reframer
  import isis_pkg::*;
#(
  parameter int N       = 64,
  parameter int DEPTH   = 128,
  parameter int TIMEOUT = 16384,
  parameter int SW      = (N > 1) ? $clog2(N) : 1,
  parameter int AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  cell_t        in_cell,
  output byte_stream_t out,
  output logic         out_prio,
  output logic         pkt_done,
  output logic         drop_seq,
  output logic         drop_timeout,
  output logic         drop_full
);
  localparam int TW = $clog2(TIMEOUT + 1);

  typedef enum logic [1:0] {C_IDLE, C_COLLECT, C_DISCARD} ctx_state_e;
  typedef struct packed {
    logic [SW-1:0] src;
    logic [7:0]    ncells;
    logic          drop;
  } rdesc_t;

  ctx_state_e  cst    [N];
  logic [7:0]  expect_id [N];
  logic [7:0]  ncoll  [N];
  logic [TW-1:0] timer [N];

  // ---------------- cell store ----------------
  logic          enq_valid, enq_ok;
  logic          deq_valid;
  logic [SW-1:0] deq_q;
  cell_t         deq_cell;
  // Occupancy outputs of the store; the reframer only needs enq_ok.
  logic [N-1:0]  q_nonempty;
  logic [AW:0]   q_count [N];
  logic [AW:0]   q_free;

  mq_buffer #(.NQ(N), .DEPTH(DEPTH), .W($bits(cell_t))) u_store (
    .clk, .rst_n,
    .enq_valid, .enq_q(in_cell.hdr.in_port[SW-1:0]), .enq_data(in_cell), .enq_ok,
    .deq_valid, .deq_q, .deq_data(deq_cell),
    .nonempty(q_nonempty), .count(q_count), .free_slots(q_free));

  // ---------------- arrival decisions ----------------
  logic [SW-1:0] s;
  logic          is_first, is_last, in_seq;
  assign s        = in_cell.hdr.in_port[SW-1:0];
  assign is_first = in_cell.hdr.flags.first && in_cell.hdr.cell_id == 8'd0;
  assign is_last  = in_cell.hdr.flags.last;
  assign in_seq   = (cst[s] == C_COLLECT) && !in_cell.hdr.flags.first &&
                    in_cell.hdr.cell_id == expect_id[s];

  // The cell is stored when it continues a packet in order or starts one.
  assign enq_valid = in_valid && (in_seq || is_first);

  // Descriptor pushes: up to two per clock (a dropped old packet and a new
  // one-cell packet).
  logic   push0, push1;
  rdesc_t pd0, pd1;

  // Timeout candidate: lowest numbered source over its limit.
  logic          to_v;
  logic [SW-1:0] to_src;
  always_comb begin
    to_v   = 1'b0;
    to_src = '0;
    for (int k = N - 1; k >= 0; k--)
      if (cst[k] == C_COLLECT && int'(timer[k]) >= TIMEOUT) begin
        to_v   = 1'b1;
        to_src = SW'(k);
      end
  end

  always_comb begin
    push0 = 1'b0; pd0 = '0;
    push1 = 1'b0; pd1 = '0;
    if (in_valid) begin
      // Abandon a half-built packet that this cell does not continue.
      if (cst[s] == C_COLLECT && (!in_seq || !enq_ok)) begin
        push0 = 1'b1;
        pd0   = '{src: s, ncells: ncoll[s], drop: 1'b1};
      end
      // A stored cell that completes a packet.
      if (enq_ok && is_last) begin
        push1 = 1'b1;
        pd1   = '{src: s, ncells: in_seq ? ncoll[s] + 8'd1 : 8'd1, drop: 1'b0};
      end
    end else if (to_v) begin
      push0 = 1'b1;
      pd0   = '{src: to_src, ncells: ncoll[to_src], drop: 1'b1};
    end
  end

  // ---------------- descriptor list ----------------
  rdesc_t        dl [2**AW];   // at least DEPTH entries, indexed modulo 2**AW
  logic [AW-1:0] dl_wr, dl_rd;
  logic          dl_pop;
  logic [AW:0]   dl_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dl_wr <= '0; dl_rd <= '0; dl_cnt <= '0;
    end else begin
      if (push0 && push1) begin
        dl[dl_wr]        <= pd0;
        dl[dl_wr + 1'b1] <= pd1;
        dl_wr            <= dl_wr + AW'(2);
      end else if (push0 || push1) begin
        dl[dl_wr] <= push0 ? pd0 : pd1;
        dl_wr     <= dl_wr + 1'b1;
      end
      if (dl_pop) dl_rd <= dl_rd + 1'b1;
      dl_cnt <= dl_cnt + (AW+1)'(push0) + (AW+1)'(push1) - (AW+1)'(dl_pop);
    end
  end

  // ---------------- context update ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        cst[k] <= C_IDLE; expect_id[k] <= '0; ncoll[k] <= '0; timer[k] <= '0;
      end
      drop_seq <= 1'b0; drop_timeout <= 1'b0; drop_full <= 1'b0;
    end else begin
      drop_seq <= 1'b0; drop_timeout <= 1'b0; drop_full <= 1'b0;
      for (int k = 0; k < N; k++)
        if (cst[k] == C_COLLECT && int'(timer[k]) < TIMEOUT) timer[k] <= timer[k] + 1'b1;
      if (in_valid) begin
        timer[s] <= '0;
        if (enq_valid && !enq_ok) begin
          // No room: the packet this cell belongs to is lost.
          drop_full <= 1'b1;
          cst[s]    <= C_DISCARD;
        end else if (in_seq || is_first) begin
          if (cst[s] == C_COLLECT && !in_seq) drop_seq <= 1'b1;
          if (is_last) begin
            cst[s] <= C_IDLE;
          end else begin
            cst[s]       <= C_COLLECT;
            expect_id[s] <= in_cell.hdr.cell_id + 8'd1;
            ncoll[s]     <= in_seq ? ncoll[s] + 8'd1 : 8'd1;
          end
        end else begin
          // Out of sequence and not a new packet: discard until a first cell.
          if (cst[s] != C_DISCARD) drop_seq <= 1'b1;
          cst[s] <= C_DISCARD;
        end
      end else if (to_v) begin
        drop_timeout  <= 1'b1;
        cst[to_src]   <= C_IDLE;
        timer[to_src] <= '0;
      end
    end
  end

  // ---------------- output engine ----------------
  typedef enum logic [1:0] {O_IDLE, O_DROP, O_SEND} out_state_e;
  out_state_e    ost;
  rdesc_t        head;
  logic [SW-1:0] osrc;
  logic [7:0]    cells_left;    // cells still in the store for this packet
  logic [15:0]   bytes_left;
  logic [5:0]    pos;
  cell_t         cur;
  logic          first_byte;

  assign head = dl[dl_rd];

  always_comb begin
    deq_valid = 1'b0;
    deq_q     = osrc;
    dl_pop    = 1'b0;
    case (ost)
      O_IDLE: if (dl_cnt != 0) begin
        deq_q  = head.src;
        dl_pop = 1'b1;
        deq_valid = !head.drop;   // the first cell of a good packet is read now
      end
      O_DROP: deq_valid = (cells_left != 0);
      O_SEND: deq_valid = (pos == 6'(PAYLOAD_BYTES - 1)) && (bytes_left != 16'd1) &&
                          (cells_left != 0);
      default: ;
    endcase
  end

  logic [15:0] tot_len;
  assign tot_len = {deq_cell.payload[8*2 +: 8], deq_cell.payload[8*3 +: 8]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ost <= O_IDLE; osrc <= '0; cells_left <= '0; bytes_left <= '0; pos <= '0;
      cur <= '0; first_byte <= 1'b0;
      out <= '0; out_prio <= 1'b0; pkt_done <= 1'b0;
    end else begin
      out      <= '0;
      pkt_done <= 1'b0;
      case (ost)
        O_IDLE: if (dl_cnt != 0) begin
          osrc <= head.src;
          if (head.drop) begin
            ost        <= O_DROP;
            cells_left <= head.ncells;
          end else begin
            ost        <= O_SEND;
            cells_left <= head.ncells - 8'd1;
            cur        <= deq_cell;
            bytes_left <= (tot_len == 16'd0) ? 16'd1 : tot_len;
            pos        <= '0;
            first_byte <= 1'b1;
            out_prio   <= deq_cell.hdr.flags.prio;
          end
        end
        O_DROP: begin
          if (cells_left != 0) cells_left <= cells_left - 8'd1;
          else                 ost        <= O_IDLE;
        end
        O_SEND: begin
          logic done;
          done = (bytes_left == 16'd1) ||
                 (pos == 6'(PAYLOAD_BYTES - 1) && cells_left == 0);
          out.valid  <= 1'b1;
          out.sop    <= first_byte;
          out.eop    <= done;
          out.data   <= cur.payload[8*pos +: 8];
          first_byte <= 1'b0;
          bytes_left <= bytes_left - 16'd1;
          if (done) begin
            pkt_done <= 1'b1;
            // Cells beyond the IP length are freed like a dropped packet.
            ost <= (cells_left != 0) ? O_DROP : O_IDLE;
          end else if (pos == 6'(PAYLOAD_BYTES - 1)) begin
            cur        <= deq_cell;
            cells_left <= cells_left - 8'd1;
            pos        <= '0;
          end else begin
            pos <= pos + 6'd1;
          end
        end
        default: ost <= O_IDLE;
      endcase
    end
  end
endmodule
