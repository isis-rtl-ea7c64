// reframer_tb: cells of packets from four sources arrive interleaved.
// Phase 1, slow arrivals (one cell per 70 clocks, sources in turn): some
// packets lose a middle or last cell on the way. Every intact packet must
// come out whole and unchanged, in the order its last cell arrived, and
// every damaged one must be counted as a sequence drop or a timeout; a
// packet that never gets its last cell and is followed by silence must time
// out. Phase 2, a burst faster than the output drains: the buffer fills and
// whole packets are dropped; everything delivered must still be intact and
// delivered + dropped must equal sent.
module reframer_tb;
  import isis_pkg::*;
  import tb_ip_pkg::*;
  localparam int N = 4, DEPTH = 16, TIMEOUT = 600;
  logic clk = 0, rst_n = 0, in_valid = 0;
  cell_t in_cell = '0;
  byte_stream_t out;
  logic out_prio, pkt_done, drop_seq, drop_timeout, drop_full;
  int checks = 0, failures = 0;

  reframer #(.N(N), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bytes_t p; bit prio; } pk_t;
  typedef struct { cell_t c; int pk; } item_t;   // pk >= 0: completes pkts[pk]
  pk_t   pkts [$];
  pk_t   expq [$];              // phase 1: exact order
  bit    phase2 = 0;
  int    p2_left [int];          // phase 2: index by tag
  int    n_done = 0, n_seq = 0, n_to = 0, n_full = 0, n_got = 0;

  bytes_t got;
  always @(posedge clk) if (rst_n) begin
    n_seq += drop_seq; n_to += drop_timeout; n_full += drop_full; n_done += pkt_done;
    if (out.valid) begin
      if (out.sop) got = {};
      got.push_back(out.data);
      if (out.eop) begin
        pk_t e;
        int tag;
        checks++;
        n_got++;
        tag = {got[4], got[5]};
        if (!phase2) begin
          if (expq.size() == 0) begin failures++; $display("unexpected packet tag %0d at %0t", tag, $time); end
          else begin
            e = expq.pop_front();
            if (got != e.p || out_prio != e.prio) begin
              failures++;
              if (failures < 5) $display("mismatch tag %0d len %0d/%0d", tag, got.size(), e.p.size());
            end
          end
        end else begin
          if (!p2_left.exists(tag) || pkts[p2_left[tag]].p != got) failures++;
          else p2_left.delete(tag);
        end
      end
    end
  end

  function automatic void cells_of(input int src, input bytes_t p, input bit prio,
                                   input int pk, ref item_t q[$]);
    int nc = (p.size() + PAYLOAD_BYTES - 1) / PAYLOAD_BYTES;
    for (int c = 0; c < nc; c++) begin
      item_t it;
      it.c = '0;
      it.c.hdr.in_port = 16'(src); it.c.hdr.cell_id = 8'(c);
      it.c.hdr.flags.first = (c == 0); it.c.hdr.flags.last = (c == nc - 1);
      it.c.hdr.flags.prio = prio;
      for (int b = 0; b < PAYLOAD_BYTES && c * PAYLOAD_BYTES + b < p.size(); b++)
        it.c.payload[8*b +: 8] = p[c * PAYLOAD_BYTES + b];
      it.pk = (c == nc - 1) ? pk : -1;
      q.push_back(it);
    end
  endfunction

  item_t pend [N][$];
  int    tag = 0, faulted = 0;

  // New packet on source s; fault: lose a cell other than the first (only
  // packets of two or more cells).
  task automatic new_packet(input int s, input int len, input bit fault);
    bytes_t p;
    item_t q [$];
    pk_t e;
    bit pr;
    pr = 1'($urandom);
    p = make_ip(len, 32'h0A000001, 8'd9, 8'h00, tag++);
    e.p = p; e.prio = pr;
    pkts.push_back(e);
    q = {};
    cells_of(s, p, pr, pkts.size() - 1, q);
    if (fault && q.size() > 1) begin
      q.delete($urandom_range(1, q.size() - 1));
      foreach (q[k]) q[k].pk = -1;
      faulted++;
    end
    foreach (q[k]) pend[s].push_back(q[k]);
  endtask

  task automatic put(input item_t it);
    @(negedge clk);
    in_valid = 1; in_cell = it.c;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int sent2, lost_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---------------- phase 1 ----------------
    for (int round = 0; round < 300; round++) begin
      for (int s = 0; s < N; s++) begin
        if (pend[s].size() == 0 && $urandom_range(4) != 0 && round < 280)
          new_packet(s, $urandom_range(20, 200), $urandom_range(5) == 0);
        if (pend[s].size() != 0) begin
          item_t it;
          it = pend[s].pop_front();
          if (it.pk >= 0) expq.push_back(pkts[it.pk]);
          put(it);
        end
        repeat (68) @(negedge clk);
      end
    end
    // A packet without its last cell, then silence: must time out.
    lost_before = n_to;
    new_packet(2, 150, 1'b0);
    void'(pend[2].pop_back());
    faulted++;
    while (pend[2].size() != 0) begin put(pend[2].pop_front()); repeat (50) @(negedge clk); end
    repeat (TIMEOUT + 3000) @(negedge clk);
    checks += 3;
    if (n_to == lost_before) begin failures++; $display("no timeout"); end
    if (expq.size() != 0) failures++;
    if (n_seq + n_to != faulted || n_full != 0) begin
      failures++;
      $display("phase 1: seq %0d timeout %0d full %0d faulted %0d", n_seq, n_to, n_full, faulted);
    end
    $display("phase 1: delivered %0d, seq drops %0d, timeouts %0d", n_got, n_seq, n_to);
    // ---------------- phase 2 ----------------
    phase2 = 1;
    n_got = 0; n_seq = 0; n_to = 0; n_full = 0;
    sent2 = 0;
    for (int round = 0; round < 40; round++)
      for (int s = 0; s < N; s++) begin
        new_packet(s, $urandom_range(100, 300), 1'b0);
        p2_left[tag - 1] = pkts.size() - 1;
        sent2++;
      end
    faulted = 0;
    for (int round = 0; round < 400; round++)
      for (int s = 0; s < N; s++)
        if (pend[s].size() != 0) begin
          @(negedge clk);
          in_valid = 1; in_cell = pend[s].pop_front().c;
        end
    @(negedge clk);
    in_valid = 0;
    repeat (40000) @(negedge clk);
    checks += 2;
    if (n_full == 0) failures++;
    if (n_got + n_seq + n_to + n_full != sent2) begin
      failures++;
    end
    $display("phase 2: sent %0d delivered %0d, full %0d seq %0d timeout %0d", sent2, n_got, n_full, n_seq, n_to);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
