// isis_top_tb: end-to-end test of the router at reduced size (8 ports on two
// line cards, a fabric slot every 16 clocks, small buffers).
//
// Phase 1, moderate random traffic between all ports, mixed priorities,
// plus packets with bad checksums, expiring TTLs and unknown destinations:
// every good packet must leave on the port its route names, forwarded and
// intact; the bad ones must be counted as the right drops. Phase 2, a hot
// spot: every input sends large packets to port 0, far above what one
// output can take, plus some traffic to the other ports. Cells overflow the
// VOQs, packets lose cells and die at reassembly, the reassembly buffer
// overflows; every packet that is delivered must still be intact. Phase 3,
// the fabric outputs are blanked in the middle of a packet, as a broken
// link would do, so the partly assembled packet must end by timeout.
//
// Each mechanism of the design is counted and must occur at least once:
// segmentation into several cells, output contention, a match found in a
// later iSLIP iteration, an input choosing among several non-empty VOQs,
// the three IP drops, VOQ overflow, sequence drop, reassembly timeout,
// reassembly buffer overflow and a high priority packet overtaking a
// waiting low priority one.
module isis_top_tb;
  import isis_pkg::*;
  import tb_ip_pkg::*;
  localparam int N = 8, P = 4, SLOT = 16;
  logic clk = 0, rst_n = 0;
  byte_stream_t line_in [N], line_out [N];
  logic rt_wr_en = 0;
  logic [3:0] rt_wr_idx = 0;
  route_entry_t rt_wr_entry = '0;
  port_events_t events [N];
  logic slot;
  int checks = 0, failures = 0;

  isis_top #(.N_PORTS(N), .PORTS_PER_CARD(P), .ISLIP_ITER(4), .SLOT_CLKS(SLOT),
             .VOQ_CELLS(16), .REASM_CELLS(24), .REASM_TIMEOUT(3000),
             .IPP_BUF(4096), .OPP_BUF(2048)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int ev [15] = '{default: 0};
  int m_later_iter = 0, m_contention = 0, m_voq_choice = 0, m_overtake = 0;
  int m_multicell = 0;
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) for (int b = 0; b < 15; b++) ev[b] += events[j][b];
    if (slot) begin
      if (dut.u_sched.g_iter[1].acc_v != 0 || dut.u_sched.g_iter[2].acc_v != 0) m_later_iter++;
      for (int j = 0; j < N; j++) begin
        int r;
        r = 0;
        for (int i = 0; i < N; i++) r += dut.voq_req[i][j];
        if (r >= 2) m_contention++;
      end
      for (int i = 0; i < N; i++)
        if (dut.in_matched[i] && $countones(dut.voq_req[i]) >= 2) m_voq_choice++;
    end
  end
  // An output port that picks a high priority packet while a low priority
  // one is complete and waiting.
  for (genvar c = 0; c < N / P; c++) begin : g_mc
    for (genvar k = 0; k < P; k++) begin : g_mp
      always @(posedge clk)
        if (rst_n && !dut.g_card[c].u_card.g_port[k].u_opp.busy &&
            dut.g_card[c].u_card.g_port[k].u_opp.npk[1] != 0 &&
            dut.g_card[c].u_card.g_port[k].u_opp.npk[0] != 0) m_overtake++;
    end
  end

  // ---------------- scoreboard ----------------
  bytes_t expq [N][$];
  bytes_t got [N];
  int n_rx = 0, n_bad_rx = 0;
  bit lossy = 0;
  always @(posedge clk) if (rst_n)
    for (int j = 0; j < N; j++)
      if (line_out[j].valid) begin
        if (line_out[j].sop) got[j] = {};
        got[j].push_back(line_out[j].data);
        if (line_out[j].eop) begin
          int hit;
          hit = -1;
          checks++;
          n_rx++;
          foreach (expq[j][k]) if (hit < 0 && expq[j][k] == got[j]) hit = k;
          if (hit < 0) begin
            failures++;
            n_bad_rx++;
            if (n_bad_rx < 5) $display("port %0d: unexpected packet of %0d bytes", j, got[j].size());
          end else expq[j].delete(hit);
        end
      end

  task automatic send(input int port, input bytes_t p);
    for (int k = 0; k < p.size(); k++) begin
      @(negedge clk);
      line_in[port].valid = 1; line_in[port].sop = (k == 0);
      line_in[port].eop = (k == p.size() - 1); line_in[port].data = p[k];
    end
    @(negedge clk);
    line_in[port] = '0;
  endtask

  int e_csum = 0, e_ttl = 0, e_route = 0, tag = 0, n_sent = 0;

  // Random packet from input i; kind 0..2 are the IP drops.
  task automatic traffic(input int i, input int npk, input int hot_pct, input int gap,
                         input int minlen, input int maxlen);
    for (int n = 0; n < npk; n++) begin
      int dst, kind;
      bytes_t p;
      logic [7:0] tos;
      dst = ($urandom_range(99) < hot_pct) ? 0 : $urandom_range(N - 1);
      kind = $urandom_range(19);
      tos = $urandom_range(2) == 0 ? 8'h80 : 8'h00;
      p = make_ip($urandom_range(minlen, maxlen), 32'h0A00_0000 | dst,
                  kind == 1 ? 8'd1 : 8'd64, tos, tag++);
      if (kind == 0) begin p[12] ^= 8'h01; e_csum++; end
      else if (kind == 1) e_ttl++;
      else if (kind == 2) begin p = make_ip(p.size(), 32'h0C00_0001, 8'd64, tos, tag++); e_route++; end
      else begin expq[dst].push_back(forwarded(p)); n_sent++; end
      send(i, p);
      repeat ($urandom_range(0, gap)) @(negedge clk);
    end
  endtask

  initial begin
    int missing;
    for (int k = 0; k < N; k++) line_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      rt_wr_en = 1; rt_wr_idx = 4'(j);
      rt_wr_entry = '{valid: 1'b1, prefix: 32'h0A00_0000 | j, len: 6'd32, out_port: 16'(j)};
      @(negedge clk);
      rt_wr_en = 0;
    end
    // ---------------- phase 1 ----------------
    for (int i = 0; i < N; i++)
      fork
        automatic int ii = i;
        traffic(ii, 40, 0, 600, 20, 300);
      join_none
    wait fork;
    repeat (30000) @(negedge clk);
    missing = 0;
    for (int j = 0; j < N; j++) missing += expq[j].size();
    checks += 5;
    if (missing != 0) begin failures++; $display("phase 1: %0d packets missing", missing); end
    if (ev[13] != e_csum) failures++;       // drop_csum
    if (ev[12] != e_ttl) failures++;        // drop_ttl
    if (ev[11] != e_route) failures++;      // drop_route
    if (n_rx != n_sent) failures++;
    $display("phase 1: sent %0d delivered %0d, drops csum %0d ttl %0d route %0d",
             n_sent, n_rx, ev[13], ev[12], ev[11]);
    // ---------------- phase 2 ----------------
    for (int i = 0; i < N; i++)
      fork
        automatic int ii = i;
        traffic(ii, 30, 70, 20, 200, 600);
      join_none
    wait fork;
    repeat (20000) @(negedge clk);
    // ---------------- phase 3 ----------------
    // A cell lost in transit: one maximum size packet from input 2 to port
    // 3, and after its fifth cell has crossed the fabric the testbench
    // blanks the fabric outputs for a while, as a failed link would. The
    // rest of the packet never arrives, so its reassembly must time out.
    fork
      begin
        bytes_t p;
        p = make_ip(1500, 32'h0A00_0003, 8'd64, 8'h00, 61000);
        send(2, p);
      end
      begin
        int seen;
        seen = 0;
        while (seen < 5) begin
          @(posedge clk);
          if (dut.fab_valid[3]) seen++;
        end
        @(negedge clk);
        force dut.fab_valid = '0;
        repeat (3000) @(negedge clk);
        release dut.fab_valid;
      end
    join
    repeat (100000) @(negedge clk);
    missing = 0;
    for (int j = 0; j < N; j++) missing += expq[j].size();
    $display("phase 2: lost %0d packets", missing);
    // ---------------- mechanisms ----------------
    m_multicell = ev[9] - ev[14];   // cells into VOQs beyond one per packet
    $display("multi-cell %0d, contention %0d, later iSLIP iteration %0d, VOQ choice %0d",
             m_multicell, m_contention, m_later_iter, m_voq_choice);
    $display("VOQ overflow %0d, seq drop %0d, timeout %0d, reassembly full %0d, priority overtake %0d",
             ev[8], ev[5], ev[4], ev[3], m_overtake);
    checks += 12;
    if (m_multicell <= 0) failures++;
    if (m_contention == 0) failures++;
    if (m_later_iter == 0) failures++;
    if (m_voq_choice == 0) failures++;
    if (ev[13] == 0 || ev[12] == 0 || ev[11] == 0) failures++;
    if (ev[8] == 0) failures++;      // VOQ overflow
    if (ev[5] == 0) failures++;      // sequence drop
    if (ev[4] == 0) failures++;      // timeout
    if (ev[3] == 0) failures++;      // reassembly buffer full
    if (m_overtake == 0) failures++;
    if (missing == 0) failures++;    // the overload must lose packets
    // Lost packets must be accounted for by the drop counters.
    if (ev[5] + ev[4] + ev[3] + ev[0] + ev[10] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
