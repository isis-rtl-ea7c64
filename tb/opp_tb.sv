// opp_tb: queues a mix of low and high priority packets faster than the line
// drains them, plus packets too large for a
// queue. Each class must leave in its own order, whole and unchanged;
// a high priority packet waiting when a packet ends must go next; packets
// that do not fit must be dropped and counted.
module opp_tb;
  import isis_pkg::*;
  logic clk = 0, rst_n = 0;
  byte_stream_t in = '0, out;
  logic in_prio = 0, sent_hi, sent_lo, dropped;
  int checks = 0, failures = 0;
  typedef logic [7:0] bytes_t[$];
  bytes_t q_hi [$], q_lo [$];
  int n_hi = 0, n_lo = 0, n_drop = 0, overtakes = 0;

  opp #(.BUF_BYTES(512)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: the packet is matched against the head of the class the
  // design says it sent.
  bytes_t got;
  // Was a high priority packet complete when the queue manager picked?
  logic hi_waiting_at_pick = 0;
  always @(posedge clk) if (rst_n && !dut.busy) hi_waiting_at_pick <= (dut.npk[1] != 0);
  always @(posedge clk) if (rst_n) begin
    n_drop += dropped;
    if (out.valid) begin
      if (out.sop) begin
        got = {};
        checks++;
        // A waiting high priority packet must be chosen first.
        if (dut.sel == 1'b0 && hi_waiting_at_pick) begin failures++; $display("low sent while high waited"); end
        if (dut.sel == 1'b1 && q_lo.size() != 0) overtakes++;
      end
      got.push_back(out.data);
    end
    if (sent_hi || sent_lo) begin
      bytes_t e;
      checks++;
      if (sent_hi) begin e = q_hi.pop_front(); n_hi++; end
      else         begin e = q_lo.pop_front(); n_lo++; end
      if (got != e) begin
        failures++;
        if (failures < 5) $display("mismatch len %0d exp %0d", got.size(), e.size());
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      bytes_t p;
      int len, used;
      logic pr;
      len = $urandom_range(20, 200);
      // The line drains as fast as packets arrive, so only a packet larger
      // than the queue is refused.
      if (n % 37 == 5) len = 600;
      pr = ($urandom_range(3) == 0);
      p = {};
      for (int k = 0; k < len; k++) p.push_back(8'($urandom));
      used = pr ? int'(dut.g_q[1].u_q.wptr - dut.g_q[1].u_q.rptr)
                : int'(dut.g_q[0].u_q.wptr - dut.g_q[0].u_q.rptr);
      if (used < 0) used += 1024;
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in.valid = 1; in.sop = (k == 0); in.eop = (k == len - 1); in.data = p[k];
        in_prio = pr;
      end
      @(posedge clk); #1;
      // Committed packets join their queue; dropped ones must not have fit.
      if (pr ? dut.g_q[1].u_q.committed : dut.g_q[0].u_q.committed) begin
        if (pr) q_hi.push_back(p); else q_lo.push_back(p);
      end else begin
        checks++;
        if (len <= 512 - used) begin failures++; $display("refused len %0d used %0d", len, used); end
      end
      @(negedge clk);
      in = '0;
      // Arrivals slightly faster than the line at first, then slower.
      repeat (n < 150 ? 0 : $urandom_range(100, 300)) @(negedge clk);
    end
    repeat (5000) @(negedge clk);
    checks += 4;
    if (q_hi.size() != 0 || q_lo.size() != 0) failures++;
    if (n_drop == 0) failures++;
    if (overtakes == 0) failures++;
    if (n_hi == 0 || n_lo == 0) failures++;
    $display("sent hi %0d lo %0d, dropped %0d, overtakes %0d", n_hi, n_lo, n_drop, overtakes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
