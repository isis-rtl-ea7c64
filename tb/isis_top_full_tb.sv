// isis_top_full_tb: the router at its full size, every parameter of isis_top
// at its default: 64 ports on 16 line cards of four, a fabric slot every 64
// clocks (speedup 1), 4-iteration iSLIP over 64 x 64 requests.
//
// The route table holds 16 entries, so 16 host routes (10.0.0.j/32) lead to
// 16 output ports spread over all line cards and all four port positions:
// route j goes to port 4j + (j mod 4). All 64 inputs then send a few
// packets each, of random size from minimum to maximum (one 1500-byte
// packet per input), to random routed destinations, with random gaps, and
// every fourth input adds one packet with a bad header checksum. Every
// packet that comes out must be a good packet on the port its route names,
// with TTL decremented and checksum corrected. Outputs are loaded close to
// the line rate, and several inputs may interleave long packets into one
// output, which can fill that output's reassembly memory: a packet may be
// lost only with a counted drop reason, and at least nine in ten must
// arrive.
module isis_top_full_tb;
  import isis_pkg::*;
  import tb_ip_pkg::*;
  localparam int N = 64, R = 16;
  logic clk = 0, rst_n = 0;
  byte_stream_t line_in [N], line_out [N];
  logic rt_wr_en = 0;
  logic [3:0] rt_wr_idx = 0;
  route_entry_t rt_wr_entry = '0;
  port_events_t events [N];
  logic slot;
  int checks = 0, failures = 0;

  isis_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int port_of(input int j);
    return 4 * j + (j % 4);
  endfunction

  int n_csum = 0, n_cells = 0;
  int ev [15] = '{default: 0};
  always @(posedge clk) if (rst_n)
    for (int j = 0; j < N; j++) begin
      n_csum  += events[j].drop_csum;
      n_cells += events[j].cell_out;
      for (int b = 0; b < 15; b++) ev[b] += events[j][b];
    end

  // ---------------- scoreboard ----------------
  bytes_t expq [N][$];
  bytes_t got [N];
  int n_rx = 0, n_sent = 0, n_bad = 0;
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
            if (n_bad++ < 5) $display("port %0d: unexpected packet of %0d bytes", j, got[j].size());
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

  task automatic traffic(input int i);
    int big;
    big = $urandom_range(3);
    for (int n = 0; n < 4; n++) begin
      int r, len;
      bytes_t p;
      r = $urandom_range(R - 1);
      len = (n == big) ? 1500 : $urandom_range(20, 300);
      p = make_ip(len, 32'h0A00_0000 | r, 8'd64, $urandom_range(1) ? 8'h80 : 8'h00, 16'(i * 8 + n));
      expq[port_of(r)].push_back(forwarded(p));
      n_sent++;
      send(i, p);
      repeat ($urandom_range(100, 3000)) @(negedge clk);
    end
    if (i % 4 == 0) begin
      bytes_t p;
      p = make_ip(100, 32'h0A00_0001, 8'd64, 8'h00, 16'(i * 8 + 5));
      p[14] ^= 8'h40;
      send(i, p);
    end
  endtask

  initial begin
    int missing, lost;
    for (int k = 0; k < N; k++) line_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < R; j++) begin
      @(negedge clk);
      rt_wr_en = 1; rt_wr_idx = 4'(j);
      rt_wr_entry = '{valid: 1'b1, prefix: 32'h0A00_0000 | j, len: 6'd32, out_port: 16'(port_of(j))};
      @(negedge clk);
      rt_wr_en = 0;
    end
    for (int i = 0; i < N; i++)
      fork
        automatic int ii = i;
        traffic(ii);
      join_none
    wait fork;
    repeat (60000) @(negedge clk);
    missing = 0;
    for (int j = 0; j < N; j++) missing += expq[j].size();
    // Packet drops with a reason: sequence, timeout, reassembly full, OPP
    // full, IPP full.
    lost = ev[5] + ev[4] + ev[3] + ev[0] + ev[10];
    checks += 4;
    if (missing != lost) begin
      failures++;
      $display("%0d packets missing, %0d counted drops", missing, lost);
    end
    if (n_rx + missing != n_sent) failures++;
    if (n_rx < n_sent * 9 / 10) failures++;
    if (n_csum != N / 4) failures++;
    $display("sent %0d delivered %0d, cells through the fabric %0d, checksum drops %0d",
             n_sent, n_rx, n_cells, n_csum);
    $display("drops: VOQ cells %0d, sequence %0d, timeout %0d, reassembly full %0d, IPP full %0d, OPP %0d",
             ev[8], ev[5], ev[4], ev[3], ev[10], ev[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
