// line_card_tb: one line card of four ports, with the testbench acting as a
// simple fabric that every 16 clocks moves, for each output of the card, the
// head cell of one VOQ that holds cells for it. Packets sent on all four
// lines to all four ports (and a few with bad checksums) must leave on the
// right line, forwarded (TTL - 1, new checksum) and intact.
module line_card_tb;
  import isis_pkg::*;
  import tb_ip_pkg::*;
  localparam int N = 8, P = 4;
  logic clk = 0, rst_n = 0;
  byte_stream_t line_in [P], line_out [P];
  logic rt_wr_en = 0;
  logic [3:0] rt_wr_idx = 0;
  route_entry_t rt_wr_entry = '0;
  logic [N-1:0] voq_req [P];
  logic [P-1:0] deq = '0, from_fab_valid = '0;
  logic [2:0] deq_out [P];
  cell_t to_fab [P], from_fab [P];
  port_events_t events [P];
  int checks = 0, failures = 0;

  line_card #(.N(N), .P(P), .CARD(0), .VOQ_CELLS(64), .REASM_CELLS(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- fabric model ----------------
  int slot_cnt = 0;
  always @(negedge clk) if (rst_n) begin
    bit taken [P];
    deq = '0;
    from_fab_valid = '0;
    slot_cnt++;
    if (slot_cnt % 16 == 0) begin
      for (int j = 0; j < P; j++) taken[j] = 0;
      for (int i0 = 0; i0 < P; i0++) begin
        int i, j;
        i = (i0 + slot_cnt / 16) % P;
        for (int j0 = 0; j0 < P; j0++) begin
          j = (j0 + slot_cnt / 16) % P;
          if (!deq[i] && !taken[j] && voq_req[i][j]) begin
            deq[i] = 1; deq_out[i] = 3'(j); taken[j] = 1;
          end
        end
      end
      #1;
      for (int i = 0; i < P; i++) if (deq[i]) begin
        from_fab[deq_out[i]] = to_fab[i];
        from_fab_valid[deq_out[i]] = 1;
      end
    end
  end

  // ---------------- scoreboard ----------------
  bytes_t expq [P][$];
  bytes_t got [P];
  int n_rx = 0, n_csum = 0;
  int ev [16] = '{default: 0};
  always @(posedge clk) if (rst_n) for (int j = 0; j < P; j++) for (int b = 0; b < 15; b++) ev[b] += events[j][b];
  always @(posedge clk) if (rst_n)
    for (int j = 0; j < P; j++) begin
      n_csum += events[j].drop_csum;
      if (line_out[j].valid) begin
        if (line_out[j].sop) got[j] = {};
        got[j].push_back(line_out[j].data);
        if (line_out[j].eop) begin
          int hit;
          hit = -1;
          checks++;
          n_rx++;
          foreach (expq[j][k]) if (hit < 0 && expq[j][k] == got[j]) hit = k;
          if (hit < 0) failures++;
          else expq[j].delete(hit);
        end
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

  initial begin
    int n_bad = 0;
    for (int k = 0; k < P; k++) line_in[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < P; j++) begin
      @(negedge clk);
      rt_wr_en = 1; rt_wr_idx = 4'(j);
      rt_wr_entry = '{valid: 1'b1, prefix: 32'h0A00_0000 | j, len: 6'd32, out_port: 16'(j)};
      @(negedge clk);
      rt_wr_en = 0;
    end
    for (int i = 0; i < P; i++)
      fork
        automatic int ii = i;
        begin
          for (int n = 0; n < 25; n++) begin
            int dst;
            bytes_t p;
            dst = $urandom_range(P - 1);
            p = make_ip($urandom_range(20, 250), 32'h0A00_0000 | dst, 8'd32, 8'h00, ii * 100 + n);
            if (n % 10 == 9) begin p[10] ^= 8'hFF; n_bad++; end
            else expq[dst].push_back(forwarded(p));
            send(ii, p);
            repeat ($urandom_range(0, 100)) @(negedge clk);
          end
        end
      join_none
    wait fork;
    repeat (20000) @(negedge clk);
    checks += 2;
    for (int j = 0; j < P; j++) if (expq[j].size() != 0) begin failures++; $display("port %0d: %0d missing", j, expq[j].size()); end
    if (n_csum != n_bad) failures++;
    foreach (ev[b]) $write("%0d ", ev[b]); $display("");
    $display("delivered %0d, checksum drops %0d", n_rx, n_csum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
