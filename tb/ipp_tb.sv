// ipp_tb: sends IPv4 packets through the input port processor: good ones,
// bad checksums, bad headers, short packets, expiring TTLs and unroutable
// destinations. Forwarded packets must come out in order with TTL - 1, a
// correct new checksum, the longest-prefix route and the TOS priority; the
// others must be counted as the right kind of drop. Also checks the
// latency: the first byte is on the output four clocks after the last
// byte was on the input.
module ipp_tb;
  import isis_pkg::*;
  import tb_ip_pkg::*;
  logic clk = 0, rst_n = 0;
  byte_stream_t in = '0, out;
  logic rt_wr_en = 0;
  logic [3:0] rt_wr_idx = 0;
  route_entry_t rt_wr_entry = '0;
  logic [PORT_W-1:0] out_port;
  logic out_prio, fwd, drop_csum, drop_ttl, drop_route, drop_full;
  int checks = 0, failures = 0;

  ipp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bytes_t p; int port; bit prio; } exp_t;
  exp_t expq [$];
  int n_fwd = 0, n_csum = 0, n_ttl = 0, n_route = 0, n_full = 0;
  int e_csum = 0, e_ttl = 0, e_route = 0;
  time last_in_t = 0;
  int lat = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      n_fwd += fwd; n_csum += drop_csum; n_ttl += drop_ttl;
      n_route += drop_route; n_full += drop_full;
    end
  end

  // Output monitor.
  bytes_t got;
  always @(posedge clk) if (rst_n && out.valid) begin
    if (out.sop) begin
      got = {};
      if (lat < 0) lat = int'(($time - last_in_t) / 10);
    end
    got.push_back(out.data);
    if (out.eop) begin
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        exp_t e;
        e = expq.pop_front();
        if (got != e.p || int'(out_port) != e.port || out_prio != e.prio) begin
          failures++;
          if (failures < 5) $display("mismatch: len %0d/%0d port %0d/%0d", got.size(), e.p.size(), out_port, e.port);
        end
      end
    end
  end

  task automatic send(input bytes_t p);
    for (int k = 0; k < p.size(); k++) begin
      @(negedge clk);
      in.valid = 1; in.sop = (k == 0); in.eop = (k == p.size() - 1); in.data = p[k];
    end
    @(posedge clk);
    last_in_t = $time;
    @(negedge clk);
    in = '0;
  endtask

  task automatic route(input int idx, input logic [31:0] pfx, input int len, input int port);
    @(negedge clk);
    rt_wr_en = 1; rt_wr_idx = 4'(idx);
    rt_wr_entry = '{valid: 1'b1, prefix: pfx, len: 6'(len), out_port: 16'(port)};
    @(negedge clk);
    rt_wr_en = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    route(0, 32'h0A00_0000, 8, 1);
    route(1, 32'h0A01_0000, 16, 5);
    route(2, 32'h0A01_0200, 24, 9);
    // Latency on an idle port.
    begin
      bytes_t p = make_ip(40, 32'h0A01_0203, 8'd64, 8'h00, 999);
      exp_t e;
      e.p = forwarded(p); e.port = 9; e.prio = 0;
      expq.push_back(e);
      send(p);
      repeat (60) @(negedge clk);
      checks++;
      if (lat != 4) begin failures++; $display("latency %0d", lat); end
    end
    for (int n = 0; n < 300; n++) begin
      int kind, len, port;
      logic [31:0] dst;
      logic [7:0] tos, ttl;
      bytes_t p;
      exp_t e;
      kind = $urandom_range(9);
      len = $urandom_range(20, 300);
      tos = ($urandom_range(1)) ? 8'hA0 : 8'h00;
      ttl = 8'($urandom_range(2, 255));
      case ($urandom_range(3))
        0: begin dst = {24'h0A0102, 8'($urandom)}; port = 9; end
        1: begin dst = {16'h0A01, 16'($urandom)} & 32'hFFFF_F0FF; port = 5; end
        2: begin dst = {8'h0A, 8'h80 | 8'($urandom), 16'($urandom)}; port = 1; end
        default: begin dst = {8'h0B, 24'($urandom)}; port = -1; end
      endcase
      if (kind == 0) ttl = 8'($urandom_range(0, 1));
      p = make_ip(len, dst, ttl, tos, n);
      if (kind == 1) p[$urandom_range(0, 19)] ^= 8'h10;     // corrupt header
      if (kind == 2) begin p[0] = 8'h46; end                  // options: unsupported
      if (kind == 3) p = p[0:$urandom_range(0, 18)];          // runt
      if (kind >= 1 && kind <= 3) e_csum++;
      else if (kind == 0) e_ttl++;
      else if (port < 0) e_route++;
      else begin e.p = forwarded(p); e.port = port; e.prio = tos[7]; expq.push_back(e); end
      send(p);
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    checks += 5;
    if (expq.size() != 0) failures++;
    if (n_csum != e_csum) failures++;
    if (n_ttl != e_ttl) failures++;
    if (n_route != e_route) failures++;
    if (n_full != 0) failures++;
    $display("fwd %0d csum %0d/%0d ttl %0d/%0d route %0d/%0d", n_fwd, n_csum, e_csum, n_ttl, e_ttl, n_route, e_route);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
