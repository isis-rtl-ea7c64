// framer_tb: packets of random length (including exact multiples of the 58
// byte payload) are cut into cells; every cell's header (ports, cell ID,
// first/last flags, priority) and payload are compared with cells built
// independently from the packet, and the cell count with ceil(len / 58).
module framer_tb;
  import isis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [PORT_W-1:0] port_id = 16'd37, in_dst = 0;
  byte_stream_t in = '0;
  logic in_prio = 0, cell_valid;
  cell_t cell_out;
  int checks = 0, failures = 0;
  cell_t expq [$];

  framer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cell_valid) begin
    cell_t e;
    checks++;
    if (expq.size() == 0) failures++;
    else begin
      e = expq.pop_front();
      if (cell_out !== e) begin
        failures++;
        if (failures < 5) $display("cell mismatch id %0d/%0d flags %h/%h", cell_out.hdr.cell_id, e.hdr.cell_id, cell_out.hdr.flags, e.hdr.flags);
      end
    end
  end

  initial begin
    int ncells_total = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int len, nc;
      logic [7:0] p [$];
      logic [15:0] dst;
      logic pr;
      len = (n % 5 == 0) ? PAYLOAD_BYTES * $urandom_range(1, 4) : $urandom_range(1, 400);
      dst = 16'($urandom);
      pr = 1'($urandom);
      p = {};
      for (int k = 0; k < len; k++) p.push_back(8'($urandom));
      nc = (len + PAYLOAD_BYTES - 1) / PAYLOAD_BYTES;
      ncells_total += nc;
      for (int c = 0; c < nc; c++) begin
        cell_t e;
        e = '0;
        e.hdr.in_port = 16'd37; e.hdr.out_port = dst; e.hdr.cell_id = 8'(c);
        e.hdr.flags.first = (c == 0); e.hdr.flags.last = (c == nc - 1); e.hdr.flags.prio = pr;
        for (int b = 0; b < PAYLOAD_BYTES && c * PAYLOAD_BYTES + b < len; b++)
          e.payload[8*b +: 8] = p[c * PAYLOAD_BYTES + b];
        expq.push_back(e);
      end
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in.valid = 1; in.sop = (k == 0); in.eop = (k == len - 1); in.data = p[k];
        in_dst = dst; in_prio = pr;
        // Idle clocks inside a packet are allowed.
        if ($urandom_range(7) == 0) begin @(negedge clk); in = '0; end
      end
      @(negedge clk);
      in = '0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("cells %0d", ncells_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
