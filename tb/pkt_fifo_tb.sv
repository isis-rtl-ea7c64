// pkt_fifo_tb: writes packets of random length, some marked bad and some too
// large for the free space, while a reader drains at random; the bytes read
// must be exactly the good packets that fitted, in order.
module pkt_fifo_tb;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_last = 0, wr_bad = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic dropped, committed, rd_avail, rd_last;
  logic [15:0] pkts;
  int checks = 0, failures = 0;
  logic [8:0] expq [$];     // {last, data} of committed packets
  int n_bad = 0, n_ovf = 0, n_ok = 0, n_drop_seen = 0;

  pkt_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reader.
  always @(negedge clk) if (rst_n) begin
    if (rd_en) ;
    rd_en = rd_avail && ($urandom_range(3) == 0);
    #1;
    if (rd_en) begin
      checks++;
      if (expq.size() == 0 || {rd_last, rd_data} !== expq[0]) begin
        failures++;
        if (failures < 10) $display("read %h exp %h", {rd_last, rd_data}, expq.size() ? expq[0] : 9'h0);
      end
      if (expq.size()) void'(expq.pop_front());
    end
  end
  always @(posedge clk) if (rst_n && dropped) n_drop_seen++;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      int len, free_before;
      logic [8:0] pk [$];
      bit bad;
      len = $urandom_range(1, 40);
      bad = ($urandom_range(9) == 0);
      pk = {};
      for (int k = 0; k < len; k++) pk.push_back({k == len - 1, 8'($urandom)});
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        if (k == 0) free_before = DEPTH - (int'(dut.wptr) - int'(dut.rptr) + (int'(dut.wptr) < int'(dut.rptr) ? 2*DEPTH : 0));
        wr_valid = 1; wr_data = pk[k][7:0]; wr_last = pk[k][8]; wr_bad = bad && wr_last;
      end
      // The reader frees space during the packet, so only a packet that fits
      // in the space free at its start is sure to be kept.
      @(posedge clk); #1;
      if (committed) begin
        n_ok++;
        checks++;
        if (bad) failures++;
        foreach (pk[k]) expq.push_back(pk[k]);
      end else begin
        checks++;
        if (!bad && len <= free_before) begin failures++; $display("lost packet len %0d free %0d", len, free_before); end
        if (bad) n_bad++; else n_ovf++;
      end
      @(negedge clk);
      wr_valid = 0; wr_last = 0; wr_bad = 0;
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    checks += 3;
    if (expq.size() != 0) failures++;
    if (n_drop_seen != n_bad + n_ovf) begin failures++; $display("drops seen %0d", n_drop_seen); end
    if (n_ovf == 0 || n_bad == 0) failures++;
    $display("kept %0d, bad %0d, overflow %0d", n_ok, n_bad, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
