// route_table_tb: programs random prefixes and checks longest-prefix-match
// lookups against a reference search, including misses and rewrites.
module route_table_tb;
  import isis_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [2:0] wr_idx = 0;
  route_entry_t wr_entry = '0;
  logic [31:0] dst_addr = 0;
  logic hit;
  logic [PORT_W-1:0] out_port;
  route_entry_t model [E];
  int checks = 0, failures = 0;

  route_table #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] m(input int len);
    return (len == 0) ? 0 : ~32'h0 << (32 - len);
  endfunction

  initial begin
    int hits = 0;
    for (int e = 0; e < E; e++) model[e] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      // Rewrite a few entries; prefixes nest under 10.x.x.x so that several
      // entries match one address.
      for (int w = 0; w < 3; w++) begin
        @(negedge clk);
        wr_en = 1;
        wr_idx = 3'($urandom);
        wr_entry.valid = ($urandom_range(5) != 0);
        wr_entry.len = 6'($urandom_range(0, 32));
        wr_entry.prefix = {8'd10, 24'($urandom)} & m(wr_entry.len);
        wr_entry.out_port = 16'($urandom);
        model[wr_idx] = wr_entry;
        @(negedge clk);
        wr_en = 0;
      end
      for (int l = 0; l < 50; l++) begin
        int best; bit h; logic [15:0] p;
        dst_addr = ($urandom_range(3) == 0) ? 32'($urandom) :
                   (model[$urandom_range(E-1)].prefix | (32'($urandom) & 32'hFF));
        #1;
        h = 0; best = -1; p = 0;
        for (int e = 0; e < E; e++)
          if (model[e].valid && ((dst_addr & m(model[e].len)) == model[e].prefix) &&
              int'(model[e].len) > best) begin
            h = 1; best = model[e].len; p = model[e].out_port;
          end
        checks++;
        if (hit !== h) failures++;
        if (h) begin
          hits++;
          checks++;
          // Equal-length duplicates may exist: accept any entry of best length.
          if (out_port !== p) begin
            bit ok;
            ok = 0;
            for (int e = 0; e < E; e++)
              if (model[e].valid && int'(model[e].len) == best &&
                  ((dst_addr & m(best)) == model[e].prefix) && model[e].out_port == out_port) ok = 1;
            if (!ok) failures++;
          end
        end
      end
    end
    $display("hits %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
