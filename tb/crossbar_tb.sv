// crossbar_tb: random partial permutations; every selected output must show
// its input's cell one clock after the slot, unselected outputs stay invalid.
module crossbar_tb;
  import isis_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, slot = 0;
  cell_t in_cell [N];
  cell_t out_cell [N];
  logic [N-1:0] sel_valid, out_valid;
  logic [2:0] sel [N];
  int checks = 0, failures = 0;

  crossbar #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    cell_t exp_cell [N];
    logic [N-1:0] exp_v;
    for (int k = 0; k < N; k++) begin in_cell[k] = '0; sel[k] = '0; end
    sel_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      for (int k = 0; k < N; k++) begin
        in_cell[k] = {16{32'($urandom)}};
        sel[k] = 3'(perm[k]);
      end
      sel_valid = N'($urandom);
      slot = (t % 3 != 2);
      for (int j = 0; j < N; j++) exp_cell[j] = in_cell[perm[j]];
      exp_v = slot ? sel_valid : '0;
      @(negedge clk);
      slot = 0;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (out_valid[j] !== exp_v[j]) failures++;
        if (exp_v[j]) begin
          checks++;
          if (out_cell[j] !== exp_cell[j]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
