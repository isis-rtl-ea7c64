// islip_sched_tb: compares the scheduler with a behavioural iSLIP model on
// random request matrices, checks that the matching is a valid one-to-one
// matching of requested pairs, and checks the iSLIP property that under full
// load the pointers desynchronise so that every slot matches all N ports.
module islip_sched_tb;
  localparam int N = 8, ITER = 4;
  logic clk = 0, rst_n = 0, slot = 0;
  logic [N-1:0] req [N];
  logic [N-1:0] in_matched, out_matched;
  logic [2:0]   in_match [N], out_match [N];
  int checks = 0, failures = 0;

  islip_sched #(.N(N), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gp [N], ap [N];   // model pointers
  int m_in [N];         // model: output matched to input i, -1 if none

  function automatic int rr(input logic [N-1:0] v, input int p);
    for (int k = 0; k < N; k++) if (v[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  task automatic model(input bit upd);
    bit in_free [N], out_free [N];
    int g [N];
    for (int k = 0; k < N; k++) begin in_free[k] = 1; out_free[k] = 1; m_in[k] = -1; end
    for (int it = 0; it < ITER; it++) begin
      for (int j = 0; j < N; j++) begin
        logic [N-1:0] r = '0;
        for (int i = 0; i < N; i++) r[i] = req[i][j] && in_free[i] && out_free[j];
        g[j] = rr(r, gp[j]);
      end
      for (int i = 0; i < N; i++) begin
        logic [N-1:0] a = '0;
        int o;
        for (int j = 0; j < N; j++) a[j] = (g[j] == i);
        o = rr(a, ap[i]);
        if (o >= 0) begin
          m_in[i] = o;
          if (it == 0 && upd) begin
            ap[i] = (o + 1) % N;
            gp[o] = (i + 1) % N;
          end
        end
      end
      for (int i = 0; i < N; i++) if (m_in[i] >= 0) begin in_free[i] = 0; out_free[m_in[i]] = 0; end
    end
  endtask

  initial begin
    int full_slots;
    for (int k = 0; k < N; k++) begin req[k] = '0; gp[k] = 0; ap[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Random traffic.
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) req[k] = N'($urandom) & N'($urandom);
      slot = ($urandom_range(3) != 0);
      #1;
      model(slot);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (in_matched[i] !== (m_in[i] >= 0) ||
            (m_in[i] >= 0 && in_match[i] !== 3'(m_in[i]))) begin
          failures++;
          if (failures < 10) $display("t=%0d input %0d: got %b/%0d exp %0d", t, i, in_matched[i], in_match[i], m_in[i]);
        end
        if (in_matched[i]) begin
          checks += 2;
          if (!req[i][in_match[i]]) failures++;
          if (!out_matched[in_match[i]] || out_match[in_match[i]] !== 3'(i)) failures++;
        end
      end
    end
    // Full load: after at most N slots every slot is a perfect matching.
    for (int k = 0; k < N; k++) req[k] = '1;
    slot = 1;
    full_slots = 0;
    for (int t = 0; t < 3 * N; t++) begin
      @(negedge clk);
      if (t >= N) begin
        checks++;
        if (in_matched !== '1) failures++;
        else full_slots++;
      end
    end
    $display("full-load perfect matchings: %0d of %0d slots", full_slots, 2 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
