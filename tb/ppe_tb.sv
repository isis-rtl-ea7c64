// ppe_tb: random requests and pointers against a round-robin reference.
module ppe_tb;
  localparam int N = 16;
  logic [N-1:0] req, oh;
  logic [3:0]   ptr, idx;
  logic         v;
  int checks = 0, failures = 0;

  ppe #(.N(N)) dut (.req, .ptr, .gnt_valid(v), .gnt_idx(idx), .gnt_onehot(oh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int exp_idx;
      req = (t % 5 == 0) ? N'(1 << $urandom_range(N-1)) : N'($urandom);
      if (t % 7 == 0) req = '0;
      ptr = 4'($urandom);
      #1;
      exp_idx = -1;
      for (int k = 0; k < N; k++)
        if (exp_idx < 0 && req[(int'(ptr) + k) % N]) exp_idx = (int'(ptr) + k) % N;
      checks++;
      if (v !== (exp_idx >= 0)) failures++;
      if (exp_idx >= 0) begin
        checks += 2;
        if (idx !== 4'(exp_idx)) begin
          failures++;
          if (failures < 10) $display("ppe: req=%h ptr=%0d got %0d exp %0d", req, ptr, idx, exp_idx);
        end
        if (oh !== N'(1 << exp_idx)) failures++;
      end else begin
        checks++;
        if (oh !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
