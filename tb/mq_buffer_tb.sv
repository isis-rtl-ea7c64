// mq_buffer_tb: random enqueues and dequeues on a small buffer against one
// reference queue per queue number; checks head data, refusal when full,
// nonempty flags and counts.
module mq_buffer_tb;
  localparam int NQ = 4, DEPTH = 16, W = 16;
  logic clk = 0, rst_n = 0;
  logic enq_valid = 0, deq_valid = 0, enq_ok;
  logic [1:0] enq_q = 0, deq_q = 0;
  logic [W-1:0] enq_data = 0, deq_data;
  logic [NQ-1:0] nonempty;
  logic [4:0] count [NQ];
  logic [4:0] free_slots;
  int checks = 0, failures = 0;
  logic [W-1:0] model [NQ][$];

  mq_buffer #(.NQ(NQ), .DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, refused;
    refused = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      total = 0;
      for (int q = 0; q < NQ; q++) begin
        total += model[q].size();
        checks += 2;
        if (nonempty[q] !== (model[q].size() != 0)) failures++;
        if (int'(count[q]) != model[q].size()) failures++;
      end
      checks++;
      if (int'(free_slots) != DEPTH - total) failures++;
      // Phases of mostly filling and mostly draining.
      enq_valid = ($urandom_range(99) < ((t / 500) % 2 ? 30 : 80));
      enq_q = 2'($urandom);
      enq_data = W'($urandom);
      deq_q = 2'($urandom);
      deq_valid = ($urandom_range(99) < 50) && model[deq_q].size() != 0;
      #1;
      if (deq_valid) begin
        checks++;
        if (deq_data !== model[deq_q][0]) begin
          failures++;
          if (failures < 10) $display("t=%0d q%0d got %h exp %h", t, deq_q, deq_data, model[deq_q][0]);
        end
        void'(model[deq_q].pop_front());
      end
      if (enq_valid) begin
        checks++;
        if (enq_ok !== (total < DEPTH)) failures++;
        if (total < DEPTH) model[enq_q].push_back(enq_data);
        else refused++;
      end
    end
    $display("refused enqueues: %0d", refused);
    checks++;
    if (refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
