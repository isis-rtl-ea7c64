// mq_buffer: shared cell buffer holding NQ FIFO queues in one memory.
//
// On the input side each port keeps one queue per output port (the virtual
// output queues Q(i,j)); on the output side the reframer keeps one queue per
// source port. All queues share DEPTH slots. Each queue is a linked list
// through next[]; free slots sit in a free-list FIFO that reset fills with
// 0..DEPTH-1. This shared organisation is this implementation's choice; the
// design only asks for a cell buffer with one queue per output.
//
// Interface: enq_valid writes enq_data to the tail of queue enq_q. When no
// slot is free the cell is refused (enq_ok low) and the caller decides what
// to do with it. deq_valid removes the head of queue deq_q; the head cell of
// that queue is readable combinationally on deq_data in the same clock.
// Enqueue and dequeue may happen in the same clock, also on the same queue.
// Dequeuing an empty queue is a caller error (asserted). nonempty[q] and
// count[q] are registered.
module mq_buffer #(
  parameter int NQ    = 64,
  parameter int DEPTH = 256,
  parameter int W     = 512,
  parameter int QW    = (NQ > 1) ? $clog2(NQ) : 1,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enq_valid,
  input  logic [QW-1:0] enq_q,
  input  logic [W-1:0]  enq_data,
  output logic          enq_ok,
  input  logic          deq_valid,
  input  logic [QW-1:0] deq_q,
  output logic [W-1:0]  deq_data,
  output logic [NQ-1:0] nonempty,
  output logic [AW:0]   count [NQ],
  output logic [AW:0]   free_slots
);
  logic [W-1:0]  mem  [DEPTH];
  logic [AW-1:0] next [DEPTH];
  logic [AW-1:0] head [NQ];
  logic [AW-1:0] tail [NQ];
  logic [AW-1:0] free_fifo [DEPTH];
  logic [AW-1:0] free_rd, free_wr;
  logic [AW:0]   free_cnt;

  logic [AW-1:0] new_slot;
  logic          do_enq;

  assign new_slot   = free_fifo[free_rd];
  assign enq_ok     = enq_valid && (free_cnt != 0);
  assign do_enq     = enq_ok;
  assign deq_data   = mem[head[deq_q]];
  assign free_slots = free_cnt;

  always_comb
    for (int q = 0; q < NQ; q++) nonempty[q] = (count[q] != 0);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] v);
    return (int'(v) == DEPTH - 1) ? '0 : v + 1'b1;
  endfunction

  // Queue length of enq_q once this clock's dequeue is taken into account.
  logic [AW:0] enq_len_after_deq;
  assign enq_len_after_deq = count[enq_q] - ((deq_valid && deq_q == enq_q) ? (AW+1)'(1) : (AW+1)'(0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) free_fifo[k] <= AW'(k);
      for (int q = 0; q < NQ; q++) begin
        head[q]  <= '0;
        tail[q]  <= '0;
        count[q] <= '0;
      end
      free_rd  <= '0;
      free_wr  <= '0;
      free_cnt <= (AW+1)'(DEPTH);
    end else begin
      if (deq_valid) begin
        head[deq_q]        <= next[head[deq_q]];
        free_fifo[free_wr] <= head[deq_q];
        free_wr            <= inc(free_wr);
      end
      if (do_enq) begin
        mem[new_slot] <= enq_data;
        free_rd       <= inc(free_rd);
        tail[enq_q]   <= new_slot;
        if (enq_len_after_deq == 0) head[enq_q] <= new_slot;
        else                        next[tail[enq_q]] <= new_slot;
      end
      for (int q = 0; q < NQ; q++)
        count[q] <= count[q] + ((do_enq && enq_q == QW'(q)) ? (AW+1)'(1) : (AW+1)'(0))
                             - ((deq_valid && deq_q == QW'(q)) ? (AW+1)'(1) : (AW+1)'(0));
      free_cnt <= free_cnt + (deq_valid ? (AW+1)'(1) : (AW+1)'(0)) - (do_enq ? (AW+1)'(1) : (AW+1)'(0));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) deq_valid |-> nonempty[deq_q])
    else $error("mq_buffer: dequeue from empty queue %0d", deq_q);
endmodule
