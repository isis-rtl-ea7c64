// islip_sched: centralized iSLIP scheduler for an N x N crossbar with
// virtual output queues.
//
// req[i][j] is set when input i holds a cell for output j. Each iteration
// has three steps that work on all ports in parallel: every unmatched input
// requests every output it holds cells for; every unmatched output grants
// the requesting input that comes first in round-robin order from its grant
// pointer; every input that received grants accepts the output that comes
// first from its accept pointer. Inputs and outputs matched in one iteration
// drop out of the next. Each arbiter is a programmable priority encoder
// (ppe), 2N per iteration. Pointers move one place beyond the accepted
// output / granted input, and only for matches made in the first iteration,
// so that an output keeps granting an input until it is accepted (no
// starvation). All of this follows the iSLIP algorithm as described for the
// design; the number of iterations, ITER, is this implementation's choice.
//
// Timing: the matching is combinational from req and the pointers, so it is
// valid in the same clock. Pointers are updated at the clock edge where
// slot is high (the fabric uses that matching). Reset (synchronous, active low) sets all pointers
// to 0.
//
// Lint: the grant encoders' gnt_valid/gnt_idx pins are left open (only the
// one-hot grant is needed), and the last iteration's in_next vector, the
// inputs still free after all iterations, has no reader.
module islip_sched #(
  parameter int N    = 64,
  parameter int ITER = 4,
  parameter int IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot,
  input  logic [N-1:0]  req [N],        // req[i][j]: input i -> output j
  output logic [N-1:0]  in_matched,     // input i is matched ...
  output logic [IW-1:0] in_match [N],   // ... to output in_match[i]
  output logic [N-1:0]  out_matched,    // output j is matched ...
  output logic [IW-1:0] out_match [N]   // ... to input out_match[j]
);
  logic [IW-1:0] gptr [N];   // grant pointers, one per output
  logic [IW-1:0] aptr [N];   // accept pointers, one per input

  // Per-iteration signals live in the generate scope so that each
  // iteration is a separate net (no false combinational loops).
  for (genvar it = 0; it < ITER; it++) begin : g_iter
    logic [N-1:0]  in_free, out_free;      // unmatched at the start
    logic [N-1:0]  in_next, out_next;      // unmatched at the end
    logic [N-1:0]  gnt_oh  [N];            // per output: granted input, one-hot
    logic [N-1:0]  acc_req [N];            // per input: granting outputs
    logic [N-1:0]  acc_oh  [N];
    logic [N-1:0]  acc_v;
    logic [IW-1:0] acc_idx [N];

    if (it == 0) begin : g_first
      assign in_free  = '1;
      assign out_free = '1;
    end else begin : g_rest
      assign in_free  = g_iter[it-1].in_next;
      assign out_free = g_iter[it-1].out_next;
    end

    for (genvar j = 0; j < N; j++) begin : g_out
      logic [N-1:0] gnt_req;
      // Step 1, request: unmatched inputs with a cell for unmatched output j.
      always_comb
        for (int i = 0; i < N; i++)
          gnt_req[i] = req[i][j] && in_free[i] && out_free[j];
      // Step 2, grant.
      ppe #(.N(N), .IW(IW)) u_grant (
        .req(gnt_req), .ptr(gptr[j]),
        .gnt_valid(), .gnt_idx(), .gnt_onehot(gnt_oh[j]));
    end
    for (genvar i = 0; i < N; i++) begin : g_in
      always_comb
        for (int j = 0; j < N; j++) acc_req[i][j] = gnt_oh[j][i];
      // Step 3, accept.
      ppe #(.N(N), .IW(IW)) u_accept (
        .req(acc_req[i]), .ptr(aptr[i]),
        .gnt_valid(acc_v[i]), .gnt_idx(acc_idx[i]), .gnt_onehot(acc_oh[i]));
    end
    // An input leaves the pool when it accepts; an output when it is accepted.
    always_comb begin
      out_next = out_free;
      for (int i = 0; i < N; i++) out_next = out_next & ~acc_oh[i];
    end
    assign in_next = in_free & ~acc_v;
  end

  // Collect the matching of all iterations (each port is matched at most
  // once, so the iterations never overlap).
  logic [N-1:0]  m_v   [ITER];
  logic [IW-1:0] m_idx [ITER][N];
  for (genvar it = 0; it < ITER; it++) begin : g_col
    assign m_v[it]   = g_iter[it].acc_v;
    assign m_idx[it] = g_iter[it].acc_idx;
  end

  always_comb begin
    in_matched  = '0;
    out_matched = '0;
    for (int k = 0; k < N; k++) begin
      in_match[k]  = '0;
      out_match[k] = '0;
    end
    for (int it = 0; it < ITER; it++)
      for (int i = 0; i < N; i++)
        if (m_v[it][i]) begin
          in_matched[i]             = 1'b1;
          in_match[i]               = m_idx[it][i];
          out_matched[m_idx[it][i]] = 1'b1;
          out_match[m_idx[it][i]]   = IW'(i);
        end
  end

  function automatic logic [IW-1:0] next_mod(input logic [IW-1:0] v);
    return (int'(v) == N - 1) ? '0 : v + 1'b1;
  endfunction

  // Pointer update from first-iteration matches only.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        gptr[k] <= '0;
        aptr[k] <= '0;
      end
    end else if (slot) begin
      for (int i = 0; i < N; i++)
        if (m_v[0][i]) begin
          aptr[i]              <= next_mod(m_idx[0][i]);
          gptr[m_idx[0][i]]  <= next_mod(IW'(i));
        end
    end
  end

  // Every matched input pairs with exactly one matched output.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $countones(in_matched) == $countones(out_matched))
    else $error("islip_sched: matching is not one-to-one");
endmodule
