// ppe: programmable priority encoder, the round-robin arbiter that iSLIP is
// built from (one per output for the grant step, one per input for the accept
// step).
//
// Of the N request bits it picks the first one set at or after position ptr,
// wrapping round modulo N. Purely combinational: gnt_valid says whether any
// request was set and gnt_idx is the winner; gnt_onehot is the same as a
// one-hot vector.
module ppe #(
  parameter int N  = 64,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] ptr,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx,
  output logic [N-1:0]  gnt_onehot
);
  // Requests at or above the pointer win over those below it; among each
  // group the lowest index wins.
  logic [N-1:0] upper;

  always_comb begin
    for (int k = 0; k < N; k++) upper[k] = req[k] && (k >= int'(ptr));
    gnt_valid  = |req;
    gnt_idx    = '0;
    gnt_onehot = '0;
    if (|upper) begin
      for (int k = N - 1; k >= 0; k--) if (upper[k]) gnt_idx = IW'(k);
    end else begin
      for (int k = N - 1; k >= 0; k--) if (req[k]) gnt_idx = IW'(k);
    end
    if (gnt_valid) gnt_onehot[gnt_idx] = 1'b1;
  end
endmodule
