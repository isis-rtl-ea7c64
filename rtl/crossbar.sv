// crossbar: N x N cell crossbar of the switch fabric.
//
// In each fabric slot (slot high for one clock) every output j whose
// sel_valid[j] is set copies the cell offered by input sel[j]. The scheduler
// guarantees that each input is selected by at most one output. Outputs are
// registered: a cell chosen in the slot clock appears on out_cell with
// out_valid one clock later, for one clock.
module crossbar
  import isis_pkg::*;
#(
  parameter int N  = 64,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            slot,
  input  cell_t           in_cell  [N],
  input  logic [N-1:0]    sel_valid,
  input  logic [IW-1:0]   sel      [N],
  output cell_t           out_cell [N],
  output logic [N-1:0]    out_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      for (int j = 0; j < N; j++) out_cell[j] <= '0;
    end else begin
      for (int j = 0; j < N; j++) begin
        out_valid[j] <= slot && sel_valid[j];
        if (slot && sel_valid[j]) out_cell[j] <= in_cell[sel[j]];
      end
    end
  end
endmodule
