// voq_bank: the N virtual output queues (VOQs) of one switch input.
//
// VOQ j holds, in arrival order, the cells at this input that are destined
// for output j, so a cell never waits behind a cell for another output
// (no head-of-line blocking). Each VOQ is a cell_fifo. Because cells from one
// input to one output arrive in the order in which they will depart, the head
// of each VOQ is always its most urgent cell, and the scheduler only needs the
// heads: `hol_valid[j]` and `hol_cell[j]` show the head of VOQ j.
//
// At most one cell is written per cycle (one arrival per time slot) and at
// most one cell is read per cycle (one departure per matching phase), chosen
// by `pop_dest`. Both take effect at the clock edge. The queues are FIFO as
// the design requires; their depth (the algorithm assumes unbounded
// queues) is this design's choice, and `voq_full` lets the arrival logic
// refuse a cell that has no room.
module voq_bank #(
  parameter int unsigned N     = cioq_pkg::N_PORTS_DEF,
  parameter int unsigned W     = cioq_pkg::CELL_W_DEF + cioq_pkg::stamp_width(cioq_pkg::QMAX_DEF),
  parameter int unsigned DEPTH = cioq_pkg::QMAX_DEF,
  localparam int unsigned IW   = cioq_pkg::idx_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [IW-1:0] push_dest,
  input  logic [W-1:0]  push_cell,
  input  logic          pop,
  input  logic [IW-1:0] pop_dest,
  output logic [N-1:0]  hol_valid,
  output logic [W-1:0]  hol_cell [N],
  output logic [N-1:0]  voq_full
);
  logic [N-1:0] empty;

  for (genvar j = 0; j < N; j++) begin : g_voq
    cell_fifo #(.W(W), .DEPTH(DEPTH)) u_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .push      (push && (push_dest == IW'(j))),
      .push_data (push_cell),
      .pop       (pop && (pop_dest == IW'(j))),
      .head      (hol_cell[j]),
      .empty     (empty[j]),
      .full      (voq_full[j])
    );
  end

  assign hol_valid = ~empty;

endmodule
