// crossbar: the non-blocking N x N crosspoint switch fabric.
//
// In one matching phase the fabric carries at most one cell out of each
// input and at most one cell into each output. The configuration comes from
// the scheduler as, for every output j, a valid bit `cfg_valid[j]` and the
// input `cfg_in[j]` connected to it; a valid matching never connects one
// input to two outputs. Output j then sees the
// cell offered by input `cfg_in[j]`, qualified by that input's `in_valid`.
// The switch top checks the one-input-per-output rule with an assertion.
// The fabric is purely combinational: cells cross it in the cycle in which
// the matching is applied. A crosspoint fabric is the design's; modelling it
// as one multiplexer per output is this design's choice.
module crossbar #(
  parameter int unsigned N   = cioq_pkg::N_PORTS_DEF,
  parameter int unsigned W   = cioq_pkg::CELL_W_DEF + cioq_pkg::stamp_width(cioq_pkg::QMAX_DEF),
  localparam int unsigned IW = cioq_pkg::idx_width(N)
) (
  input  logic [N-1:0]  in_valid,
  input  logic [W-1:0]  in_cell  [N],
  input  logic [N-1:0]  cfg_valid,
  input  logic [IW-1:0] cfg_in   [N],
  output logic [N-1:0]  out_valid,
  output logic [W-1:0]  out_cell [N]
);
  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_valid[j] = cfg_valid[j] && in_valid[cfg_in[j]];
      out_cell[j]  = in_cell[cfg_in[j]];
    end
  end

endmodule
