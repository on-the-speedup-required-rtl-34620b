// mucfa_scheduler: Most Urgent Cell First (MUCFA) matching of inputs to
// outputs for one phase of a time slot.
//
// Each input i offers, for every output j, the head cell of VOQ_ij with its
// urgency u[i][j] (`req[i][j]` high when VOQ_ij is not empty). MUCFA works in
// rounds: every still unmatched output asks for its most urgent cell among
// the unmatched inputs; an input asked by several outputs gives itself to the
// one whose cell has the smallest urgency, a tie going to the smallest output
// number; outputs that lose ask for their next most urgent cell in the next
// round. Rounds repeat until nothing more can be matched.
//
// How a round decides is this design's own realisation. Both sides rank the
// edges (i,j) by the same key (urgency, then output number, then input
// number), so the matching that satisfies both sides - the stable matching
// that the Gale-Shapley algorithm would find with these preference lists - is
// the one obtained by repeatedly taking the most urgent remaining edge. In a
// round, this block computes for every unmatched output its best unmatched
// input and for every unmatched input its best unmatched output; an edge that
// is the best of both its ends is matched. The globally most urgent edge is
// always such an edge, so every round that can match something does, and
// ITERS = N rounds always suffice. Edges matched in one round never need to be
// undone, which keeps the hardware to one round per clock cycle.
//
// Timing: a one-cycle `start` pulse clears the matching; the next ITERS cycles
// are one round each, with `done` high during the last. The result
// (`in_match`/`in_port` per input and `out_match`/`out_port` per output) is
// held until the next `start`. `req` and `urg` must stay stable while the
// rounds run. Urgencies are signed: a negative value is a cell already late.
module mucfa_scheduler #(
  parameter int unsigned N     = cioq_pkg::N_PORTS_DEF,
  parameter int unsigned UW    = cioq_pkg::stamp_width(cioq_pkg::QMAX_DEF),
  parameter int unsigned ITERS = N,
  localparam int unsigned IW   = cioq_pkg::idx_width(N),
  localparam int unsigned KW   = $clog2(ITERS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [N-1:0]         req [N],        // req[i][j]: VOQ_ij has a cell
  input  logic signed [UW-1:0] urg [N][N],     // urgency of the head of VOQ_ij
  output logic                 busy,
  output logic                 done,
  output logic [N-1:0]         in_match,
  output logic [IW-1:0]        in_port  [N],   // output matched to input i
  output logic [N-1:0]         out_match,
  output logic [IW-1:0]        out_port [N]    // input matched to output j
);
  logic [N-1:0]  in_m_q, out_m_q;
  logic [IW-1:0] in_p_q [N];
  logic [IW-1:0] out_p_q [N];
  logic [KW-1:0] left_q;

  // Per-round choices of both sides.
  logic [N-1:0]  out_has, in_has;
  logic [IW-1:0] out_best [N];   // input chosen (requested) by output j
  logic [IW-1:0] in_best  [N];   // output input i would grant
  logic [N-1:0]  new_m    [N];   // new_m[i][j]: edge (i,j) matched this round

  always_comb begin
    logic signed [UW-1:0] bu;
    // Outputs: most urgent cell among unmatched inputs; ties to smaller input.
    for (int j = 0; j < N; j++) begin
      out_has[j]  = 1'b0;
      out_best[j] = '0;
      bu          = '0;
      for (int i = 0; i < N; i++) begin
        if (!out_m_q[j] && !in_m_q[i] && req[i][j] && (!out_has[j] || urg[i][j] < bu)) begin
          out_has[j]  = 1'b1;
          out_best[j] = IW'(i);
          bu          = urg[i][j];
        end
      end
    end
    // Inputs: smallest urgency among unmatched outputs; ties to smaller output.
    for (int i = 0; i < N; i++) begin
      in_has[i]  = 1'b0;
      in_best[i] = '0;
      bu         = '0;
      for (int j = 0; j < N; j++) begin
        if (!in_m_q[i] && !out_m_q[j] && req[i][j] && (!in_has[i] || urg[i][j] < bu)) begin
          in_has[i]  = 1'b1;
          in_best[i] = IW'(j);
          bu         = urg[i][j];
        end
      end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        new_m[i][j] = in_has[i] && (in_best[i] == IW'(j)) &&
                      out_has[j] && (out_best[j] == IW'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_m_q  <= '0;
      out_m_q <= '0;
      left_q  <= '0;
      for (int k = 0; k < N; k++) begin
        in_p_q[k]  <= '0;
        out_p_q[k] <= '0;
      end
    end else if (start) begin
      in_m_q  <= '0;
      out_m_q <= '0;
      left_q  <= KW'(ITERS);
    end else if (left_q != '0) begin
      left_q <= left_q - 1'b1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (new_m[i][j]) begin
            in_m_q[i]  <= 1'b1;
            out_m_q[j] <= 1'b1;
            in_p_q[i]  <= IW'(j);
            out_p_q[j] <= IW'(i);
          end
    end
  end

  assign busy      = (left_q != '0);
  assign done      = (left_q == KW'(1));
  assign in_match  = in_m_q;
  assign in_port   = in_p_q;
  assign out_match = out_m_q;
  assign out_port  = out_p_q;

endmodule
