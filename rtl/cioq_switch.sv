// cioq_switch: an N x N combined input and output queued (CIOQ) switch that
// sends every cell out at exactly the slot a FIFO output-queued (OQ) switch
// would, using a fabric that runs only S times faster than the lines.
//
// Structure. Each input has N virtual output queues (voq_bank). A reference
// bookkeeping block (ref_oq_stamper) follows the OQ switch being mimicked
// and stamps every arriving cell with the slot in which that switch would
// send it; the distance to that slot is the cell's urgency. Every time slot
// has S phases. In each phase the MUCFA scheduler (mucfa_scheduler) matches
// inputs to outputs by urgency, and the crossbar moves one cell from each
// matched input to its output, where output_buffer keeps cells sorted by
// urgency. At the end of the slot each output sends its head cell if that
// cell is due. With S >= 4 the due cell is always there, whatever the
// traffic; `out_miss` and `out_late` report any slot where the switch did not
// match the reference, which can happen with a smaller speedup.
//
// Slot timing (this design's own sequencing, in clock cycles):
//   1 cycle    ARRIVE  `slot_start` high: one cell per input is sampled from
//                      `in_valid`/`in_dest`/`in_payload`, stamped and
//                      queued; `in_accept` says which were taken
//   S times:   MATCH   ITERS cycles of MUCFA rounds (ITERS = N suffices)
//              XFER    1 cycle, matched cells cross the fabric
//   1 cycle    DEPART  `slot_end` high: `out_valid`/`out_payload` carry the
//                      departing cells
// so a slot takes 2 + S*(ITERS+1) cycles; `now` counts slots modulo 2**TW.
// Cells are refused (in_accept low) only when the reference output queue of
// their output already holds QMAX cells; the OQ switch refuses them too, so
// the two stay comparable. Queue capacities, the cell width and the cycle
// sequencing are this design's choices; the algorithm assumes unbounded
// queues and leaves the clocking open.
module cioq_switch #(
  parameter int unsigned N      = cioq_pkg::N_PORTS_DEF,
  parameter int unsigned S      = cioq_pkg::SPEEDUP_DEF,
  parameter int unsigned CELL_W = cioq_pkg::CELL_W_DEF,
  parameter int unsigned QMAX   = cioq_pkg::QMAX_DEF,
  parameter int unsigned ITERS  = N,
  localparam int unsigned IW    = cioq_pkg::idx_width(N),
  localparam int unsigned TW    = cioq_pkg::stamp_width(QMAX),
  localparam int unsigned W     = CELL_W + TW,
  localparam int unsigned PHW   = (S > 1) ? $clog2(S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // Line inputs, sampled while slot_start is high.
  output logic              slot_start,
  input  logic [N-1:0]      in_valid,
  input  logic [IW-1:0]     in_dest    [N],
  input  logic [CELL_W-1:0] in_payload [N],
  output logic [N-1:0]      in_accept,
  // Line outputs, valid in the last cycle of a slot (slot_end high).
  output logic [N-1:0]      out_valid,
  output logic [CELL_W-1:0] out_payload [N],
  output logic [N-1:0]      out_late,
  output logic [N-1:0]      out_miss,
  output logic              overflow,
  // Status.
  output logic              slot_end,
  output logic [TW-1:0]     now,
  output logic [PHW-1:0]    phase,
  output logic              xfer
);
  import cioq_pkg::*;

  slot_state_e    st_q;
  logic [PHW-1:0] phase_q;

  wire arrive = (st_q == ST_ARRIVE);
  wire do_xfer = (st_q == ST_XFER);
  wire depart = (st_q == ST_DEPART);

  // Reference OQ bookkeeping and urgency stamps.
  logic [N-1:0]  in_room;
  logic [TW-1:0] dep_time [N];
  logic [N-1:0]  oq_busy;

  ref_oq_stamper #(.N(N), .QMAX(QMAX)) u_ref (
    .clk      (clk),
    .rst_n    (rst_n),
    .arrive   (arrive),
    .in_valid (in_valid),
    .in_dest  (in_dest),
    .in_room  (in_room),
    .accept   (in_accept),
    .dep_time (dep_time),
    .depart   (depart),
    .now      (now),
    .oq_count (),
    .oq_busy  (oq_busy)
  );

  // Virtual output queues.
  logic [N-1:0]  hol_valid [N];
  logic [W-1:0]  hol_cell  [N][N];
  logic [N-1:0]  voq_full  [N];
  logic [N-1:0]  in_match, out_match;
  logic [IW-1:0] in_port  [N];
  logic [IW-1:0] out_port [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign in_room[i] = !voq_full[i][in_dest[i]];
    voq_bank #(.N(N), .W(W), .DEPTH(QMAX)) u_voq (
      .clk       (clk),
      .rst_n     (rst_n),
      .push      (in_accept[i]),
      .push_dest (in_dest[i]),
      .push_cell ({in_payload[i], dep_time[i]}),
      .pop       (do_xfer && in_match[i]),
      .pop_dest  (in_port[i]),
      .hol_valid (hol_valid[i]),
      .hol_cell  (hol_cell[i]),
      .voq_full  (voq_full[i])
    );
  end

  // Urgency of every VOQ head, relative to the current slot.
  logic signed [TW-1:0] urg [N][N];
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        urg[i][j] = $signed(hol_cell[i][j][TW-1:0] - now);
  end

  // MUCFA scheduler: restarted at the start of every phase.
  logic sched_start, sched_done;
  assign sched_start = arrive || (do_xfer && (phase_q != PHW'(S - 1)));

  mucfa_scheduler #(.N(N), .UW(TW), .ITERS(ITERS)) u_sched (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (sched_start),
    .req       (hol_valid),
    .urg       (urg),
    .busy      (),
    .done      (sched_done),
    .in_match  (in_match),
    .in_port   (in_port),
    .out_match (out_match),
    .out_port  (out_port)
  );

  // Fabric: each matched input offers the head of the VOQ it was matched on.
  logic [N-1:0] x_in_valid, x_out_valid;
  logic [W-1:0] x_in_cell  [N];
  logic [W-1:0] x_out_cell [N];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      x_in_valid[i] = do_xfer && in_match[i];
      x_in_cell[i]  = hol_cell[i][in_port[i]];
    end
  end

  crossbar #(.N(N), .W(W)) u_xbar (
    .in_valid  (x_in_valid),
    .in_cell   (x_in_cell),
    .cfg_valid (out_match & {N{do_xfer}}),
    .cfg_in    (out_port),
    .out_valid (x_out_valid),
    .out_cell  (x_out_cell)
  );

  // Output buffers and the output lines.
  logic [N-1:0] ob_overflow;
  for (genvar j = 0; j < N; j++) begin : g_out
    output_buffer #(.CELL_W(CELL_W), .TW(TW), .DEPTH(QMAX)) u_ob (
      .clk          (clk),
      .rst_n        (rst_n),
      .ins_valid    (x_out_valid[j]),
      .ins_payload  (x_out_cell[j][W-1:TW]),
      .ins_dep      (x_out_cell[j][TW-1:0]),
      .depart       (depart),
      .now          (now),
      .line_valid   (out_valid[j]),
      .line_payload (out_payload[j]),
      .line_late    (out_late[j]),
      .head_valid   (),
      .head_dep     (),
      .count        (),
      .overflow     (ob_overflow[j])
    );
    // The reference switch sends a cell now but this output has no cell due
    // exactly now: the CIOQ switch has failed to mimic it.
    assign out_miss[j] = depart && oq_busy[j] && !(out_valid[j] && !out_late[j]);
  end
  assign overflow = |ob_overflow;

  // Slot sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= ST_ARRIVE;
      phase_q <= '0;
    end else begin
      unique case (st_q)
        ST_ARRIVE: begin
          phase_q <= '0;
          st_q    <= ST_MATCH;
        end
        ST_MATCH:  if (sched_done) st_q <= ST_XFER;
        ST_XFER: begin
          if (phase_q == PHW'(S - 1)) begin
            st_q <= ST_DEPART;
          end else begin
            phase_q <= phase_q + 1'b1;
            st_q    <= ST_MATCH;
          end
        end
        ST_DEPART: st_q <= ST_ARRIVE;
        default:   st_q <= ST_ARRIVE;
      endcase
    end
  end

  assign slot_start = arrive;
  assign slot_end   = depart;
  assign phase      = phase_q;
  assign xfer       = do_xfer;

  // A matched pair always has a cell to move.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_match_has_cell: assert property (@(posedge clk) disable iff (!rst_n)
      (do_xfer && in_match[i]) |-> hol_valid[i][in_port[i]]);
    // The fabric never connects one input to two outputs.
    for (genvar k = i + 1; k < N; k++) begin : g_pair
      a_one_to_one: assert property (@(posedge clk) disable iff (!rst_n)
        !(out_match[i] && out_match[k] && out_port[i] == out_port[k]));
    end
  end

endmodule
