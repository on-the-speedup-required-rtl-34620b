// output_buffer: the buffer of one CIOQ switch output, kept sorted by
// urgency with the most urgent cell at the head.
//
// Cells come out of the fabric in no particular order, each carrying its
// departure slot `dep` (urgency = dep - now). An arriving cell is placed
// behind every stored cell that is due earlier and the cells behind it move
// one place back, so the buffer is always in increasing order of urgency. The
// buffer is a shift register of DEPTH entries; the insert position comes from
// one comparison per entry.
//
// In the cycle where `depart` is high the head cell leaves on the output line
// (`line_valid`, `line_payload`) if it is due, i.e. its departure slot is
// `now` or earlier; `line_late` marks a cell that leaves after its slot,
// which means the switch has failed to mimic the output-queued switch.
// Departure slots are compared as signed differences modulo 2**TW. An insert
// and a departure must not fall in the same cycle. A cell that finds the
// buffer full is lost and flagged on `overflow`; sizing the buffer to the
// reference queue capacity makes that impossible while the switch mimics the
// reference. Sorting by urgency follows the design; the shift-register
// realisation, the depth and the late-cell policy are this design's choices.
module output_buffer #(
  parameter int unsigned CELL_W = cioq_pkg::CELL_W_DEF,
  parameter int unsigned TW     = cioq_pkg::stamp_width(cioq_pkg::QMAX_DEF),
  parameter int unsigned DEPTH  = cioq_pkg::QMAX_DEF,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_valid,
  input  logic [CELL_W-1:0] ins_payload,
  input  logic [TW-1:0]     ins_dep,
  input  logic              depart,
  input  logic [TW-1:0]     now,
  output logic              line_valid,
  output logic [CELL_W-1:0] line_payload,
  output logic              line_late,
  output logic              head_valid,
  output logic [TW-1:0]     head_dep,
  output logic [CW-1:0]     count,
  output logic              overflow
);
  logic [DEPTH-1:0]  v_q;
  logic [CELL_W-1:0] pay_q [DEPTH];
  logic [TW-1:0]     dep_q [DEPTH];
  logic [DEPTH-1:0]  ahead;          // entry k stays ahead of the new cell

  always_comb begin
    for (int k = 0; k < DEPTH; k++)
      ahead[k] = v_q[k] && ($signed(ins_dep - dep_q[k]) > 0);
  end

  // Head is due when its departure slot is not later than now.
  wire head_due = v_q[0] && ($signed(dep_q[0] - now) <= 0);

  assign head_valid   = v_q[0];
  assign head_dep     = dep_q[0];
  assign line_valid   = depart && head_due;
  assign line_payload = pay_q[0];
  assign line_late    = line_valid && (dep_q[0] != now);
  assign overflow     = ins_valid && v_q[DEPTH-1];

  always_comb begin
    count = '0;
    for (int k = 0; k < DEPTH; k++) count = count + CW'(v_q[k]);
  end

  // Entry k after an insert: kept if it stays ahead, the new cell if entry
  // k-1 stays ahead (or k is 0), otherwise entry k-1 moved back by one.
  logic [DEPTH-1:0]  prev_ahead;
  logic [DEPTH-1:0]  v_prev;
  logic [CELL_W-1:0] pay_prev [DEPTH];
  logic [TW-1:0]     dep_prev [DEPTH];

  always_comb begin
    prev_ahead[0] = 1'b1;
    v_prev[0]     = 1'b0;
    pay_prev[0]   = ins_payload;
    dep_prev[0]   = ins_dep;
    for (int k = 1; k < DEPTH; k++) begin
      prev_ahead[k] = ahead[k-1];
      v_prev[k]     = v_q[k-1];
      pay_prev[k]   = pay_q[k-1];
      dep_prev[k]   = dep_q[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (ins_valid && !v_q[DEPTH-1]) begin
      for (int k = 0; k < DEPTH; k++) begin
        if (ahead[k]) begin
          v_q[k] <= v_q[k];
        end else if (prev_ahead[k]) begin
          v_q[k] <= 1'b1;
        end else begin
          v_q[k] <= v_prev[k];
        end
      end
    end else if (line_valid) begin
      v_q <= v_q >> 1;
    end
  end

  always_ff @(posedge clk) begin
    if (ins_valid && !v_q[DEPTH-1]) begin
      for (int k = 0; k < DEPTH; k++) begin
        if (ahead[k]) begin
          pay_q[k] <= pay_q[k];
          dep_q[k] <= dep_q[k];
        end else if (prev_ahead[k]) begin
          pay_q[k] <= ins_payload;
          dep_q[k] <= ins_dep;
        end else begin
          pay_q[k] <= pay_prev[k];
          dep_q[k] <= dep_prev[k];
        end
      end
    end else if (line_valid) begin
      for (int k = 0; k < DEPTH - 1; k++) begin
        pay_q[k] <= pay_q[k+1];
        dep_q[k] <= dep_q[k+1];
      end
    end
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(ins_valid && depart));

endmodule
