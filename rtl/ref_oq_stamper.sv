// ref_oq_stamper: bookkeeping of the reference FIFO output-queued (OQ) switch
// that the CIOQ switch mimics, and stamping of each arriving cell with its
// urgency.
//
// In the reference OQ switch every arriving cell goes straight into the FIFO
// of its output, and the head of each non-empty FIFO leaves at the end of
// every time slot. A cell's urgency is the number of cells ahead of it in that
// FIFO, i.e. the number of slots until it leaves. Cells that arrive in the
// same slot for the same output enter that FIFO in increasing input order, so
// the lower-numbered input gets the smaller urgency.
//
// Only the occupancy of each reference FIFO is needed to know urgencies, so
// this block keeps one counter per output plus the slot counter `now`.
// Rather than decrementing every stored urgency once per slot, each cell is
// stamped with its absolute departure slot `dep_time = now + urgency`
// (modulo 2**TW); its urgency at any later slot is `dep_time - now`. This is
// this design's own encoding of the urgency.
//
// Timing: in the cycle where `arrive` is high the cells on `in_valid`,
// `in_dest` are stamped combinationally (`accept`, `dep_time`) and the
// counters take the new occupancies at the clock edge. In the cycle where
// `depart` is high every non-empty reference FIFO loses its head cell and
// `now` advances. `oq_busy[j]` says that the reference switch sends a cell on
// output j in the current slot. The reference FIFOs hold at most QMAX cells
// (the algorithm assumes unbounded ones): a cell that finds its reference
// FIFO full, or its VOQ full (`in_room` low), is refused in both switches
// alike, which keeps the two switches fed with identical traffic.
module ref_oq_stamper #(
  parameter int unsigned N    = cioq_pkg::N_PORTS_DEF,
  parameter int unsigned QMAX = cioq_pkg::QMAX_DEF,
  localparam int unsigned IW  = cioq_pkg::idx_width(N),
  localparam int unsigned TW  = cioq_pkg::stamp_width(QMAX),
  localparam int unsigned CW  = $clog2(QMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          arrive,
  input  logic [N-1:0]  in_valid,
  input  logic [IW-1:0] in_dest [N],
  input  logic [N-1:0]  in_room,
  output logic [N-1:0]  accept,
  output logic [TW-1:0] dep_time [N],
  input  logic          depart,
  output logic [TW-1:0] now,
  output logic [CW-1:0] oq_count [N],
  output logic [N-1:0]  oq_busy
);
  logic [CW-1:0] cnt_q   [N];
  logic [CW-1:0] cnt_arr [N];
  logic [TW-1:0] now_q;

  // Stamp arrivals in increasing input order.
  always_comb begin
    cnt_arr = cnt_q;
    for (int i = 0; i < N; i++) begin
      accept[i]   = 1'b0;
      dep_time[i] = '0;
      if (arrive && in_valid[i] && in_room[i] &&
          (cnt_arr[in_dest[i]] < CW'(QMAX))) begin
        accept[i]            = 1'b1;
        dep_time[i]          = now_q + TW'(cnt_arr[in_dest[i]]);
        cnt_arr[in_dest[i]]  = cnt_arr[in_dest[i]] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now_q <= '0;
      for (int j = 0; j < N; j++) cnt_q[j] <= '0;
    end else if (arrive) begin
      cnt_q <= cnt_arr;
    end else if (depart) begin
      now_q <= now_q + 1'b1;
      for (int j = 0; j < N; j++)
        if (cnt_q[j] != '0) cnt_q[j] <= cnt_q[j] - 1'b1;
    end
  end

  assign now      = now_q;
  assign oq_count = cnt_q;
  always_comb
    for (int j = 0; j < N; j++) oq_busy[j] = (cnt_q[j] != '0);

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(arrive && depart));

endmodule
