// cioq_line_model: traffic source, reference output-queued switch and
// checker for the CIOQ switch, used by the switch testbenches.
//
// It drives one cell per input per time slot (probability LOAD percent,
// destination uniform, except in two of every four windows of 40 slots: in
// one, a HOT percent share of the cells goes to output 0, which overloads it
// so that its reference queue fills and cells are refused; in the other, all
// inputs send to one or two outputs that move on every slot, which builds
// backlogs for several outputs at every input). Payloads are unique
// ({slot, input}). Alongside, it keeps a FIFO output-queued switch of queue
// capacity QMAX: arrivals join their output's FIFO in increasing input order,
// and each non-empty FIFO sends its head cell every slot.
//
// With STRICT set, every slot is checked against that reference: the same
// cells must be accepted, each output must send exactly the reference's cell
// in exactly the same slot, and no miss, late or overflow flag may rise; the
// slot length must be 2 + S*(ITERS+1) cycles. Without STRICT only the
// switch's own miss and late flags are counted. Inputs change at the falling
// edge of the departure cycle, so they are stable through the arrival cycle.
module cioq_line_model #(
  parameter int unsigned N      = 4,
  parameter int unsigned S      = 4,
  parameter int unsigned CELL_W = 32,
  parameter int unsigned QMAX   = 8,
  parameter int unsigned ITERS  = N,
  parameter int unsigned SLOTS  = 1000,
  parameter bit          STRICT = 1'b1,
  parameter int unsigned LOAD   = 90,
  parameter int unsigned HOT    = 80,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              slot_start,
  input  logic              slot_end,
  output logic [N-1:0]      in_valid,
  output logic [IW-1:0]     in_dest    [N],
  output logic [CELL_W-1:0] in_payload [N],
  input  logic [N-1:0]      in_accept,
  input  logic [N-1:0]      out_valid,
  input  logic [CELL_W-1:0] out_payload [N],
  input  logic [N-1:0]      out_late,
  input  logic [N-1:0]      out_miss,
  input  logic              overflow,
  output logic              finished,
  output int                checks,
  output int                failures,
  output int                accepted,
  output int                refused,
  output int                sent,
  output int                misses,
  output int                lates
);
  logic [CELL_W-1:0] oq [N][$];
  int slot = 0;
  int cyc = 0;
  int last_start = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (N=%0d S=%0d): %s", N, S, what);
    end
  endtask

  task automatic new_cells();
    automatic bit hot = ((slot / 40) % 4) == 3;
    automatic bit rot = ((slot / 40) % 4) == 1;
    for (int i = 0; i < N; i++) begin
      in_valid[i]   = ($urandom_range(0, 99) < LOAD);
      in_dest[i]    = (hot && $urandom_range(0, 99) < HOT) ? '0 : IW'($urandom_range(0, N - 1));
      if (rot) in_dest[i] = IW'((slot + (i % 2)) % N);
      in_payload[i] = CELL_W'((slot << 8) | i);
    end
  endtask

  initial begin
    finished = 1'b0;
    checks = 0; failures = 0; accepted = 0; refused = 0;
    sent = 0; misses = 0; lates = 0;
    new_cells();
  end

  always @(negedge clk) begin
    if (rst_n && !finished) begin
      cyc++;
      if (slot_start) begin
        if (STRICT && last_start >= 0)
          check(cyc - last_start == 2 + S * (ITERS + 1),
                $sformatf("slot %0d took %0d cycles", slot, cyc - last_start));
        last_start = cyc;
        for (int i = 0; i < N; i++) begin
          automatic bit exp_acc = in_valid[i] && (oq[in_dest[i]].size() < QMAX);
          if (STRICT) check(in_accept[i] == exp_acc, $sformatf("slot %0d input %0d accept", slot, i));
          if (exp_acc) oq[in_dest[i]].push_back(in_payload[i]);
          if (in_accept[i]) accepted++;
          else if (in_valid[i]) refused++;
        end
      end
      if (slot_end) begin
        for (int j = 0; j < N; j++) begin
          if (out_miss[j]) misses++;
          if (out_late[j]) lates++;
          if (out_valid[j]) sent++;
          if (STRICT) begin
            check(!out_miss[j] && !out_late[j], $sformatf("slot %0d output %0d miss/late", slot, j));
            if (oq[j].size() != 0)
              check(out_valid[j] && out_payload[j] == oq[j][0],
                    $sformatf("slot %0d output %0d sent %b %h expected %h", slot, j,
                              out_valid[j], out_payload[j], oq[j][0]));
            else
              check(!out_valid[j], $sformatf("slot %0d output %0d must idle", slot, j));
          end
          if (oq[j].size() != 0) void'(oq[j].pop_front());
        end
        if (STRICT) check(!overflow, "output buffer overflow");
        slot++;
        if (slot == SLOTS) finished = 1'b1;
        new_cells();
      end
    end
  end
endmodule
