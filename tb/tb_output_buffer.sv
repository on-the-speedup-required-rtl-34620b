// tb_output_buffer: self-checking test of the urgency-sorted output buffer.
// Each slot, a random number of cells with distinct random departure slots
// (all due now or later) are inserted in random order; then one departure
// cycle follows. A software model keeps the same cells sorted by departure
// slot. The head must always be the model's earliest cell, a cell must leave
// exactly in its slot, and nothing may leave before it is due. A cell
// inserted after its slot has passed must leave at once, flagged late, and
// an insert into a full buffer must raise overflow.
module tb_output_buffer;
  localparam int unsigned CELL_W = 16, DEPTH = 8;
  localparam int unsigned TW = $clog2(DEPTH) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ins_valid = 1'b0, depart = 1'b0;
  logic [CELL_W-1:0] ins_payload = '0, line_payload;
  logic [TW-1:0] ins_dep = '0, now = '0, head_dep;
  logic line_valid, line_late, head_valid, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;

  typedef struct { int dep; logic [CELL_W-1:0] pay; } cell_t;
  cell_t model [$];
  int checks = 0, failures = 0;
  int slot = 0, sent = 0, out_of_order = 0, lates = 0;

  output_buffer #(.CELL_W(CELL_W), .TW(TW), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .ins_valid, .ins_payload, .ins_dep, .depart, .now,
    .line_valid, .line_payload, .line_late, .head_valid, .head_dep, .count, .overflow
  );

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit used(int d);
    foreach (model[k]) if (model[k].dep == d) return 1;
    return 0;
  endfunction

  task automatic insert(input int d, input logic [CELL_W-1:0] p);
    int pos = 0;
    ins_valid = 1'b1; ins_dep = TW'(d); ins_payload = p;
    #1;
    check(overflow == (model.size() == DEPTH), "overflow flag");
    @(negedge clk);
    ins_valid = 1'b0;
    if (model.size() < DEPTH) begin
      while (pos < model.size() && model[pos].dep < d) pos++;
      if (pos != model.size()) out_of_order++;
      model.insert(pos, '{dep: d, pay: p});
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      automatic int n = $urandom_range(0, 3);
      now = TW'(slot);
      for (int k = 0; k < n; k++) begin
        automatic int d = slot + $urandom_range(0, DEPTH - 2);
        if (!used(d) && model.size() < DEPTH) insert(d, CELL_W'($urandom));
      end
      // Occasionally a cell whose slot has already passed.
      if (t % 97 == 50 && model.size() < DEPTH && !used(slot - 1)) insert(slot - 1, 16'hDEAD);
      // Occasionally overfill the buffer.
      if (t % 151 == 75) begin
        automatic int d = slot;
        while (model.size() < DEPTH) begin
          if (!used(d)) insert(d, CELL_W'($urandom));
          d++;
        end
        while (used(d)) d++;
        insert(d, 16'hBEEF);
      end
      check(int'(count) == model.size(), $sformatf("slot %0d count", slot));
      if (model.size() != 0)
        check(head_valid && head_dep == TW'(model[0].dep), $sformatf("slot %0d head", slot));
      depart = 1'b1;
      #1;
      if (model.size() != 0 && model[0].dep <= slot) begin
        check(line_valid && line_payload == model[0].pay, $sformatf("slot %0d departure", slot));
        check(line_late == (model[0].dep < slot), $sformatf("slot %0d late flag", slot));
        if (line_late) lates++;
        void'(model.pop_front());
        sent++;
      end else begin
        check(!line_valid, $sformatf("slot %0d nothing due", slot));
      end
      @(negedge clk);
      depart = 1'b0;
      // Start afresh after an overfill.
      if (t % 151 == 75) begin
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        model.delete();
      end
      slot++;
    end
    check(sent > 100, "cells must depart");
    check(out_of_order > 0, "some insert must land ahead of stored cells");
    check(lates > 0, "a late cell must leave flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
