// tb_voq_bank: self-checking test of one input's bank of virtual output
// queues. Random pushes and pops (to random outputs, sometimes both in one
// cycle) are mirrored in one software queue per output; after every cycle
// the head and non-empty flag of every VOQ, and the full flags, must agree
// with the model. Pushes to a full queue and pops from an empty one are not
// issued. The queues must keep each output's cells in arrival order and
// never mix cells of different outputs.
module tb_voq_bank;
  localparam int unsigned N = 4, W = 12, DEPTH = 4;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [IW-1:0] push_dest = '0, pop_dest = '0;
  logic [W-1:0]  push_cell = '0;
  logic [N-1:0]  hol_valid, voq_full;
  logic [W-1:0]  hol_cell [N];

  int checks = 0, failures = 0;
  logic [W-1:0] q [N][$];

  voq_bank #(.N(N), .W(W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push, .push_dest, .push_cell, .pop, .pop_dest,
    .hol_valid, .hol_cell, .voq_full
  );

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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

  int fulls = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // Compare state with the model.
      for (int j = 0; j < N; j++) begin
        check(hol_valid[j] == (q[j].size() != 0), $sformatf("t%0d voq %0d valid", t, j));
        check(voq_full[j] == (q[j].size() == DEPTH), $sformatf("t%0d voq %0d full", t, j));
        if (q[j].size() != 0)
          check(hol_cell[j] == q[j][0], $sformatf("t%0d voq %0d head %h exp %h", t, j, hol_cell[j], q[j][0]));
        if (q[j].size() == DEPTH) fulls++;
      end
      // Next operation.
      push_dest = IW'($urandom_range(0, N - 1));
      push_cell = W'($urandom);
      push      = ($urandom_range(0, 99) < 55) && (q[push_dest].size() < DEPTH);
      pop_dest  = IW'($urandom_range(0, N - 1));
      pop       = ($urandom_range(0, 99) < 45) && (q[pop_dest].size() != 0);
      if (pop)  void'(q[pop_dest].pop_front());
      if (push) q[push_dest].push_back(push_cell);
    end
    check(fulls > 0, "some queue must have filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
