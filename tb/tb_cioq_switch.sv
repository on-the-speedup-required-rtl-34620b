// tb_cioq_switch: end-to-end test of the CIOQ switch.
//
// Switch A (8 x 8, speedup 4, queue capacity 32) runs 2000 slots of heavy
// random traffic with periodic overload of one output, and every slot is
// compared with a FIFO output-queued reference switch: the same cells must
// leave from the same outputs in the same slots (cioq_line_model, STRICT).
// Switch B is the same switch with a speedup of 1, a pure input-queued
// switch, under the same kind of traffic; it must fall behind the reference
// at some point, which its miss flag must report.
//
// The test also counts how often each mechanism of the design occurred and
// fails if one never did: input contention (an output's most urgent cell is
// refused because its input serves a more urgent cell), output contention
// (an input's most urgent cell is refused because its output takes a more
// urgent one), a match made in a later round of a phase, a cell inserted
// ahead of cells already in an output buffer, a refused arrival at a full
// reference queue, and a miss and a late departure at speedup 1.
//
// On switch A it also checks, at the start of every slot, the invariant that
// guarantees exact mimicking at speedup 4: sorting the cells waiting at an
// input by urgency (then output number), the cell at position p never has
// urgency p-1.
module tb_cioq_switch;
  localparam int unsigned N = 8, CELL_W = 32, QMAX = 32, QB = 8;
  localparam int unsigned IW = $clog2(N), TW = $clog2(QMAX) + 2, TWB = $clog2(QB) + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- switch A: speedup 4, checked against the reference
  logic              a_slot_start, a_slot_end, a_overflow, a_xfer;
  logic [N-1:0]      a_in_valid, a_in_accept, a_out_valid, a_out_late, a_out_miss;
  logic [IW-1:0]     a_in_dest [N];
  logic [CELL_W-1:0] a_in_payload [N];
  logic [CELL_W-1:0] a_out_payload [N];
  logic [TW-1:0]     a_now;
  logic [1:0]        a_phase;
  logic              a_fin;
  int a_checks, a_failures, a_acc, a_ref, a_sent, a_miss, a_late;

  cioq_switch #(.N(N), .S(4), .CELL_W(CELL_W), .QMAX(QMAX)) dut_a (
    .clk, .rst_n, .slot_start(a_slot_start), .in_valid(a_in_valid), .in_dest(a_in_dest),
    .in_payload(a_in_payload), .in_accept(a_in_accept), .out_valid(a_out_valid),
    .out_payload(a_out_payload), .out_late(a_out_late), .out_miss(a_out_miss),
    .overflow(a_overflow), .slot_end(a_slot_end), .now(a_now), .phase(a_phase), .xfer(a_xfer)
  );

  cioq_line_model #(.N(N), .S(4), .CELL_W(CELL_W), .QMAX(QMAX), .SLOTS(2000),
                    .STRICT(1'b1), .LOAD(95), .HOT(80)) lm_a (
    .clk, .rst_n, .slot_start(a_slot_start), .slot_end(a_slot_end),
    .in_valid(a_in_valid), .in_dest(a_in_dest), .in_payload(a_in_payload),
    .in_accept(a_in_accept), .out_valid(a_out_valid), .out_payload(a_out_payload),
    .out_late(a_out_late), .out_miss(a_out_miss), .overflow(a_overflow),
    .finished(a_fin), .checks(a_checks), .failures(a_failures), .accepted(a_acc),
    .refused(a_ref), .sent(a_sent), .misses(a_miss), .lates(a_late)
  );

  // ---------------- switch B: speedup 1, expected to fall behind
  logic              b_slot_start, b_slot_end, b_overflow, b_xfer;
  logic [N-1:0]      b_in_valid, b_in_accept, b_out_valid, b_out_late, b_out_miss;
  logic [IW-1:0]     b_in_dest [N];
  logic [CELL_W-1:0] b_in_payload [N];
  logic [CELL_W-1:0] b_out_payload [N];
  logic [TWB-1:0]    b_now;
  logic [0:0]        b_phase;
  logic              b_fin;
  int b_checks, b_failures, b_acc, b_ref, b_sent, b_miss, b_late;

  cioq_switch #(.N(N), .S(1), .CELL_W(CELL_W), .QMAX(QB)) dut_b (
    .clk, .rst_n, .slot_start(b_slot_start), .in_valid(b_in_valid), .in_dest(b_in_dest),
    .in_payload(b_in_payload), .in_accept(b_in_accept), .out_valid(b_out_valid),
    .out_payload(b_out_payload), .out_late(b_out_late), .out_miss(b_out_miss),
    .overflow(b_overflow), .slot_end(b_slot_end), .now(b_now), .phase(b_phase), .xfer(b_xfer)
  );

  cioq_line_model #(.N(N), .S(1), .CELL_W(CELL_W), .QMAX(QB), .SLOTS(600),
                    .STRICT(1'b0), .LOAD(90), .HOT(80)) lm_b (
    .clk, .rst_n, .slot_start(b_slot_start), .slot_end(b_slot_end),
    .in_valid(b_in_valid), .in_dest(b_in_dest), .in_payload(b_in_payload),
    .in_accept(b_in_accept), .out_valid(b_out_valid), .out_payload(b_out_payload),
    .out_late(b_out_late), .out_miss(b_out_miss), .overflow(b_overflow),
    .finished(b_fin), .checks(b_checks), .failures(b_failures), .accepted(b_acc),
    .refused(b_ref), .sent(b_sent), .misses(b_miss), .lates(b_late)
  );

  // ---------------- mechanism counters on switch A
  int n_in_cont = 0, n_out_cont = 0, n_late_round = 0, n_ins_ahead = 0, n_xfer = 0;

  always @(posedge clk) begin
    if (rst_n && dut_a.u_sched.busy) begin
      for (int j = 0; j < N; j++)
        if (dut_a.u_sched.out_has[j] &&
            dut_a.u_sched.in_best[dut_a.u_sched.out_best[j]] != IW'(j)) n_in_cont++;
      for (int i = 0; i < N; i++)
        if (dut_a.u_sched.in_has[i] &&
            dut_a.u_sched.out_best[dut_a.u_sched.in_best[i]] != IW'(i)) n_out_cont++;
      if (dut_a.u_sched.left_q != N) begin
        for (int i = 0; i < N; i++)
          if (dut_a.u_sched.new_m[i] != '0) n_late_round++;
      end
    end
    if (rst_n && a_xfer) n_xfer++;
  end

  int ins_ahead [N];
  for (genvar j = 0; j < N; j++) begin : g_ahead
    initial ins_ahead[j] = 0;
    always @(posedge clk)
      if (rst_n && dut_a.g_out[j].u_ob.ins_valid &&
          (dut_a.g_out[j].u_ob.v_q & ~dut_a.g_out[j].u_ob.ahead) != '0)
        ins_ahead[j]++;
  end

  // ---------------- input-thread invariant on switch A
  // At the start of every slot (before the new arrivals are queued), sort the
  // cells waiting at each input by (urgency, output): the thread of that
  // input. With speedup 4 the cell at position p (1-based) must never have
  // urgency p-1, and no waiting cell may be overdue.
  localparam int unsigned VW = CELL_W + TW;
  logic [VW-1:0] voq_mem [N][N][QMAX];
  int            voq_cnt [N][N];
  int            voq_rd  [N][N];
  for (genvar i = 0; i < N; i++) begin : g_ti
    for (genvar j = 0; j < N; j++) begin : g_tj
      always_comb begin
        voq_cnt[i][j] = int'(dut_a.g_in[i].u_voq.g_voq[j].u_fifo.cnt_q);
        voq_rd[i][j]  = int'(dut_a.g_in[i].u_voq.g_voq[j].u_fifo.rd_q);
        for (int k = 0; k < QMAX; k++) voq_mem[i][j][k] = dut_a.g_in[i].u_voq.g_voq[j].u_fifo.mem[k];
      end
    end
  end

  int n_thread_checks = 0, n_thread_len_max = 0;
  always @(negedge clk) begin
    if (rst_n && a_slot_start && !a_fin) begin
      for (int i = 0; i < N; i++) begin
        automatic int keys [$];
        for (int j = 0; j < N; j++)
          for (int k = 0; k < voq_cnt[i][j]; k++) begin
            automatic logic [TW-1:0] dep = voq_mem[i][j][(voq_rd[i][j] + k) % QMAX][TW-1:0];
            automatic int u = int'($signed(TW'(dep - a_now)));
            check(u >= 0, $sformatf("input %0d holds an overdue cell", i));
            keys.push_back(u * 64 + j);
          end
        keys.sort();
        if (keys.size() > n_thread_len_max) n_thread_len_max = keys.size();
        foreach (keys[p]) begin
          n_thread_checks++;
          if (keys[p] / 64 == p) begin
            failures++;
            $display("FAIL: input %0d thread position %0d holds urgency %0d", i, p + 1, p);
          end
        end
      end
    end
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (a_fin && b_fin);
    @(negedge clk);
    foreach (ins_ahead[j]) n_ins_ahead += ins_ahead[j];
    checks   += a_checks;
    failures += a_failures;
    $display("A: accepted %0d refused %0d sent %0d", a_acc, a_ref, a_sent);
    $display("B: accepted %0d refused %0d sent %0d misses %0d late %0d", b_acc, b_ref, b_sent, b_miss, b_late);
    $display("thread positions checked %0d, longest input thread %0d", n_thread_checks, n_thread_len_max);
    checks += n_thread_checks;
    check(n_thread_len_max >= 2, "input threads of more than one cell must occur");
    $display("events: input contention %0d, output contention %0d, later-round matches %0d, inserts ahead %0d, transfer phases %0d",
             n_in_cont, n_out_cont, n_late_round, n_ins_ahead, n_xfer);
    check(a_sent > 1000, "switch A must carry traffic");
    check(a_ref > 0, "a full reference queue must refuse cells");
    check(n_in_cont > 0, "input contention must occur");
    check(n_out_cont > 0, "output contention must occur");
    check(n_late_round > 0, "a match in a later round must occur");
    check(n_ins_ahead > 0, "an insert ahead of stored cells must occur");
    check(n_xfer == 4 * 2000, "four transfer phases per slot");
    check(b_miss > 0, "speedup 1 must miss a departure");
    check(b_late > 0, "speedup 1 must send a cell late");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
