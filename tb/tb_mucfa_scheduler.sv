// tb_mucfa_scheduler: self-checking test of the MUCFA matching engine.
//
// Part 1 replays the 3 x 3, speedup-2 example switch (two phases of one time
// slot): in the first phase outputs 1 and 2 both want input 1 with equal
// urgency, input 1 takes output 1 and output 2 falls back to input 2; in the
// second phase input 2 loses output 3 to input 3 and output 1 stays idle.
// Part 2 compares random request matrices against a software model that
// builds the matching greedily from a global sort of all edges by
// (urgency, output, input), which is the stable matching both sides agree on.
// It also checks that `done` comes exactly ITERS cycles after `start`.
module tb_mucfa_scheduler;
  localparam int unsigned N  = 5;
  localparam int unsigned UW = 6;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]         req [N];
  logic signed [UW-1:0] urg [N][N];
  logic busy, done;
  logic [N-1:0]  in_match, out_match;
  logic [IW-1:0] in_port [N];
  logic [IW-1:0] out_port [N];

  int checks = 0, failures = 0;

  mucfa_scheduler #(.N(N), .UW(UW)) dut (
    .clk, .rst_n, .start, .req, .urg, .busy, .done,
    .in_match, .in_port, .out_match, .out_port
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

  // Run one matching; check done timing.
  task automatic run_match();
    int cyc = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == N - 1, $sformatf("done after %0d cycles, expected %0d", cyc + 1, N));
    @(negedge clk);
    check(!busy, "busy must drop after the last round");
  endtask

  // Independent model: greedy over edges sorted by (urgency, output, input).
  task automatic model(output int exp_in [N]);
    bit im [N], om [N];
    for (int k = 0; k < N; k++) begin
      exp_in[k] = -1;
      im[k] = 0;
      om[k] = 0;
    end
    forever begin
      int bi = -1, bj = -1, bu = 0;
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++)
          if (req[i][j] && !im[i] && !om[j])
            if (bi < 0 || int'(urg[i][j]) < bu ||
                (int'(urg[i][j]) == bu && (j < bj || (j == bj && i < bi)))) begin
              bi = i; bj = j; bu = int'(urg[i][j]);
            end
      if (bi < 0) break;
      im[bi] = 1;
      om[bj] = 1;
      exp_in[bi] = bj;
    end
  endtask

  task automatic compare(input string tag);
    int exp_in [N];
    model(exp_in);
    for (int i = 0; i < N; i++) begin
      if (exp_in[i] < 0)
        check(!in_match[i], $sformatf("%s: input %0d must stay unmatched", tag, i));
      else begin
        check(in_match[i] && in_port[i] == IW'(exp_in[i]),
              $sformatf("%s: input %0d -> %0d, expected %0d", tag, i, in_port[i], exp_in[i]));
        check(out_match[exp_in[i]] && out_port[exp_in[i]] == IW'(i),
              $sformatf("%s: output %0d side disagrees", tag, exp_in[i]));
      end
    end
  endtask

  task automatic clear_req();
    for (int i = 0; i < N; i++) begin
      req[i] = '0;
      for (int j = 0; j < N; j++) urg[i][j] = '0;
    end
  endtask

  task automatic set(input int i, input int j, input int u);
    req[i][j] = 1'b1;
    urg[i][j] = UW'(u);
  endtask

  initial begin
    clear_req();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Example switch, phase 1 (ports 0-based; ports 3 and 4 unused).
    clear_req();
    set(0, 0, 1); set(0, 1, 1); set(0, 2, 3);
    set(1, 1, 3); set(1, 2, 2);
    set(2, 0, 2); set(2, 2, 0);
    run_match();
    check(in_match[0] && in_port[0] == 0, "phase 1: input 1 grants output 1 on the tie");
    check(in_match[1] && in_port[1] == 1, "phase 1: output 2 falls back to input 2");
    check(in_match[2] && in_port[2] == 2, "phase 1: input 3 serves output 3");
    compare("example phase 1");

    // Phase 2 after the transfers of phase 1.
    clear_req();
    set(0, 1, 1); set(0, 2, 3);
    set(1, 1, 4); set(1, 2, 2);
    set(2, 0, 2); set(2, 2, 1);
    run_match();
    check(in_match[0] && in_port[0] == 1, "phase 2: input 1 sends to output 2");
    check(in_match[2] && in_port[2] == 2, "phase 2: input 3 sends to output 3");
    check(!in_match[1], "phase 2: input 2 loses output 3 (output contention)");
    check(!out_match[0], "phase 2: output 1 receives nothing");
    compare("example phase 2");

    // Random matrices, including ties and late (negative) urgencies.
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          req[i][j] = ($urandom_range(0, 99) < 60);
          urg[i][j] = UW'($urandom_range(0, 11) - 2);
        end
      run_match();
      compare($sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
