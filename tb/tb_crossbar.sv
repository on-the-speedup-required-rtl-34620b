// tb_crossbar: self-checking test of the crosspoint fabric. Each trial draws
// a random partial matching (a random permutation of inputs, with some
// outputs left unconnected) and random cells, some inputs not offering a
// cell; every output must show exactly the cell of the input it is connected
// to, and no cell where it is unconnected or its input offers nothing.
module tb_crossbar;
  localparam int unsigned N = 6, W = 16;
  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  in_valid, cfg_valid, out_valid;
  logic [W-1:0]  in_cell  [N];
  logic [IW-1:0] cfg_in   [N];
  logic [W-1:0]  out_cell [N];

  int checks = 0, failures = 0;

  crossbar #(.N(N), .W(W)) dut (.in_valid, .in_cell, .cfg_valid, .cfg_in, .out_valid, .out_cell);

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

  initial begin
    int perm [N];
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < N; k++) perm[k] = k;
      for (int k = N - 1; k > 0; k--) begin
        automatic int r = $urandom_range(0, k);
        automatic int tmp = perm[k];
        perm[k] = perm[r];
        perm[r] = tmp;
      end
      for (int k = 0; k < N; k++) begin
        in_valid[k]  = ($urandom_range(0, 99) < 80);
        in_cell[k]   = W'($urandom);
        cfg_valid[k] = ($urandom_range(0, 99) < 70);
        cfg_in[k]    = IW'(perm[k]);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        automatic bit exp_v = cfg_valid[j] && in_valid[perm[j]];
        check(out_valid[j] == exp_v, $sformatf("trial %0d output %0d valid", t, j));
        if (exp_v)
          check(out_cell[j] == in_cell[perm[j]], $sformatf("trial %0d output %0d cell", t, j));
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
