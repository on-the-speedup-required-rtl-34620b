// tb_ref_oq_stamper: self-checking test of the reference output-queued
// switch bookkeeping. A software model keeps the length of every output FIFO
// of the reference switch; each slot, random cells arrive (heavy traffic, so
// the FIFOs fill and cells are refused) and the expected departure slot of
// every cell is now + the number of cells ahead of it, counting same-slot
// arrivals from lower-numbered inputs first. Refusals because of a full
// reference FIFO or a full VOQ (`in_room` low) are checked too, as are the
// busy flags and the slot counter.
module tb_ref_oq_stamper;
  localparam int unsigned N = 4, QMAX = 8;
  localparam int unsigned IW = $clog2(N), TW = $clog2(QMAX) + 2;

  logic clk = 1'b0, rst_n = 1'b0, arrive = 1'b0, depart = 1'b0;
  logic [N-1:0]  in_valid = '0, in_room = '0, accept, oq_busy;
  logic [IW-1:0] in_dest [N];
  logic [TW-1:0] dep_time [N];
  logic [TW-1:0] now;
  logic [$clog2(QMAX+1)-1:0] oq_count [N];

  int checks = 0, failures = 0;
  int len [N];
  int slot = 0, refused = 0, noroom = 0;

  ref_oq_stamper #(.N(N), .QMAX(QMAX)) dut (
    .clk, .rst_n, .arrive, .in_valid, .in_dest, .in_room, .accept, .dep_time,
    .depart, .now, .oq_count, .oq_busy
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

  initial begin
    for (int i = 0; i < N; i++) begin
      in_dest[i] = '0;
      len[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      // Arrival cycle. Output 0 is a hot spot so its FIFO fills up.
      for (int i = 0; i < N; i++) begin
        in_valid[i] = ($urandom_range(0, 99) < 80);
        in_dest[i]  = ($urandom_range(0, 1) == 0) ? '0 : IW'($urandom_range(0, N - 1));
        in_room[i]  = ($urandom_range(0, 99) < 95);
      end
      arrive = 1'b1;
      #1;
      check(now == TW'(slot), "slot counter");
      for (int i = 0; i < N; i++) begin
        automatic int d = in_dest[i];
        automatic bit exp_acc = in_valid[i] && in_room[i] && (len[d] < QMAX);
        check(accept[i] == exp_acc, $sformatf("slot %0d input %0d accept %b exp %b v%b r%b d%0d len%0d", slot, i, accept[i], exp_acc, in_valid[i], in_room[i], d, len[d]));
        if (exp_acc) begin
          check(dep_time[i] == TW'(slot + len[d]),
                $sformatf("slot %0d input %0d dep %0d exp %0d", slot, i, dep_time[i], slot + len[d]));
          len[d]++;
        end else if (in_valid[i] && !in_room[i]) noroom++;
        else if (in_valid[i]) refused++;
      end
      @(negedge clk);
      arrive = 1'b0;
      for (int j = 0; j < N; j++) begin
        check(int'(oq_count[j]) == len[j], $sformatf("slot %0d count %0d", slot, j));
        check(oq_busy[j] == (len[j] != 0), "busy flag");
      end
      // Departure cycle.
      depart = 1'b1;
      @(negedge clk);
      depart = 1'b0;
      for (int j = 0; j < N; j++) if (len[j] != 0) len[j]--;
      slot++;
    end
    check(refused > 0, "a full reference FIFO must refuse a cell");
    check(noroom > 0, "a full VOQ must refuse a cell");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
