// tb_cioq_switch_full: the CIOQ switch at its default size (32 x 32,
// speedup 4, queue capacity 16, 32-bit cells) carrying 2000 time slots of
// heavy random traffic with periodic overload of output 0. Every slot is
// compared with a FIFO output-queued reference switch (cioq_line_model):
// identical acceptances, identical departures in identical slots, and the
// slot length of 2 + S*(N+1) cycles.
module tb_cioq_switch_full;
  localparam int unsigned N = cioq_pkg::N_PORTS_DEF;
  localparam int unsigned S = cioq_pkg::SPEEDUP_DEF;
  localparam int unsigned CELL_W = cioq_pkg::CELL_W_DEF;
  localparam int unsigned QMAX = cioq_pkg::QMAX_DEF;
  localparam int unsigned IW = $clog2(N), TW = $clog2(QMAX) + 2;
  localparam int unsigned SLOTS = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              slot_start, slot_end, overflow, xfer, fin;
  logic [N-1:0]      in_valid, in_accept, out_valid, out_late, out_miss;
  logic [IW-1:0]     in_dest [N];
  logic [CELL_W-1:0] in_payload [N];
  logic [CELL_W-1:0] out_payload [N];
  logic [TW-1:0]     now;
  logic [$clog2(S)-1:0] phase;
  int lm_checks, lm_failures, acc, refd, sent, miss, late;
  int checks = 0, failures = 0;

  cioq_switch dut (
    .clk, .rst_n, .slot_start, .in_valid, .in_dest, .in_payload, .in_accept,
    .out_valid, .out_payload, .out_late, .out_miss, .overflow, .slot_end,
    .now, .phase, .xfer
  );

  cioq_line_model #(.N(N), .S(S), .CELL_W(CELL_W), .QMAX(QMAX), .SLOTS(SLOTS),
                    .STRICT(1'b1), .LOAD(95), .HOT(60)) lm (
    .clk, .rst_n, .slot_start, .slot_end, .in_valid, .in_dest, .in_payload,
    .in_accept, .out_valid, .out_payload, .out_late, .out_miss, .overflow,
    .finished(fin), .checks(lm_checks), .failures(lm_failures), .accepted(acc),
    .refused(refd), .sent(sent), .misses(miss), .lates(late)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin);
    @(negedge clk);
    checks   = lm_checks + 2;
    failures = lm_failures;
    $display("accepted %0d refused %0d sent %0d", acc, refd, sent);
    if (sent < SLOTS * N / 2) begin
      failures++;
      $display("FAIL: too little traffic carried");
    end
    if (refd == 0) begin
      failures++;
      $display("FAIL: the overloaded output never refused a cell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
