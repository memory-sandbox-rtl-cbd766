// Self-checking testbench of perf_counter with hand-made event sequences
// whose cycle counts are known: the address is first valid in cycle A, the
// first response comes in cycle A+L, the last in cycle A+C-1, then the run
// finishes. The counters must read latency L, cycles C, and the given beat
// and error counts; an empty run must end at once.
module tb_perf_counter;
  import ms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start, addr_valid, resp_pulse, beat_pulse, err_pulse, finished;
  perf_t perf;
  perf_counter dut (.clk, .rst_n, .start, .addr_valid, .resp_pulse, .beat_pulse, .err_pulse,
    .finished, .perf);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One run: L cycles latency, C cycles in all, nb beats (one per cycle from
  // the first response), ne errors among them.
  task automatic one_run(input int L, input int C, input int ne);
    start = 1; @(negedge clk); start = 0;
    check(perf.busy && !perf.done && perf.cycles == 0, "cleared and busy after start");
    repeat (3) @(negedge clk);        // idle before the first address
    for (int c = 0; c < C; c++) begin
      addr_valid = (c < 4);
      resp_pulse = (c >= L);
      beat_pulse = (c >= L);
      err_pulse  = (c >= L) && (c < L + ne);
      @(negedge clk);
    end
    addr_valid = 0; resp_pulse = 0; beat_pulse = 0; err_pulse = 0;
    finished = 1; @(negedge clk); finished = 0;
    check(perf.done && !perf.busy, "done after finished");
    check(perf.latency == 32'(L), $sformatf("latency %0d, expected %0d", perf.latency, L));
    check(perf.cycles == 64'(C), $sformatf("cycles %0d, expected %0d", perf.cycles, C));
    check(perf.beats == 64'(C - L), "beats");
    check(perf.errors == 32'(ne), "errors");
    repeat (5) @(negedge clk);
    check(perf.cycles == 64'(C), "result held after the run");
  endtask

  initial begin
    start = 0; addr_valid = 0; resp_pulse = 0; beat_pulse = 0; err_pulse = 0; finished = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!perf.busy && !perf.done, "idle after reset");
    one_run(48, 64, 0);    // HBM read, nearest pseudo-channels
    one_run(14, 30, 3);    // HBM write
    one_run(5, 9, 1);      // DDR4 write
    // empty run
    finished = 1; start = 1; @(negedge clk); start = 0; @(negedge clk);
    check(perf.done && perf.cycles == 0, "empty run ends at once");
    finished = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
