// Self-checking testbench of axi_rd_engine against the behavioural port
// model. Three phases:
//   1. 40 bursts of random length to random addresses, with random ready
//      stalls: every read address must match its command, in order, and every
//      beat must arrive; the model must never see more than MAX_OUTSTANDING
//      bursts at once.
//   2. 64 bursts of 16 beats with no stalls: after the 48-cycle latency the
//      data must stream at one beat per cycle (64*16 beats in 64*16 cycles),
//      which needs requests kept outstanding.
//   3. error responses: every beat must raise err_pulse.
module tb_axi_rd_engine;
  import ms_pkg::*;
  localparam int MAXO = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cmd_valid, cmd_ready;
  cmd_t cmd;
  logic [5:0] arid, rid;
  logic [32:0] araddr;
  logic [3:0] arlen;
  logic [2:0] arsize;
  logic [1:0] arburst, rresp;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [255:0] rdata, beat_data;
  logic ar_fire, beat_pulse, last_pulse, err_pulse, idle, inject_err;
  int unsigned rd_bursts, wr_bursts, wrb, rdb, max_rd_out, max_wr_out;
  logic unused_aw, unused_w;
  logic [5:0] unused_bid;
  logic [1:0] unused_bresp;
  logic unused_bvalid;

  axi_rd_engine #(.MAX_OUTSTANDING(MAXO), .ID(6'd5)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready,
    .cmd, .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rid, .rdata, .rresp,
    .rlast, .rvalid, .rready, .ar_fire, .beat_pulse, .last_pulse, .err_pulse, .idle, .beat_data);

  logic stall_mode;
  hbm_port_model #(.STALL_PCT(0)) mem_fast (.clk, .rst_n, .inject_err,
    .awid('0), .awaddr('0), .awlen('0), .awvalid(1'b0), .awready(unused_aw),
    .wdata('0), .wstrb('0), .wlast(1'b0), .wvalid(1'b0), .wready(unused_w),
    .bid(unused_bid), .bresp(unused_bresp), .bvalid(unused_bvalid), .bready(1'b1),
    .arid, .araddr, .arlen, .arvalid, .arready, .rid, .rdata, .rresp, .rlast, .rvalid, .rready,
    .rd_bursts, .wr_bursts, .wr_beats_total(wrb), .rd_beats_total(rdb), .max_rd_out, .max_wr_out);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cmd_t sent[$];
  int beats_exp, beats_got, lasts, errs, ar_seen, ar_bad;
  always @(posedge clk) if (rst_n) begin
    if (beat_pulse) beats_got++;
    if (last_pulse) lasts++;
    if (err_pulse) errs++;
    if (arvalid && arready) begin
      cmd_t c;
      ar_seen++;
      c = sent.pop_front();
      if (araddr != c.addr[32:0] || arlen != c.len[3:0] || arid != 6'd5 ||
          arburst != 2'b01 || arsize != 3'd5) ar_bad++;
    end
  end

  task automatic run(input int n, input bit rnd_len);
    int k;
    k = 0;
    while (k < n) begin
      cmd_valid = 1;
      cmd.addr = ADDR_MAX'({$urandom_range(31), 28'($urandom) & 28'hFFFFFE0});
      cmd.len = rnd_len ? LEN_MAX'($urandom_range(15)) : LEN_MAX'(15);
      cmd.strb = '1;
      @(posedge clk);
      if (cmd_ready) begin sent.push_back(cmd); beats_exp += int'(cmd.len) + 1; k++; end
      #1;
    end
    cmd_valid = 0;
  endtask

  initial begin
    int t0, t1;
    cmd_valid = 0; cmd = '0; inject_err = 0;
    beats_exp = 0; beats_got = 0; lasts = 0; errs = 0; ar_seen = 0; ar_bad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(idle && cmd_ready, "idle after reset");
    // phase 1
    run(40, 1);
    wait (idle);
    repeat (2) @(posedge clk);
    check(ar_seen == 40 && ar_bad == 0, "read addresses match commands");
    check(lasts == 40, "one RLAST per burst");
    check(beats_got == beats_exp, "all beats received");
    check(max_rd_out <= MAXO && max_rd_out >= 2, "outstanding bursts, within the limit");
    check(errs == 0, "no error on OKAY");
    // phase 2: throughput
    beats_got = 0;
    @(negedge clk);
    fork
      run(64, 0);
      begin
        wait (beat_pulse); t0 = $time;
        wait (beats_got == 64 * 16); t1 = $time;
      end
    join
    check((t1 - t0) / 10 == 64 * 16, $sformatf("one beat per cycle (%0d cycles)", (t1 - t0) / 10));
    wait (idle);
    // phase 3: errors
    @(negedge clk);
    inject_err = 1; errs = 0; beats_got = 0;
    run(3, 0);
    wait (idle);
    repeat (2) @(posedge clk);
    check(errs == 48 && beats_got == 48, "error response flagged on every beat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
