// Self-checking testbench of axi_wr_engine against the behavioural port
// model:
//   1. 40 bursts of random length and address with random ready stalls:
//      every write address must match its command, every burst must get its
//      data and response, and the stored data must read back as the address
//      pattern the engine writes; outstanding stays within the limit;
//   2. 64 bursts of 16 beats with no stalls: data must leave at one beat per
//      cycle;
//   3. a one-beat burst with an 8-byte strobe changes only those bytes;
//   4. error responses raise err_pulse.
module tb_axi_wr_engine;
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
  logic [5:0] awid, wid, bid;
  logic [32:0] awaddr;
  logic [3:0] awlen;
  logic [2:0] awsize;
  logic [1:0] awburst, bresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [255:0] wdata;
  logic [31:0] wstrb;
  logic aw_fire, beat_pulse, resp_pulse, err_pulse, idle, inject_err;
  int unsigned rd_bursts, wr_bursts, wrb, rdb, max_rd_out, max_wr_out;
  logic stall;

  axi_wr_engine #(.MAX_OUTSTANDING(MAXO), .ID(6'd9)) dut (.clk, .rst_n, .cmd_valid, .cmd_ready,
    .cmd, .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready, .wid, .wdata, .wstrb,
    .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready, .aw_fire, .beat_pulse,
    .resp_pulse, .err_pulse, .idle);

  // The model's ready signals, optionally thinned out by the testbench.
  logic m_awready, m_wready;
  logic m_awvalid, m_wvalid;
  assign m_awvalid = awvalid && !stall;
  assign m_wvalid  = wvalid && !stall;
  assign awready   = m_awready && !stall;
  assign wready    = m_wready && !stall;
  logic [5:0] u_rid; logic [255:0] u_rdata; logic [1:0] u_rresp; logic u_rlast, u_rvalid, u_arready;
  hbm_port_model #(.STALL_PCT(0)) mem (.clk, .rst_n, .inject_err,
    .awid, .awaddr, .awlen, .awvalid(m_awvalid), .awready(m_awready),
    .wdata, .wstrb, .wlast, .wvalid(m_wvalid), .wready(m_wready),
    .bid, .bresp, .bvalid, .bready,
    .arid('0), .araddr('0), .arlen('0), .arvalid(1'b0), .arready(u_arready), .rid(u_rid),
    .rdata(u_rdata), .rresp(u_rresp), .rlast(u_rlast), .rvalid(u_rvalid), .rready(1'b1),
    .rd_bursts, .wr_bursts, .wr_beats_total(wrb), .rd_beats_total(rdb), .max_rd_out, .max_wr_out);

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cmd_t sent[$];
  int beats_exp, beats_got, resps, errs, aw_seen, aw_bad, data_bad;
  int unsigned beat_in_burst;
  logic [32:0] cur_addr[$];
  always @(posedge clk) if (rst_n) begin
    if (resp_pulse) resps++;
    if (err_pulse) errs++;
    if (awvalid && awready) begin
      cmd_t c;
      aw_seen++;
      c = sent.pop_front();
      cur_addr.push_back(awaddr);
      if (awaddr != c.addr[32:0] || awlen != c.len[3:0] || awid != 6'd9 ||
          awburst != 2'b01 || awsize != 3'd5) aw_bad++;
    end
    if (wvalid && wready) begin
      logic [32:0] a;
      beats_got++;
      a = cur_addr[0] + 33'(beat_in_burst * 32);
      if (wdata[31:0] != 32'(a) || wdata[255:224] != 32'(a) || wid != 6'd9) data_bad++;
      if (wlast) begin void'(cur_addr.pop_front()); beat_in_burst = 0; end
      else beat_in_burst++;
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

  always @(negedge clk) stall <= (stall_en && $urandom_range(99) < 30);
  logic stall_en;

  initial begin
    int t0, t1;
    logic [32:0] a;
    cmd_valid = 0; cmd = '0; inject_err = 0; stall_en = 1; beat_in_burst = 0;
    beats_exp = 0; beats_got = 0; resps = 0; errs = 0; aw_seen = 0; aw_bad = 0; data_bad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(idle && cmd_ready, "idle after reset");
    run(40, 1);
    wait (idle);
    repeat (2) @(posedge clk);
    check(aw_seen == 40 && aw_bad == 0, "write addresses match commands");
    check(beats_got == beats_exp && data_bad == 0, "all beats sent with the address pattern");
    check(resps == 40 && errs == 0, "one OKAY response per burst");
    check(max_wr_out <= MAXO && max_wr_out >= 2, "outstanding bursts, within the limit");
    // phase 2
    stall_en = 0;
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
    // phase 3: strobes
    @(negedge clk);
    a = {5'd4, 28'h0000100};
    cmd_valid = 1; cmd.addr = ADDR_MAX'(a); cmd.len = 0; cmd.strb = STRB_MAX'(32'h0000_FF00);
    sent.push_back(cmd);
    @(posedge clk); #1 cmd_valid = 0;
    wait (idle);
    @(posedge clk);
    check(mem.mem.exists(a), "strobed beat stored");
    check(mem.mem[a][63:0] == {32'(a), 32'(a)}, "strobed bytes written");
    // phase 4: errors
    @(negedge clk);
    inject_err = 1; errs = 0;
    run(3, 0);
    wait (idle);
    repeat (2) @(posedge clk);
    check(errs == 3, "error responses flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
