// Self-checking testbench of mode_selector. Side a and side b each have a
// read and a write engine (AXI IDs 1 and 2); the port side is the
// behavioural memory model. Side a starts 12 reads and 12 writes; while they
// are in flight the selection is requested for side b. The switch must wait
// until every burst of side a has been answered, after which only side b's
// bursts (ID 2) reach the memory, and each side gets back exactly its own
// responses. Then the selection returns to side a.
module tb_mode_selector;
  import ms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // AXI signal sets of side a, side b and the port
`define AXI_SET(p) \
  logic [5:0] p``awid, p``wid, p``bid, p``arid, p``rid; \
  logic [32:0] p``awaddr, p``araddr; \
  logic [3:0] p``awlen, p``arlen; \
  logic [2:0] p``awsize, p``arsize; \
  logic [1:0] p``awburst, p``arburst, p``bresp, p``rresp; \
  logic p``awvalid, p``awready, p``wlast, p``wvalid, p``wready, p``bvalid, p``bready; \
  logic p``arvalid, p``arready, p``rlast, p``rvalid, p``rready; \
  logic [255:0] p``wdata, p``rdata; \
  logic [31:0] p``wstrb;
  `AXI_SET(a_)
  `AXI_SET(b_)
  `AXI_SET(m_)

  logic sel_req, sel;
  mode_selector dut (.clk, .rst_n, .sel_req, .sel,
    .a_awid, .a_awaddr, .a_awlen, .a_awsize, .a_awburst, .a_awvalid, .a_wid, .a_wdata,
    .a_wstrb, .a_wlast, .a_wvalid, .a_bready, .a_arid, .a_araddr, .a_arlen, .a_arsize,
    .a_arburst, .a_arvalid, .a_rready, .a_awready, .a_wready, .a_bid, .a_bresp, .a_bvalid,
    .a_arready, .a_rid, .a_rdata, .a_rresp, .a_rlast, .a_rvalid,
    .b_awid, .b_awaddr, .b_awlen, .b_awsize, .b_awburst, .b_awvalid, .b_wid, .b_wdata,
    .b_wstrb, .b_wlast, .b_wvalid, .b_bready, .b_arid, .b_araddr, .b_arlen, .b_arsize,
    .b_arburst, .b_arvalid, .b_rready, .b_awready, .b_wready, .b_bid, .b_bresp, .b_bvalid,
    .b_arready, .b_rid, .b_rdata, .b_rresp, .b_rlast, .b_rvalid,
    .m_awid, .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_wid, .m_wdata,
    .m_wstrb, .m_wlast, .m_wvalid, .m_bready, .m_arid, .m_araddr, .m_arlen, .m_arsize,
    .m_arburst, .m_arvalid, .m_rready, .m_awready, .m_wready, .m_bid, .m_bresp, .m_bvalid,
    .m_arready, .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid);

  logic rc_v[2], rc_r[2], wc_v[2], wc_r[2];
  cmd_t rc[2], wc[2];
  logic r_idle[2], w_idle[2], r_last[2], w_resp[2];
  logic u0[2], u1[2], u2[2], u3[2], u4[2], u5[2];
  logic [255:0] u6[2];

  axi_rd_engine #(.ID(6'd1)) ra (.clk, .rst_n, .cmd_valid(rc_v[0]), .cmd_ready(rc_r[0]),
    .cmd(rc[0]), .arid(a_arid), .araddr(a_araddr), .arlen(a_arlen), .arsize(a_arsize),
    .arburst(a_arburst), .arvalid(a_arvalid), .arready(a_arready), .rid(a_rid),
    .rdata(a_rdata), .rresp(a_rresp), .rlast(a_rlast), .rvalid(a_rvalid), .rready(a_rready),
    .ar_fire(u0[0]), .beat_pulse(u1[0]), .last_pulse(r_last[0]), .err_pulse(u2[0]),
    .idle(r_idle[0]), .beat_data(u6[0]));
  axi_rd_engine #(.ID(6'd2)) rb (.clk, .rst_n, .cmd_valid(rc_v[1]), .cmd_ready(rc_r[1]),
    .cmd(rc[1]), .arid(b_arid), .araddr(b_araddr), .arlen(b_arlen), .arsize(b_arsize),
    .arburst(b_arburst), .arvalid(b_arvalid), .arready(b_arready), .rid(b_rid),
    .rdata(b_rdata), .rresp(b_rresp), .rlast(b_rlast), .rvalid(b_rvalid), .rready(b_rready),
    .ar_fire(u0[1]), .beat_pulse(u1[1]), .last_pulse(r_last[1]), .err_pulse(u2[1]),
    .idle(r_idle[1]), .beat_data(u6[1]));
  axi_wr_engine #(.ID(6'd1)) wa (.clk, .rst_n, .cmd_valid(wc_v[0]), .cmd_ready(wc_r[0]),
    .cmd(wc[0]), .awid(a_awid), .awaddr(a_awaddr), .awlen(a_awlen), .awsize(a_awsize),
    .awburst(a_awburst), .awvalid(a_awvalid), .awready(a_awready), .wid(a_wid),
    .wdata(a_wdata), .wstrb(a_wstrb), .wlast(a_wlast), .wvalid(a_wvalid), .wready(a_wready),
    .bid(a_bid), .bresp(a_bresp), .bvalid(a_bvalid), .bready(a_bready), .aw_fire(u3[0]),
    .beat_pulse(u4[0]), .resp_pulse(w_resp[0]), .err_pulse(u5[0]), .idle(w_idle[0]));
  axi_wr_engine #(.ID(6'd2)) wb (.clk, .rst_n, .cmd_valid(wc_v[1]), .cmd_ready(wc_r[1]),
    .cmd(wc[1]), .awid(b_awid), .awaddr(b_awaddr), .awlen(b_awlen), .awsize(b_awsize),
    .awburst(b_awburst), .awvalid(b_awvalid), .awready(b_awready), .wid(b_wid),
    .wdata(b_wdata), .wstrb(b_wstrb), .wlast(b_wlast), .wvalid(b_wvalid), .wready(b_wready),
    .bid(b_bid), .bresp(b_bresp), .bvalid(b_bvalid), .bready(b_bready), .aw_fire(u3[1]),
    .beat_pulse(u4[1]), .resp_pulse(w_resp[1]), .err_pulse(u5[1]), .idle(w_idle[1]));

  int unsigned rdb, wrb, rdt, wrt, mro, mwo;
  hbm_port_model #(.STALL_PCT(20)) mem (.clk, .rst_n, .inject_err(1'b0),
    .awid(m_awid), .awaddr(m_awaddr), .awlen(m_awlen), .awvalid(m_awvalid),
    .awready(m_awready), .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast),
    .wvalid(m_wvalid), .wready(m_wready), .bid(m_bid), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready), .arid(m_arid), .araddr(m_araddr), .arlen(m_arlen),
    .arvalid(m_arvalid), .arready(m_arready), .rid(m_rid), .rdata(m_rdata),
    .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .rd_bursts(rdb), .wr_bursts(wrb), .wr_beats_total(wrt), .rd_beats_total(rdt),
    .max_rd_out(mro), .max_wr_out(mwo));

  int ar_id[4], aw_id[4], lasts[2], resps[2], wrong_side;
  always @(posedge clk) if (rst_n) begin
    if (m_arvalid && m_arready) ar_id[m_arid[1:0]]++;
    if (m_awvalid && m_awready) aw_id[m_awid[1:0]]++;
    for (int s = 0; s < 2; s++) begin
      if (r_last[s]) lasts[s]++;
      if (w_resp[s]) resps[s]++;
    end
    if (m_arvalid && (m_arid != (sel ? 6'd2 : 6'd1))) wrong_side++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue_rd(input int s, input int n);
    for (int k = 0; k < n; k++) begin
      rc_v[s] = 1;
      rc[s] = '0; rc[s].addr = ADDR_MAX'(k * 512 + s * 65536); rc[s].len = 15; rc[s].strb = '1;
      @(posedge clk);
      while (!rc_r[s]) @(posedge clk);
      #1;
    end
    rc_v[s] = 0;
  endtask

  task automatic issue_wr(input int s, input int n);
    for (int k = 0; k < n; k++) begin
      wc_v[s] = 1;
      wc[s] = '0; wc[s].addr = ADDR_MAX'(k * 512 + s * 65536); wc[s].len = 15; wc[s].strb = '1;
      @(posedge clk);
      while (!wc_r[s]) @(posedge clk);
      #1;
    end
    wc_v[s] = 0;
  endtask

  task automatic issue(input int s, input int n);
    fork
      issue_rd(s, n);
      issue_wr(s, n);
    join
  endtask

  initial begin
    int sw_time;
    foreach (rc_v[i]) begin rc_v[i] = 0; wc_v[i] = 0; rc[i] = '0; wc[i] = '0; end
    foreach (ar_id[i]) begin ar_id[i] = 0; aw_id[i] = 0; end
    lasts = '{0, 0}; resps = '{0, 0}; wrong_side = 0;
    sel_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sel == 0, "side a after reset");
    fork
      issue(0, 12);
      issue(1, 6);   // side b waits, not connected
      begin
        repeat (20) @(posedge clk);
        sel_req = 1;
      end
    join_none
    @(posedge sel_req);
    #1;
    check(!r_idle[0] || !w_idle[0], "side a busy when the switch is requested");
    @(posedge clk); #1;
    check(sel == 0, "no switch while side a has bursts in flight");
    wait (sel == 1);
    check(lasts[0] == 12 && resps[0] == 12, $sformatf("side a finished every burst before the switch (%0d %0d %0d %0d, t=%0t)", lasts[0], resps[0], ar_id[1], aw_id[1], $time));
    check(ar_id[1] == 12 && aw_id[1] == 12, "side a's bursts reached the memory");
    wait (r_idle[1] && w_idle[1] && lasts[1] == 6 && resps[1] == 6);
    repeat (3) @(posedge clk);
    check(ar_id[2] == 6 && aw_id[2] == 6, "side b's bursts reached the memory after the switch");
    check(lasts[0] == 12 && resps[0] == 12, "side a got no responses of side b");
    check(wrong_side == 0, "only the selected side drives the port");
    sel_req = 0;
    repeat (3) @(posedge clk);
    check(sel == 0, "back to side a when quiet");
    @(negedge clk);
    fork issue(0, 2); join
    wait (r_idle[0] && w_idle[0]);
    repeat (2) @(posedge clk);
    check(ar_id[1] == 14 && lasts[0] == 14 && resps[0] == 14, $sformatf("side a works again (%0d %0d %0d)", ar_id[1], lasts[0], resps[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
