// Self-checking testbench of spmv_trace_gen with four behavioural memory
// ports. For R rows it computes, independently of the design, the burst
// every stream must issue for every row (a byte span turned into the beats
// it touches) and compares them, in order, with what reaches the ports. It
// also checks the ordering rules of the SpMV data flow:
//   - the x reads of a row start only after the first index beat arrived;
//   - the y write of a row goes out only after all its reads completed;
//   - the next row's first read waits for the y write response;
// and that the cycle count, the row count and the y strobes are right.
module tb_spmv_trace_gen;
  import ms_pkg::*;
  localparam int ROWS = 6, STRIDE = 16, P0 = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start;
  cfg_t cfg;
  trace_stat_t stat;
  logic [5:0]   arid [3], rid [3];
  logic [32:0]  araddr [3];
  logic [3:0]   arlen [3];
  logic [2:0]   arsize [3];
  logic [1:0]   arburst [3], rresp [3];
  logic         arvalid [3], arready [3], rlast [3], rvalid [3], rready [3];
  logic [255:0] rdata [3];
  logic [5:0]   awid, wid, bid;
  logic [32:0]  awaddr;
  logic [3:0]   awlen;
  logic [2:0]   awsize;
  logic [1:0]   awburst, bresp;
  logic         awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [255:0] wdata;
  logic [31:0]  wstrb;

  spmv_trace_gen dut (.clk, .rst_n, .start, .cfg, .stat, .arid, .araddr, .arlen, .arsize,
    .arburst, .arvalid, .arready, .rid, .rdata, .rresp, .rlast, .rvalid, .rready,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready, .wid, .wdata, .wstrb,
    .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready);

  int unsigned st [4][6];
  logic u_aw [3], u_w [3], u_bv [3], u_ar, u_rl, u_rv;
  logic [5:0] u_bid [3], u_rid;
  logic [1:0] u_br [3], u_rr;
  logic [255:0] u_rd;
  for (genvar s = 0; s < 3; s++) begin : g_mem
    hbm_port_model #(.RD_LAT(20 + 10 * s), .STALL_PCT(10)) m (.clk, .rst_n, .inject_err(1'b0),
      .awid('0), .awaddr('0), .awlen('0), .awvalid(1'b0), .awready(u_aw[s]), .wdata('0),
      .wstrb('0), .wlast(1'b0), .wvalid(1'b0), .wready(u_w[s]), .bid(u_bid[s]),
      .bresp(u_br[s]), .bvalid(u_bv[s]), .bready(1'b1),
      .arid(arid[s]), .araddr(araddr[s]), .arlen(arlen[s]), .arvalid(arvalid[s]),
      .arready(arready[s]), .rid(rid[s]), .rdata(rdata[s]), .rresp(rresp[s]),
      .rlast(rlast[s]), .rvalid(rvalid[s]), .rready(rready[s]),
      .rd_bursts(st[s][0]), .wr_bursts(st[s][1]), .wr_beats_total(st[s][2]),
      .rd_beats_total(st[s][3]), .max_rd_out(st[s][4]), .max_wr_out(st[s][5]));
  end
  hbm_port_model #(.WR_LAT(14)) my (.clk, .rst_n, .inject_err(1'b0),
    .awid, .awaddr, .awlen, .awvalid, .awready, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready,
    .arid('0), .araddr('0), .arlen('0), .arvalid(1'b0), .arready(u_ar), .rid(u_rid),
    .rdata(u_rd), .rresp(u_rr), .rlast(u_rl), .rvalid(u_rv), .rready(1'b1),
    .rd_bursts(st[3][0]), .wr_bursts(st[3][1]), .wr_beats_total(st[3][2]),
    .rd_beats_total(st[3][3]), .max_rd_out(st[3][4]), .max_wr_out(st[3][5]));

  // Expected burst of a byte span: every 32-byte beat it touches.
  function automatic logic [36:0] exp_burst(input int p, input longint b, input int n);
    longint first, last;
    first = b / 32; last = (b + n - 1) / 32;
    return {4'(last - first), 5'(p), 28'(first * 32)};
  endfunction

  logic [36:0] exp_q [4][$];
  int bad [4], got [4];
  int row_of_read [3];
  int idx_beats_row, rd_done_row, y_sent_row, b_row, x_early, y_early, next_early;
  int reads_open;
  logic [31:0] exp_strb [$];
  int strb_bad;

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 3; s++) if (arvalid[s] && arready[s]) begin
      got[s]++;
      if ({arlen[s], araddr[s]} != exp_q[s].pop_front()) bad[s]++;
      if (s == 2 && idx_beats_row == 0) x_early++;
      if (b_row != y_sent_row) next_early++;
    end
    if (rvalid[0] && rready[0]) idx_beats_row++;
    reads_open = reads_open + ((arvalid[0] && arready[0]) ? 1 : 0) + ((arvalid[1] && arready[1]) ? 1 : 0)
               + ((arvalid[2] && arready[2]) ? 1 : 0) - ((rvalid[0] && rlast[0]) ? 1 : 0)
               - ((rvalid[1] && rlast[1]) ? 1 : 0) - ((rvalid[2] && rlast[2]) ? 1 : 0);
    if (awvalid && awready) begin
      got[3]++;
      if ({awlen, awaddr} != exp_q[3].pop_front()) bad[3]++;
      if (reads_open != 0) y_early++;
      y_sent_row++;
      idx_beats_row = 0;
    end
    if (wvalid && wready && wstrb != exp_strb.pop_front()) strb_bad++;
    if (bvalid && bready) b_row++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1;
    start = 0; cfg = '0;
    foreach (bad[i]) begin bad[i] = 0; got[i] = 0; end
    idx_beats_row = 0; y_sent_row = 0; b_row = 0; x_early = 0; y_early = 0; next_early = 0;
    strb_bad = 0; reads_open = 0;
    for (int r = 0; r < ROWS; r++) begin
      exp_q[0].push_back(exp_burst(P0, r * 108, 108));
      exp_q[1].push_back(exp_burst(P0 + 1, r * 216, 216));
      for (int g = 0; g < 6; g++) exp_q[2].push_back(exp_burst(P0 + 2, 8 * (r + g * STRIDE), 24));
      exp_q[3].push_back(exp_burst(P0 + 3, r * 8, 8));
      exp_strb.push_back(32'hFF << ((r * 8) % 32));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg.num_trans = ROWS; cfg.psch_init = P0; cfg.x_stride = STRIDE; cfg.mode = MODE_TRACE;
    start = 1; t0 = $time; @(negedge clk); start = 0;
    check(stat.busy, "busy after start");
    wait (stat.done);
    t1 = $time;
    repeat (2) @(posedge clk);
    check(got[0] == ROWS && bad[0] == 0, "indexes bursts");
    check(got[1] == ROWS && bad[1] == 0, "values bursts");
    check(got[2] == 6 * ROWS && bad[2] == 0, "x bursts");
    check(got[3] == ROWS && bad[3] == 0, "y writes");
    check(strb_bad == 0, "y write strobes cover its 8 bytes");
    check(x_early == 0, "x waits for the first index beat");
    check(y_early == 0, "y waits for every read of the row");
    check(next_early == 0, "next row waits for the y response");
    check(stat.rows == ROWS && !stat.busy, "row count");
    check(64'(stat.cycles) == 64'((t1 - t0) / 10), $sformatf("cycle count %0d vs %0d",
          stat.cycles, (t1 - t0) / 10));
    check(stat.errors == 0, "no errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
