// Self-checking testbench of one Configurable Pattern Generator on a
// behavioural HBM port (48-cycle read, 14-cycle write latency, 22 requests
// admitted), programmed over AXI4-Lite as software would:
//   1. sequential write run, 50 bursts of 16 beats in pseudo-channel 5:
//      addresses, beat count, write latency 17 (14, or the 16 data beats
//      plus one), and a run of at most
//      800 + 14 + 4 cycles (the port stays saturated);
//   2. sequential read run, same size: read latency 48, at most 800 + 48 + 4
//      cycles, and the 22 requests the memory admits all in use;
//   3. reads and writes started together, in pseudo-random mode over
//      pseudo-channels 2..9 with one-beat bursts: every address aligned and
//      inside the range, many distinct addresses, latencies 14 and 48;
//   4. error responses counted in the error registers;
//   5. trace mode: the start bit is handed to the trace generator;
//   6. a second generator built for DDR4 (IS_DDR=1: 34-bit address, 512-bit
//      data, 256-beat bursts) on a port with the DDR4 latencies of 5 (write)
//      and 24 (read) cycles: 4 sequential bursts of 256 beats each way,
//      addresses 16 KB apart, latencies 257 (the 256 data beats plus one)
//      and 24, a saturated read run, then pseudo-random one-beat reads
//      aligned to 64 bytes over the whole bank.
// The AXI4-Lite bus is shared: ddr_sel routes it to one generator or the
// other.
module tb_cpg;
  import ms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_arvalid, s_arready, s_rvalid;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  logic [5:0] awid, wid, bid, arid, rid;
  logic [32:0] awaddr, araddr;
  logic [3:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [255:0] wdata, rdata;
  logic [31:0] wstrb;
  cfg_t cfg_o;
  logic start_trace_o, busy_o, inject_err;
  trace_stat_t trace_i;

  // AXI4-Lite routing between the HBM generator (dut) and the DDR4 one (dut_ddr)
  logic ddr_sel = 1'b0;
  logic h_awready, h_wready, h_bvalid, h_arready, h_rvalid;
  logic d_awready, d_wready, d_bvalid, d_arready, d_rvalid;
  logic [1:0] h_bresp, h_rresp, d_bresp, d_rresp;
  logic [31:0] h_rdata, d_rdata;
  assign s_awready = ddr_sel ? d_awready : h_awready;
  assign s_wready  = ddr_sel ? d_wready  : h_wready;
  assign s_bvalid  = ddr_sel ? d_bvalid  : h_bvalid;
  assign s_bresp   = ddr_sel ? d_bresp   : h_bresp;
  assign s_arready = ddr_sel ? d_arready : h_arready;
  assign s_rvalid  = ddr_sel ? d_rvalid  : h_rvalid;
  assign s_rresp   = ddr_sel ? d_rresp   : h_rresp;
  assign s_rdata   = ddr_sel ? d_rdata   : h_rdata;

  cpg #(.ID(6'd3)) dut (.clk, .rst_n,
    .s_awaddr, .s_awvalid(s_awvalid && !ddr_sel), .s_awready(h_awready), .s_wdata, .s_wstrb,
    .s_wvalid(s_wvalid && !ddr_sel), .s_wready(h_wready), .s_bresp(h_bresp),
    .s_bvalid(h_bvalid), .s_bready(1'b1), .s_araddr, .s_arvalid(s_arvalid && !ddr_sel),
    .s_arready(h_arready), .s_rdata(h_rdata), .s_rresp(h_rresp),
    .s_rvalid(h_rvalid), .s_rready(1'b1),
    .m_awid(awid), .m_awaddr(awaddr), .m_awlen(awlen), .m_awsize(awsize),
    .m_awburst(awburst), .m_awvalid(awvalid), .m_awready(awready), .m_wid(wid),
    .m_wdata(wdata), .m_wstrb(wstrb), .m_wlast(wlast), .m_wvalid(wvalid),
    .m_wready(wready), .m_bid(bid), .m_bresp(bresp), .m_bvalid(bvalid), .m_bready(bready),
    .m_arid(arid), .m_araddr(araddr), .m_arlen(arlen), .m_arsize(arsize),
    .m_arburst(arburst), .m_arvalid(arvalid), .m_arready(arready), .m_rid(rid),
    .m_rdata(rdata), .m_rresp(rresp), .m_rlast(rlast), .m_rvalid(rvalid),
    .m_rready(rready), .cfg_o, .start_trace_o, .trace_i, .busy_o);

  int unsigned rdb, wrb, rdt, wrt, mro, mwo;
  hbm_port_model mem (.clk, .rst_n, .inject_err, .awid, .awaddr, .awlen, .awvalid,
    .awready, .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arvalid, .arready, .rid, .rdata, .rresp, .rlast, .rvalid,
    .rready, .rd_bursts(rdb), .wr_bursts(wrb), .wr_beats_total(wrt), .rd_beats_total(rdt),
    .max_rd_out(mro), .max_wr_out(mwo));

  // DDR4 generator and port
  logic [5:0] dawid, dwid, dbid, darid, drid;
  logic [33:0] dawaddr, daraddr;
  logic [7:0] dawlen, darlen;
  logic [2:0] dawsize, darsize;
  logic [1:0] dawburst, darburst, dbresp, drresp;
  logic dawvalid, dawready, dwlast, dwvalid, dwready, dbvalid, dbready;
  logic darvalid, darready, drlast, drvalid, drready;
  logic [511:0] dwdata, drdata;
  logic [63:0] dwstrb;
  cfg_t dcfg_o;
  logic dstart_trace_o, dbusy_o;

  cpg #(.IS_DDR(1'b1), .ID(6'd1)) dut_ddr (.clk, .rst_n,
    .s_awaddr, .s_awvalid(s_awvalid && ddr_sel), .s_awready(d_awready), .s_wdata, .s_wstrb,
    .s_wvalid(s_wvalid && ddr_sel), .s_wready(d_wready), .s_bresp(d_bresp),
    .s_bvalid(d_bvalid), .s_bready(1'b1), .s_araddr, .s_arvalid(s_arvalid && ddr_sel),
    .s_arready(d_arready), .s_rdata(d_rdata), .s_rresp(d_rresp),
    .s_rvalid(d_rvalid), .s_rready(1'b1),
    .m_awid(dawid), .m_awaddr(dawaddr), .m_awlen(dawlen), .m_awsize(dawsize),
    .m_awburst(dawburst), .m_awvalid(dawvalid), .m_awready(dawready), .m_wid(dwid),
    .m_wdata(dwdata), .m_wstrb(dwstrb), .m_wlast(dwlast), .m_wvalid(dwvalid),
    .m_wready(dwready), .m_bid(dbid), .m_bresp(dbresp), .m_bvalid(dbvalid), .m_bready(dbready),
    .m_arid(darid), .m_araddr(daraddr), .m_arlen(darlen), .m_arsize(darsize),
    .m_arburst(darburst), .m_arvalid(darvalid), .m_arready(darready), .m_rid(drid),
    .m_rdata(drdata), .m_rresp(drresp), .m_rlast(drlast), .m_rvalid(drvalid),
    .m_rready(drready), .cfg_o(dcfg_o), .start_trace_o(dstart_trace_o), .trace_i('0),
    .busy_o(dbusy_o));

  int unsigned drdb, dwrb, drdt, dwrt, dmro, dmwo;
  hbm_port_model #(.ADDR_W(34), .DATA_W(512), .LEN_W(8), .RD_LAT(24), .WR_LAT(5)) mem_ddr (
    .clk, .rst_n, .inject_err(1'b0), .awid(dawid), .awaddr(dawaddr), .awlen(dawlen),
    .awvalid(dawvalid), .awready(dawready), .wdata(dwdata), .wstrb(dwstrb), .wlast(dwlast),
    .wvalid(dwvalid), .wready(dwready), .bid(dbid), .bresp(dbresp), .bvalid(dbvalid),
    .bready(dbready), .arid(darid), .araddr(daraddr), .arlen(darlen), .arvalid(darvalid),
    .arready(darready), .rid(drid), .rdata(drdata), .rresp(drresp), .rlast(drlast),
    .rvalid(drvalid), .rready(drready), .rd_bursts(drdb), .wr_bursts(dwrb),
    .wr_beats_total(dwrt), .rd_beats_total(drdt), .max_rd_out(dmro), .max_wr_out(dmwo));

  int daw_n, dar_n, daw_bad, dar_bad, d_misaligned, d_distinct;
  logic [33:0] d_last_ar;
  logic d_random;
  always @(posedge clk) if (rst_n) begin
    if (dawvalid && dawready) begin
      if (dawaddr != 34'(daw_n * 16384) || dawlen != 8'd255) daw_bad++;
      daw_n++;
    end
    if (darvalid && darready) begin
      if (!d_random && (daraddr != 34'(dar_n * 16384) || darlen != 8'd255)) dar_bad++;
      if (d_random) begin
        if (daraddr[5:0] != 0 || darlen != 0) d_misaligned++;
        if (daraddr != d_last_ar) d_distinct++;
      end
      d_last_ar = daraddr;
      dar_n++;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    s_awaddr = a; s_wdata = d; s_wstrb = 4'hF; s_awvalid = 1; s_wvalid = 1;
    do @(posedge clk); while (!s_awready);
    #1 s_awvalid = 0; s_wvalid = 0;
    @(posedge clk); #1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    #1 s_arvalid = 0;
    while (!s_rvalid) @(posedge clk);
    d = s_rdata;
    @(posedge clk); #1;
  endtask

  task automatic wait_status(input logic [31:0] mask);
    logic [31:0] d;
    do rd(REG_STATUS, d); while ((d & mask) != mask);
  endtask

  // address monitor
  int aw_n, ar_n, aw_bad, ar_bad, out_of_range, misaligned, distinct, n_trace;
  logic [32:0] last_ar;
  logic random_phase;
  always @(posedge clk) if (rst_n) begin
    if (start_trace_o) n_trace++;
    if (awvalid && awready) begin
      if (!random_phase && awaddr != {5'd5, 28'(aw_n * 512)}) aw_bad++;
      if (awid != 6'd3) aw_bad++;
      aw_n++;
    end
    if (arvalid && arready) begin
      if (!random_phase && araddr != {5'd5, 28'(ar_n * 512)}) ar_bad++;
      if (random_phase) begin
        if (araddr[32:28] < 2 || araddr[32:28] > 9) out_of_range++;
        if (araddr[4:0] != 0) misaligned++;
        if (araddr != last_ar) distinct++;
      end
      last_ar = araddr;
      ar_n++;
    end
  end

  initial begin
    logic [31:0] d;
    s_awvalid = 0; s_wvalid = 0; s_arvalid = 0; s_awaddr = 0; s_araddr = 0; s_wdata = 0;
    s_wstrb = 0; inject_err = 0; trace_i = '0; random_phase = 0;
    aw_n = 0; ar_n = 0; aw_bad = 0; ar_bad = 0; out_of_range = 0; misaligned = 0;
    distinct = 0; n_trace = 0; last_ar = '0;
    daw_n = 0; dar_n = 0; daw_bad = 0; dar_bad = 0; d_misaligned = 0; d_distinct = 0;
    d_last_ar = '0; d_random = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // 1. sequential writes
    wr(REG_BURST, 15); wr(REG_NTRANS_LO, 50); wr(REG_PSCH_INIT, 5); wr(REG_PSCH_END, 5);
    wr(REG_CTRL, 32'h01);
    wait_status(32'h4);
    rd(REG_WR_BEATS, d);  check(d == 800, $sformatf("write beats %0d", d));
    // 16 data beats outlast the 14-cycle write latency: the response follows the last beat
    rd(REG_WR_LAT, d);    check(d == 17, $sformatf("write latency %0d", d));
    rd(REG_WR_CYC_LO, d); check(d >= 800 && d <= 800 + 14 + 4, $sformatf("write cycles %0d", d));
    check(aw_n == 50 && aw_bad == 0, "sequential write addresses in pseudo-channel 5");
    check(wrt == 800, "memory received 800 beats");
    // 2. sequential reads
    wr(REG_CTRL, 32'h02);
    wait_status(32'h8);
    rd(REG_RD_BEATS, d);  check(d == 800, $sformatf("read beats %0d", d));
    rd(REG_RD_LAT, d);    check(d == 48, $sformatf("read latency %0d", d));
    rd(REG_RD_CYC_LO, d); check(d >= 800 && d <= 800 + 48 + 4, $sformatf("read cycles %0d", d));
    check(ar_n == 50 && ar_bad == 0, "sequential read addresses in pseudo-channel 5");
    check(mro == 22, $sformatf("22 outstanding reads admitted (%0d)", mro));
    rd(REG_RD_ERR, d);    check(d == 0, "no read errors");
    // 3. pseudo-random, reads and writes together
    random_phase = 1;
    wr(REG_BURST, 0); wr(REG_NTRANS_LO, 200); wr(REG_PSCH_INIT, 2); wr(REG_PSCH_END, 9);
    wr(REG_CTRL, 32'h13);
    wait_status(32'hC);
    check(busy_o == 0, "both directions finished");
    rd(REG_RD_BEATS, d);  check(d == 200, "random read beats");
    rd(REG_WR_BEATS, d);  check(d == 200, "random write beats");
    check(out_of_range == 0 && misaligned == 0, "random addresses aligned, in range");
    rd(REG_WR_LAT, d);    check(d == 14, $sformatf("one-beat write latency %0d", d));
    rd(REG_RD_LAT, d);    check(d == 48, $sformatf("one-beat read latency %0d", d));
    check(distinct >= 195, $sformatf("random addresses differ (%0d)", distinct));
    // 4. errors
    inject_err = 1;
    wr(REG_NTRANS_LO, 10);
    wr(REG_CTRL, 32'h13);
    wait_status(32'hC);
    rd(REG_RD_ERR, d); check(d == 10, $sformatf("read errors %0d", d));
    rd(REG_WR_ERR, d); check(d == 10, $sformatf("write errors %0d", d));
    inject_err = 0;
    // 5. trace hand-off
    wr(REG_CTRL, 32'h24);
    check(n_trace == 1 && cfg_o.mode == MODE_TRACE, "trace start handed on");
    trace_i.done = 1; trace_i.rows = 7;
    rd(REG_TR_ROWS, d); check(d == 7, "trace status readable");
    wr(REG_CTRL, 32'h21);   // start write in trace mode: ignored
    repeat (5) @(posedge clk);
    check(!busy_o, "engines stay idle in trace mode");
    // 6. DDR4 build: 256-beat bursts of 64 bytes per beat
    ddr_sel = 1'b1;
    @(posedge clk); #1;
    wr(REG_BURST, 255); wr(REG_NTRANS_LO, 4);
    wr(REG_CTRL, 32'h01);
    wait_status(32'h4);
    rd(REG_WR_BEATS, d);  check(d == 1024, $sformatf("DDR4 write beats %0d", d));
    rd(REG_WR_LAT, d);    check(d == 257, $sformatf("DDR4 write latency %0d", d));
    rd(REG_WR_CYC_LO, d); check(d >= 1024 && d <= 1024 + 5 + 4, $sformatf("DDR4 write cycles %0d", d));
    check(daw_n == 4 && daw_bad == 0, "DDR4 write addresses 16 KB apart");
    check(dwrt == 1024, "DDR4 port received 1024 beats");
    wr(REG_CTRL, 32'h02);
    wait_status(32'h8);
    rd(REG_RD_BEATS, d);  check(d == 1024, $sformatf("DDR4 read beats %0d", d));
    rd(REG_RD_LAT, d);    check(d == 24, $sformatf("DDR4 read latency %0d", d));
    rd(REG_RD_CYC_LO, d); check(d >= 1024 && d <= 1024 + 24 + 4, $sformatf("DDR4 read cycles %0d", d));
    check(dar_n == 4 && dar_bad == 0, "DDR4 read addresses 16 KB apart");
    d_random = 1;
    wr(REG_BURST, 0); wr(REG_NTRANS_LO, 100);
    wr(REG_CTRL, 32'h12);
    wait_status(32'h8);
    rd(REG_RD_BEATS, d);  check(d == 100, $sformatf("DDR4 random read beats %0d", d));
    check(d_misaligned == 0, "DDR4 random addresses aligned to 64 bytes");
    check(d_distinct >= 95, $sformatf("DDR4 random addresses differ (%0d)", d_distinct));
    ddr_sel = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
