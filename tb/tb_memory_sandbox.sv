// End-to-end testbench of memory_sandbox at its default size: 32 pattern
// generators on 32 behavioural HBM ports. Port p's model has the read and
// write latency of HBM pseudo-channel group p/4 (14..37 write, 48..73 read
// cycles) and admits 22 requests. A control-processor model programs every
// generator over its AXI4-Lite port and runs:
//   A. all 32 generators at once, sequential writes and reads of 40 bursts
//      of 16 beats in their own pseudo-channel: beat counts, latencies
//      against the port's latency, saturation of the 22 requests;
//   B. generators 0..3 pseudo-random across pseudo-channels 0..31 with
//      one-beat bursts: addresses spread over many pseudo-channels;
//   C. group 1 switched to trace mode while generator 5 still runs a long
//      read: the switch must wait for it; then 4 SpMV rows run on ports 4..7;
//   D. error responses on port 9 counted by its generator.
// Every mechanism must occur at least once: sequential run, random run,
// concurrent read and write, outstanding saturation, deferred mode switch,
// trace rows, error count.
module tb_memory_sandbox;
  import ms_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-1:0][7:0]  s_awaddr, s_araddr;
  logic [N-1:0]       s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic [N-1:0]       s_arvalid, s_arready, s_rvalid, s_rready;
  logic [N-1:0][31:0] s_wdata, s_rdata;
  logic [N-1:0][3:0]  s_wstrb;
  logic [N-1:0][1:0]  s_bresp, s_rresp;
  logic [N-1:0][5:0]  m_awid, m_wid, m_bid, m_arid, m_rid;
  logic [N-1:0][32:0] m_awaddr, m_araddr;
  logic [N-1:0][3:0]  m_awlen, m_arlen;
  logic [N-1:0][2:0]  m_awsize, m_arsize;
  logic [N-1:0][1:0]  m_awburst, m_arburst, m_bresp, m_rresp;
  logic [N-1:0]       m_awvalid, m_awready, m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [N-1:0]       m_arvalid, m_arready, m_rlast, m_rvalid, m_rready;
  logic [N-1:0][255:0] m_wdata, m_rdata;
  logic [N-1:0][31:0] m_wstrb;
  logic [N-1:0]       trace_sel;
  logic [N-1:0]       inject_err;

  memory_sandbox dut (.clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_wdata, .s_wstrb, .s_wvalid, .s_bready, .s_araddr, .s_arvalid,
    .s_rready, .s_awready, .s_wready, .s_bresp, .s_bvalid, .s_arready, .s_rdata, .s_rresp,
    .s_rvalid,
    .m_awid, .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_wid, .m_wdata,
    .m_wstrb, .m_wlast, .m_wvalid, .m_bready, .m_arid, .m_araddr, .m_arlen, .m_arsize,
    .m_arburst, .m_arvalid, .m_rready, .m_awready, .m_wready, .m_bid, .m_bresp, .m_bvalid,
    .m_arready, .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .trace_sel);

  // Read and write latency of each group of four pseudo-channels.
  localparam int WLAT [8] = '{14, 16, 18, 20, 31, 33, 35, 37};
  localparam int RLAT [8] = '{48, 50, 52, 54, 67, 69, 71, 73};

  int unsigned st [N][6];
  for (genvar p = 0; p < N; p++) begin : g_mem
    hbm_port_model #(.RD_LAT(RLAT[p / 4]), .WR_LAT(WLAT[p / 4])) m (.clk, .rst_n,
      .inject_err(inject_err[p]),
      .awid(m_awid[p]), .awaddr(m_awaddr[p]), .awlen(m_awlen[p]), .awvalid(m_awvalid[p]),
      .awready(m_awready[p]), .wdata(m_wdata[p]), .wstrb(m_wstrb[p]), .wlast(m_wlast[p]),
      .wvalid(m_wvalid[p]), .wready(m_wready[p]), .bid(m_bid[p]), .bresp(m_bresp[p]),
      .bvalid(m_bvalid[p]), .bready(m_bready[p]), .arid(m_arid[p]), .araddr(m_araddr[p]),
      .arlen(m_arlen[p]), .arvalid(m_arvalid[p]), .arready(m_arready[p]), .rid(m_rid[p]),
      .rdata(m_rdata[p]), .rresp(m_rresp[p]), .rlast(m_rlast[p]), .rvalid(m_rvalid[p]),
      .rready(m_rready[p]), .rd_bursts(st[p][0]), .wr_bursts(st[p][1]),
      .wr_beats_total(st[p][2]), .rd_beats_total(st[p][3]), .max_rd_out(st[p][4]),
      .max_wr_out(st[p][5]));
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AXI4-Lite accesses of the control processor; several may run in parallel
  // on different ports.
  task automatic wr(input int p, input logic [7:0] a, input logic [31:0] d);
    s_awaddr[p] = a; s_wdata[p] = d; s_wstrb[p] = 4'hF; s_awvalid[p] = 1; s_wvalid[p] = 1;
    do @(posedge clk); while (!s_awready[p]);
    #1 s_awvalid[p] = 0; s_wvalid[p] = 0;
    @(posedge clk); #1;
  endtask

  task automatic rd(input int p, input logic [7:0] a, output logic [31:0] d);
    s_araddr[p] = a; s_arvalid[p] = 1;
    do @(posedge clk); while (!s_arready[p]);
    #1 s_arvalid[p] = 0;
    while (!s_rvalid[p]) @(posedge clk);
    d = s_rdata[p];
    @(posedge clk); #1;
  endtask

  task automatic wait_status(input int p, input logic [31:0] mask);
    logic [31:0] d;
    do rd(p, REG_STATUS, d); while ((d & mask) != mask);
  endtask

  // Mechanism counters
  int n_seq, n_rand, n_conc, n_sat, n_defer, n_rows, n_err;
  int rand_psch_seen [32];
  logic rand_watch;
  always @(posedge clk) if (rst_n && rand_watch)
    for (int p = 0; p < 4; p++)
      if (m_arvalid[p] && m_arready[p]) rand_psch_seen[m_araddr[p][32:28]]++;

  initial begin
    logic [31:0] d;
    int spread;
    s_awvalid = '0; s_wvalid = '0; s_arvalid = '0; s_bready = '1; s_rready = '1;
    s_awaddr = '0; s_araddr = '0; s_wdata = '0; s_wstrb = '0; inject_err = '0;
    n_seq = 0; n_rand = 0; n_conc = 0; n_sat = 0; n_defer = 0; n_rows = 0; n_err = 0;
    rand_watch = 0;
    foreach (rand_psch_seen[i]) rand_psch_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // A. every generator, sequential, reads and writes at once
    for (int p = 0; p < N; p++) begin
      automatic int q = p;
      fork begin
        wr(q, REG_BURST, 15); wr(q, REG_NTRANS_LO, 40);
        wr(q, REG_PSCH_INIT, q); wr(q, REG_PSCH_END, q);
        wr(q, REG_CTRL, 32'h03);
      end join_none
    end
    wait fork;
    for (int p = 0; p < N; p++) begin
      automatic int q = p;
      fork begin
        logic [31:0] v;
        wait_status(q, 32'hC);
        rd(q, REG_RD_BEATS, v);
        check(v == 640, $sformatf("port %0d read beats %0d", q, v));
        rd(q, REG_WR_BEATS, v);
        check(v == 640, $sformatf("port %0d write beats %0d", q, v));
        rd(q, REG_RD_LAT, v);
        check(v == RLAT[q / 4], $sformatf("port %0d read latency %0d", q, v));
        rd(q, REG_WR_LAT, v);
        check(v == ((WLAT[q / 4] > 17) ? WLAT[q / 4] : 17),
              $sformatf("port %0d write latency %0d", q, v));
        rd(q, REG_RD_CYC_LO, v);
        check(v <= 640 + RLAT[q / 4] + 4, $sformatf("port %0d read cycles %0d", q, v));
      end join_none
    end
    wait fork;
    for (int p = 0; p < N; p++) begin
      check(st[p][0] == 40 && st[p][1] == 40, $sformatf("port %0d bursts", p));
      if (st[p][4] == 22) n_sat++;
    end
    n_seq++; n_conc++;

    // B. random across all pseudo-channels on ports 0..3
    rand_watch = 1;
    for (int p = 0; p < 4; p++) begin
      automatic int q = p;
      fork begin
        wr(q, REG_BURST, 0); wr(q, REG_NTRANS_LO, 100);
        wr(q, REG_PSCH_INIT, 0); wr(q, REG_PSCH_END, 31);
        wr(q, REG_CTRL, 32'h12);
        wait_status(q, 32'h8);
      end join_none
    end
    wait fork;
    rand_watch = 0;
    spread = 0;
    foreach (rand_psch_seen[i]) if (rand_psch_seen[i] > 0) spread++;
    check(spread >= 28, $sformatf("random reads reach %0d pseudo-channels", spread));
    if (spread > 1) n_rand++;

    // C. trace mode on group 1 while port 5 is busy
    wr(5, REG_BURST, 15); wr(5, REG_NTRANS_LO, 200); wr(5, REG_CTRL, 32'h02);
    wr(4, REG_NTRANS_LO, 4); wr(4, REG_PSCH_INIT, 4); wr(4, REG_XSTRIDE, 16);
    wr(4, REG_CTRL, 32'h20);      // trace mode requested
    repeat (10) @(posedge clk);
    check(trace_sel[4] && !trace_sel[5], "idle ports switch, the busy one waits");
    if (!trace_sel[5]) n_defer++;
    wait_status(5, 32'h8);
    repeat (4) @(posedge clk);
    check(trace_sel[7:4] == 4'hF, "group 1 in trace mode");
    wr(4, REG_CTRL, 32'h24);      // start the trace
    wait_status(4, 32'h20);
    rd(4, REG_TR_ROWS, d);
    check(d == 4, $sformatf("trace rows %0d", d));
    n_rows = d;
    check(st[7][1] == 40 + 4, "y writes on port 7");
    check(st[4][0] == 40 + 4 && st[5][0] == 40 + 200 + 4, "indexes and values reads on ports 4, 5");
    check(st[6][0] == 40 + 24, "x reads on port 6");
    rd(4, REG_TR_ERR, d);
    check(d == 0, "no trace errors");
    wr(4, REG_CTRL, 32'h00);      // back to sequential
    repeat (4) @(posedge clk);
    check(trace_sel[7:4] == 4'h0, "group 1 back to its generators");

    // D. errors on port 9
    inject_err[9] = 1;
    wr(9, REG_BURST, 0); wr(9, REG_NTRANS_LO, 5); wr(9, REG_CTRL, 32'h03);
    wait_status(9, 32'hC);
    rd(9, REG_RD_ERR, d); check(d == 5, $sformatf("port 9 read errors %0d", d));
    n_err = d;
    rd(9, REG_WR_ERR, d); check(d == 5, $sformatf("port 9 write errors %0d", d));
    inject_err[9] = 0;

    $display("mechanisms: sequential=%0d random=%0d concurrent=%0d saturated_ports=%0d deferred_switch=%0d trace_rows=%0d errors=%0d",
             n_seq, n_rand, n_conc, n_sat, n_defer, n_rows, n_err);
    check(n_seq > 0, "sequential run happened");
    check(n_rand > 0, "random run happened");
    check(n_conc > 0, "concurrent read and write happened");
    check(n_sat > 0, "outstanding requests saturated a port");
    check(n_defer > 0, "a mode switch was deferred");
    check(n_rows > 0, "trace rows ran");
    check(n_err > 0, "error responses counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
