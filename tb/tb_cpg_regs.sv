// Self-checking testbench of cpg_regs over its AXI4-Lite port: reset values,
// write and read-back of every run-time parameter, byte strobes, the start
// pulses (one cycle each, only for bits written as 1), the mode field, and
// read-back of the result registers from known perf_t and trace_stat_t
// inputs.
module tb_cpg_regs;
  import ms_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  cfg_t cfg;
  logic start_wr, start_rd, start_trace;
  perf_t wr_perf, rd_perf;
  trace_stat_t trace;
  int n_wr, n_rd, n_tr;

  cpg_regs dut (.clk, .rst_n, .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid),
    .s_rready(rready), .cfg, .start_wr, .start_rd, .start_trace, .wr_perf, .rd_perf, .trace);

  always @(posedge clk) if (rst_n) begin
    if (start_wr) n_wr++;
    if (start_rd) n_rd++;
    if (start_trace) n_tr++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    awaddr = a; wdata = d; wstrb = be; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!awready);
    #1 awvalid = 0; wvalid = 0;
    while (!bvalid) @(posedge clk);
    check(bresp == 2'b00, "write answered OKAY");
    @(posedge clk); #1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] d;
    awvalid = 0; wvalid = 0; arvalid = 0; bready = 1; rready = 1; awaddr = 0; araddr = 0;
    wdata = 0; wstrb = 0; n_wr = 0; n_rd = 0; n_tr = 0;
    wr_perf = '0; rd_perf = '0; trace = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    rd(REG_BURST, d);     check(d == 15, "reset burst size 16 beats");
    rd(REG_NTRANS_LO, d); check(d == 1, "reset Num_trans 1");
    rd(REG_CTRL, d);      check(d == 0, "reset mode sequential");
    wr(REG_BURST, 32'd7);            rd(REG_BURST, d);     check(d == 7, "burst");
    wr(REG_NTRANS_LO, 32'hDEAD_BEEF);
    wr(REG_NTRANS_HI, 32'h1);        check(cfg.num_trans == 33'h1_DEAD_BEEF, "Num_trans 33 bits");
    rd(REG_NTRANS_HI, d);            check(d == 1, "Num_trans high bit read back");
    wr(REG_PSCH_INIT, 32'd4);        wr(REG_PSCH_END, 32'd11);
    check(cfg.psch_init == 4 && cfg.psch_end == 11, "pseudo-channel range");
    wr(REG_XSTRIDE, 32'h1234);
    wr(REG_XSTRIDE, 32'h0000_AB00, 4'b0010);
    rd(REG_XSTRIDE, d);              check(d == 32'hAB34, "byte strobe keeps the other byte");
    wr(REG_CTRL, 32'h13);            // start write and read, random mode
    check(n_wr == 1 && n_rd == 1 && n_tr == 0, $sformatf("start pulses, once each (%0d %0d %0d)", n_wr, n_rd, n_tr));
    check(cfg.mode == MODE_RAND, "mode random");
    check(!start_wr && !start_rd, "start pulses last one cycle");
    wr(REG_CTRL, 32'h24);            // start trace, trace mode
    check(n_tr == 1 && n_wr == 1 && cfg.mode == MODE_TRACE, "trace start and mode");
    wr_perf.cycles = 64'h0000_0005_0000_0010; wr_perf.latency = 14; wr_perf.errors = 2;
    wr_perf.beats = 64'd4096; wr_perf.done = 1;
    rd_perf.cycles = 64'd777; rd_perf.latency = 48; rd_perf.busy = 1; rd_perf.beats = 64'd99;
    trace.cycles = 64'd4242; trace.rows = 17; trace.done = 1; trace.errors = 3;
    rd(REG_WR_CYC_LO, d); check(d == 32'h10, "write cycles low");
    rd(REG_WR_CYC_HI, d); check(d == 5, "write cycles high");
    rd(REG_RD_CYC_LO, d); check(d == 777, "read cycles");
    rd(REG_WR_LAT, d);    check(d == 14, "write latency");
    rd(REG_RD_LAT, d);    check(d == 48, "read latency");
    rd(REG_WR_ERR, d);    check(d == 2, "write errors");
    rd(REG_WR_BEATS, d);  check(d == 4096, "write beats");
    rd(REG_RD_BEATS, d);  check(d == 99, "read beats");
    rd(REG_STATUS, d);    check(d == 32'b10_0110, "status bits");
    rd(REG_TR_CYC_LO, d); check(d == 4242, "trace cycles");
    rd(REG_TR_ROWS, d);   check(d == 17, "trace rows");
    rd(REG_TR_ERR, d);    check(d == 3, "trace errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
