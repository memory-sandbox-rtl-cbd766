// memory_sandbox: a bank of Configurable Pattern Generators (CPGs) that
// drive every AXI port of an HBM (32 ports, one per pseudo-channel) or a
// DDR4 subsystem (one or two ports) with configurable synthetic traffic, and
// measure the cycles, latency and errors of each run.
//
// Port p belongs to CPG p, which emulates one processor thread: sequential
// or pseudo-random reads and writes, configured at run time over its own
// AXI4-Lite register port (s_*[p]), which a control processor reaches through
// an interconnect. Every group of four ports (one HBM micro-switch) also has
// one SpMV trace generator. When the first CPG of a group is put in trace
// mode, the mode selectors of the four ports hand them to that generator,
// which then runs the indexes, values, x and y streams of a sparse
// matrix-vector product on them; its parameters are those of the first CPG,
// and its results are read back there. With fewer than four ports (DDR4)
// there is no trace generator.
//
// Design parameters, per CPG where a vector: IS_DDR (AXI4 512-bit for DDR4,
// else AXI3 256-bit for HBM), RAND_PSCH, RAND_WHOLE_ADDR, RAND_BANK_GROUP,
// RAND_BANK, RAND_COL, RAND_ROW, the mapping policy POLICY, the AXI ID width
// and the outstanding-burst limit. Each port uses AXI ID p.
//
// Interface: clk and active-low asynchronous rst_n shared by everything,
// since each generator runs on the clock of the memory it drives; the
// AXI4-Lite slaves and AXI masters as arrays indexed by port; trace_sel
// shows which ports are in trace mode.
//
// The grouping of trace generators by micro-switch and the hand-over through
// the first CPG of a group are choices of this design.
module memory_sandbox
  import ms_pkg::*;
#(
  parameter bit                  IS_DDR          = 1'b0,
  parameter int unsigned         NUM_CPG         = IS_DDR ? 2 : 32,
  parameter map_policy_e         POLICY          = IS_DDR ? POL_DDR_RCB : POL_HBM_RGBCG,
  parameter logic [NUM_CPG-1:0]  RAND_PSCH       = '1,
  parameter logic [NUM_CPG-1:0]  RAND_WHOLE_ADDR = '1,
  parameter logic [NUM_CPG-1:0]  RAND_BANK_GROUP = '0,
  parameter logic [NUM_CPG-1:0]  RAND_BANK       = '0,
  parameter logic [NUM_CPG-1:0]  RAND_COL        = '0,
  parameter logic [NUM_CPG-1:0]  RAND_ROW        = '0,
  parameter int unsigned         ID_W            = 6,
  parameter int unsigned         MAX_OUTSTANDING = 32,
  localparam int unsigned ADDR_W     = addr_w(IS_DDR),
  localparam int unsigned DATA_W     = data_w(IS_DDR),
  localparam int unsigned LEN_W      = len_w(IS_DDR),
  localparam int unsigned NUM_GROUPS = NUM_CPG / 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [NUM_CPG-1:0][7:0]          s_awaddr,
  input  logic [NUM_CPG-1:0]               s_awvalid,
  input  logic [NUM_CPG-1:0][31:0]         s_wdata,
  input  logic [NUM_CPG-1:0][3:0]          s_wstrb,
  input  logic [NUM_CPG-1:0]               s_wvalid,
  input  logic [NUM_CPG-1:0]               s_bready,
  input  logic [NUM_CPG-1:0][7:0]          s_araddr,
  input  logic [NUM_CPG-1:0]               s_arvalid,
  input  logic [NUM_CPG-1:0]               s_rready,
  output logic [NUM_CPG-1:0]               s_awready,
  output logic [NUM_CPG-1:0]               s_wready,
  output logic [NUM_CPG-1:0][1:0]          s_bresp,
  output logic [NUM_CPG-1:0]               s_bvalid,
  output logic [NUM_CPG-1:0]               s_arready,
  output logic [NUM_CPG-1:0][31:0]         s_rdata,
  output logic [NUM_CPG-1:0][1:0]          s_rresp,
  output logic [NUM_CPG-1:0]               s_rvalid,
  output logic [NUM_CPG-1:0][ID_W-1:0]     m_awid,
  output logic [NUM_CPG-1:0][ADDR_W-1:0]   m_awaddr,
  output logic [NUM_CPG-1:0][LEN_W-1:0]    m_awlen,
  output logic [NUM_CPG-1:0][2:0]          m_awsize,
  output logic [NUM_CPG-1:0][1:0]          m_awburst,
  output logic [NUM_CPG-1:0]               m_awvalid,
  output logic [NUM_CPG-1:0][ID_W-1:0]     m_wid,
  output logic [NUM_CPG-1:0][DATA_W-1:0]   m_wdata,
  output logic [NUM_CPG-1:0][DATA_W/8-1:0] m_wstrb,
  output logic [NUM_CPG-1:0]               m_wlast,
  output logic [NUM_CPG-1:0]               m_wvalid,
  output logic [NUM_CPG-1:0]               m_bready,
  output logic [NUM_CPG-1:0][ID_W-1:0]     m_arid,
  output logic [NUM_CPG-1:0][ADDR_W-1:0]   m_araddr,
  output logic [NUM_CPG-1:0][LEN_W-1:0]    m_arlen,
  output logic [NUM_CPG-1:0][2:0]          m_arsize,
  output logic [NUM_CPG-1:0][1:0]          m_arburst,
  output logic [NUM_CPG-1:0]               m_arvalid,
  output logic [NUM_CPG-1:0]               m_rready,
  input  logic [NUM_CPG-1:0]               m_awready,
  input  logic [NUM_CPG-1:0]               m_wready,
  input  logic [NUM_CPG-1:0][ID_W-1:0]     m_bid,
  input  logic [NUM_CPG-1:0][1:0]          m_bresp,
  input  logic [NUM_CPG-1:0]               m_bvalid,
  input  logic [NUM_CPG-1:0]               m_arready,
  input  logic [NUM_CPG-1:0][ID_W-1:0]     m_rid,
  input  logic [NUM_CPG-1:0][DATA_W-1:0]   m_rdata,
  input  logic [NUM_CPG-1:0][1:0]          m_rresp,
  input  logic [NUM_CPG-1:0]               m_rlast,
  input  logic [NUM_CPG-1:0]               m_rvalid,
  output logic [NUM_CPG-1:0]                trace_sel
);
  // Side a: the CPG engines; side b: the trace generator stream.
  logic [NUM_CPG-1:0][ID_W-1:0]     a_awid, b_awid;
  logic [NUM_CPG-1:0][ADDR_W-1:0]   a_awaddr, b_awaddr;
  logic [NUM_CPG-1:0][LEN_W-1:0]    a_awlen, b_awlen;
  logic [NUM_CPG-1:0][2:0]          a_awsize, b_awsize;
  logic [NUM_CPG-1:0][1:0]          a_awburst, b_awburst;
  logic [NUM_CPG-1:0]               a_awvalid, b_awvalid;
  logic [NUM_CPG-1:0][ID_W-1:0]     a_wid, b_wid;
  logic [NUM_CPG-1:0][DATA_W-1:0]   a_wdata, b_wdata;
  logic [NUM_CPG-1:0][DATA_W/8-1:0] a_wstrb, b_wstrb;
  logic [NUM_CPG-1:0]               a_wlast, b_wlast;
  logic [NUM_CPG-1:0]               a_wvalid, b_wvalid;
  logic [NUM_CPG-1:0]               a_bready, b_bready;
  logic [NUM_CPG-1:0][ID_W-1:0]     a_arid, b_arid;
  logic [NUM_CPG-1:0][ADDR_W-1:0]   a_araddr, b_araddr;
  logic [NUM_CPG-1:0][LEN_W-1:0]    a_arlen, b_arlen;
  logic [NUM_CPG-1:0][2:0]          a_arsize, b_arsize;
  logic [NUM_CPG-1:0][1:0]          a_arburst, b_arburst;
  logic [NUM_CPG-1:0]               a_arvalid, b_arvalid;
  logic [NUM_CPG-1:0]               a_rready, b_rready;
  logic [NUM_CPG-1:0]               a_awready, b_awready;
  logic [NUM_CPG-1:0]               a_wready, b_wready;
  logic [NUM_CPG-1:0][ID_W-1:0]     a_bid, b_bid;
  logic [NUM_CPG-1:0][1:0]          a_bresp, b_bresp;
  logic [NUM_CPG-1:0]               a_bvalid, b_bvalid;
  logic [NUM_CPG-1:0]               a_arready, b_arready;
  logic [NUM_CPG-1:0][ID_W-1:0]     a_rid, b_rid;
  logic [NUM_CPG-1:0][DATA_W-1:0]   a_rdata, b_rdata;
  logic [NUM_CPG-1:0][1:0]          a_rresp, b_rresp;
  logic [NUM_CPG-1:0]               a_rlast, b_rlast;
  logic [NUM_CPG-1:0]               a_rvalid, b_rvalid;

  cfg_t        cfg       [NUM_CPG];
  logic        start_tr  [NUM_CPG];
  logic        cpg_busy  [NUM_CPG];
  trace_stat_t trace_st  [NUM_CPG];

  for (genvar p = 0; p < NUM_CPG; p++) begin : g_port
    cpg #(
      .IS_DDR(IS_DDR), .POLICY(POLICY),
      .RAND_PSCH(RAND_PSCH[p]), .RAND_WHOLE_ADDR(RAND_WHOLE_ADDR[p]),
      .RAND_BANK_GROUP(RAND_BANK_GROUP[p]), .RAND_BANK(RAND_BANK[p]),
      .RAND_COL(RAND_COL[p]), .RAND_ROW(RAND_ROW[p]),
      .ID_W(ID_W), .ID(ID_W'(p)), .MAX_OUTSTANDING(MAX_OUTSTANDING),
      .SEED(64'h0123_4567_89AB_CDEF ^ (64'(p + 1) * 64'h0000_0001_0000_0193))
    ) u_cpg (
      .clk, .rst_n,
      .s_awaddr(s_awaddr[p]),
      .s_awvalid(s_awvalid[p]),
      .s_wdata(s_wdata[p]),
      .s_wstrb(s_wstrb[p]),
      .s_wvalid(s_wvalid[p]),
      .s_bready(s_bready[p]),
      .s_araddr(s_araddr[p]),
      .s_arvalid(s_arvalid[p]),
      .s_rready(s_rready[p]),
      .s_awready(s_awready[p]),
      .s_wready(s_wready[p]),
      .s_bresp(s_bresp[p]),
      .s_bvalid(s_bvalid[p]),
      .s_arready(s_arready[p]),
      .s_rdata(s_rdata[p]),
      .s_rresp(s_rresp[p]),
      .s_rvalid(s_rvalid[p]),
      .m_awid(a_awid[p]),
      .m_awaddr(a_awaddr[p]),
      .m_awlen(a_awlen[p]),
      .m_awsize(a_awsize[p]),
      .m_awburst(a_awburst[p]),
      .m_awvalid(a_awvalid[p]),
      .m_wid(a_wid[p]),
      .m_wdata(a_wdata[p]),
      .m_wstrb(a_wstrb[p]),
      .m_wlast(a_wlast[p]),
      .m_wvalid(a_wvalid[p]),
      .m_bready(a_bready[p]),
      .m_arid(a_arid[p]),
      .m_araddr(a_araddr[p]),
      .m_arlen(a_arlen[p]),
      .m_arsize(a_arsize[p]),
      .m_arburst(a_arburst[p]),
      .m_arvalid(a_arvalid[p]),
      .m_rready(a_rready[p]),
      .m_awready(a_awready[p]),
      .m_wready(a_wready[p]),
      .m_bid(a_bid[p]),
      .m_bresp(a_bresp[p]),
      .m_bvalid(a_bvalid[p]),
      .m_arready(a_arready[p]),
      .m_rid(a_rid[p]),
      .m_rdata(a_rdata[p]),
      .m_rresp(a_rresp[p]),
      .m_rlast(a_rlast[p]),
      .m_rvalid(a_rvalid[p]),
      .cfg_o(cfg[p]), .start_trace_o(start_tr[p]), .trace_i(trace_st[p]),
      .busy_o(cpg_busy[p])
    );

    mode_selector #(.IS_DDR(IS_DDR), .ID_W(ID_W), .MAX_OUTSTANDING(MAX_OUTSTANDING)) u_sel (
      .clk, .rst_n,
      .sel_req((p < 4 * NUM_GROUPS) && (cfg[(p / 4) * 4].mode == MODE_TRACE)),
      .sel(trace_sel[p]),
      .a_awid(a_awid[p]),
      .a_awaddr(a_awaddr[p]),
      .a_awlen(a_awlen[p]),
      .a_awsize(a_awsize[p]),
      .a_awburst(a_awburst[p]),
      .a_awvalid(a_awvalid[p]),
      .a_wid(a_wid[p]),
      .a_wdata(a_wdata[p]),
      .a_wstrb(a_wstrb[p]),
      .a_wlast(a_wlast[p]),
      .a_wvalid(a_wvalid[p]),
      .a_bready(a_bready[p]),
      .a_arid(a_arid[p]),
      .a_araddr(a_araddr[p]),
      .a_arlen(a_arlen[p]),
      .a_arsize(a_arsize[p]),
      .a_arburst(a_arburst[p]),
      .a_arvalid(a_arvalid[p]),
      .a_rready(a_rready[p]),
      .a_awready(a_awready[p]),
      .a_wready(a_wready[p]),
      .a_bid(a_bid[p]),
      .a_bresp(a_bresp[p]),
      .a_bvalid(a_bvalid[p]),
      .a_arready(a_arready[p]),
      .a_rid(a_rid[p]),
      .a_rdata(a_rdata[p]),
      .a_rresp(a_rresp[p]),
      .a_rlast(a_rlast[p]),
      .a_rvalid(a_rvalid[p]),
      .b_awid(b_awid[p]),
      .b_awaddr(b_awaddr[p]),
      .b_awlen(b_awlen[p]),
      .b_awsize(b_awsize[p]),
      .b_awburst(b_awburst[p]),
      .b_awvalid(b_awvalid[p]),
      .b_wid(b_wid[p]),
      .b_wdata(b_wdata[p]),
      .b_wstrb(b_wstrb[p]),
      .b_wlast(b_wlast[p]),
      .b_wvalid(b_wvalid[p]),
      .b_bready(b_bready[p]),
      .b_arid(b_arid[p]),
      .b_araddr(b_araddr[p]),
      .b_arlen(b_arlen[p]),
      .b_arsize(b_arsize[p]),
      .b_arburst(b_arburst[p]),
      .b_arvalid(b_arvalid[p]),
      .b_rready(b_rready[p]),
      .b_awready(b_awready[p]),
      .b_wready(b_wready[p]),
      .b_bid(b_bid[p]),
      .b_bresp(b_bresp[p]),
      .b_bvalid(b_bvalid[p]),
      .b_arready(b_arready[p]),
      .b_rid(b_rid[p]),
      .b_rdata(b_rdata[p]),
      .b_rresp(b_rresp[p]),
      .b_rlast(b_rlast[p]),
      .b_rvalid(b_rvalid[p]),
      .m_awid(m_awid[p]),
      .m_awaddr(m_awaddr[p]),
      .m_awlen(m_awlen[p]),
      .m_awsize(m_awsize[p]),
      .m_awburst(m_awburst[p]),
      .m_awvalid(m_awvalid[p]),
      .m_wid(m_wid[p]),
      .m_wdata(m_wdata[p]),
      .m_wstrb(m_wstrb[p]),
      .m_wlast(m_wlast[p]),
      .m_wvalid(m_wvalid[p]),
      .m_bready(m_bready[p]),
      .m_arid(m_arid[p]),
      .m_araddr(m_araddr[p]),
      .m_arlen(m_arlen[p]),
      .m_arsize(m_arsize[p]),
      .m_arburst(m_arburst[p]),
      .m_arvalid(m_arvalid[p]),
      .m_rready(m_rready[p]),
      .m_awready(m_awready[p]),
      .m_wready(m_wready[p]),
      .m_bid(m_bid[p]),
      .m_bresp(m_bresp[p]),
      .m_bvalid(m_bvalid[p]),
      .m_arready(m_arready[p]),
      .m_rid(m_rid[p]),
      .m_rdata(m_rdata[p]),
      .m_rresp(m_rresp[p]),
      .m_rlast(m_rlast[p]),
      .m_rvalid(m_rvalid[p])
    );

    if (p % 4 != 0 || p >= 4 * NUM_GROUPS) begin : g_no_trace_status
      assign trace_st[p] = '0;
    end
  end

  // One SpMV trace generator per group of four ports.
  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_trace
    logic [ID_W-1:0]   t_arid    [3];
    logic [ADDR_W-1:0] t_araddr  [3];
    logic [LEN_W-1:0]  t_arlen   [3];
    logic [2:0]        t_arsize  [3];
    logic [1:0]        t_arburst [3];
    logic              t_arvalid [3];
    logic              t_arready [3];
    logic [ID_W-1:0]   t_rid     [3];
    logic [DATA_W-1:0] t_rdata   [3];
    logic [1:0]        t_rresp   [3];
    logic              t_rlast   [3];
    logic              t_rvalid  [3];
    logic              t_rready  [3];

    spmv_trace_gen #(
      .IS_DDR(IS_DDR), .ID_W(ID_W), .ID(ID_W'(4 * g)), .MAX_OUTSTANDING(MAX_OUTSTANDING)
    ) u_trace (
      .clk, .rst_n, .start(start_tr[4 * g]), .cfg(cfg[4 * g]), .stat(trace_st[4 * g]),
      .arid(t_arid), .araddr(t_araddr), .arlen(t_arlen), .arsize(t_arsize),
      .arburst(t_arburst), .arvalid(t_arvalid), .arready(t_arready),
      .rid(t_rid), .rdata(t_rdata), .rresp(t_rresp), .rlast(t_rlast),
      .rvalid(t_rvalid), .rready(t_rready),
      .awid(b_awid[4*g+3]), .awaddr(b_awaddr[4*g+3]), .awlen(b_awlen[4*g+3]),
      .awsize(b_awsize[4*g+3]), .awburst(b_awburst[4*g+3]), .awvalid(b_awvalid[4*g+3]),
      .awready(b_awready[4*g+3]), .wid(b_wid[4*g+3]), .wdata(b_wdata[4*g+3]),
      .wstrb(b_wstrb[4*g+3]), .wlast(b_wlast[4*g+3]), .wvalid(b_wvalid[4*g+3]),
      .wready(b_wready[4*g+3]), .bid(b_bid[4*g+3]), .bresp(b_bresp[4*g+3]),
      .bvalid(b_bvalid[4*g+3]), .bready(b_bready[4*g+3])
    );

    // Streams 0..2 read, on the first three ports of the group.
    for (genvar s = 0; s < 3; s++) begin : g_rd_port
      assign b_arid[4*g+s]    = t_arid[s];
      assign b_araddr[4*g+s]  = t_araddr[s];
      assign b_arlen[4*g+s]   = t_arlen[s];
      assign b_arsize[4*g+s]  = t_arsize[s];
      assign b_arburst[4*g+s] = t_arburst[s];
      assign b_arvalid[4*g+s] = t_arvalid[s];
      assign b_rready[4*g+s]  = t_rready[s];
      assign t_arready[s]     = b_arready[4*g+s];
      assign t_rid[s]         = b_rid[4*g+s];
      assign t_rdata[s]       = b_rdata[4*g+s];
      assign t_rresp[s]       = b_rresp[4*g+s];
      assign t_rlast[s]       = b_rlast[4*g+s];
      assign t_rvalid[s]      = b_rvalid[4*g+s];
      // no writes on these ports
      assign b_awid[4*g+s]    = '0;
      assign b_awaddr[4*g+s]  = '0;
      assign b_awlen[4*g+s]   = '0;
      assign b_awsize[4*g+s]  = '0;
      assign b_awburst[4*g+s] = '0;
      assign b_awvalid[4*g+s] = 1'b0;
      assign b_wid[4*g+s]     = '0;
      assign b_wdata[4*g+s]   = '0;
      assign b_wstrb[4*g+s]   = '0;
      assign b_wlast[4*g+s]   = 1'b0;
      assign b_wvalid[4*g+s]  = 1'b0;
      assign b_bready[4*g+s]  = 1'b1;
    end

    // Stream 3 (y) writes only.
    assign b_arid[4*g+3]    = '0;
    assign b_araddr[4*g+3]  = '0;
    assign b_arlen[4*g+3]   = '0;
    assign b_arsize[4*g+3]  = '0;
    assign b_arburst[4*g+3] = '0;
    assign b_arvalid[4*g+3] = 1'b0;
    assign b_rready[4*g+3]  = 1'b1;
  end

  // Ports outside any group have no trace side.
  for (genvar p = 4 * NUM_GROUPS; p < NUM_CPG; p++) begin : g_idle_b
    assign b_awid[p] = 0;
    assign b_awaddr[p] = 0;
    assign b_awlen[p] = 0;
    assign b_awsize[p] = 0;
    assign b_awburst[p] = 0;
    assign b_awvalid[p] = 0;
    assign b_wid[p] = 0;
    assign b_wdata[p] = 0;
    assign b_wstrb[p] = 0;
    assign b_wlast[p] = 0;
    assign b_wvalid[p] = 0;
    assign b_bready[p] = 1;
    assign b_arid[p] = 0;
    assign b_araddr[p] = 0;
    assign b_arlen[p] = 0;
    assign b_arsize[p] = 0;
    assign b_arburst[p] = 0;
    assign b_arvalid[p] = 0;
    assign b_rready[p] = 1;
  end
endmodule
