// Mode selector of one memory AXI port: connects either the pattern
// generator's own engines (side a: sequential and pseudo-random modes) or a
// stream of the group's SpMV trace generator (side b: trace mode) to the
// port (side m).
//
// The requested selection sel_req is taken over only when the port is quiet:
// no burst outstanding (addresses accepted but not yet answered), no write
// data pending and no address or data valid on the side now connected. A
// switch can thus never cut a burst in half or drop a response. While a side
// is not connected it sees every ready and valid from the port low, so its
// engines simply wait.
//
// Interface: two AXI master inputs, one AXI master output, the request and
// the selection in force (sel, 1 = side b).
// Timing: the mux is combinational; sel changes one cycle after the port
// became quiet with sel_req differing from sel.
//
// Deferring the switch until the port is quiet and the counter width are
// choices of this design.
module mode_selector
  import ms_pkg::*;
#(
  parameter bit          IS_DDR          = 1'b0,
  parameter int unsigned ID_W            = 6,
  parameter int unsigned MAX_OUTSTANDING = 32,
  localparam int unsigned ADDR_W = addr_w(IS_DDR),
  localparam int unsigned DATA_W = data_w(IS_DDR),
  localparam int unsigned LEN_W  = len_w(IS_DDR)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sel_req,
  output logic                sel,
  input  logic [ID_W-1:0]      a_awid,
  input  logic [ADDR_W-1:0]    a_awaddr,
  input  logic [LEN_W-1:0]     a_awlen,
  input  logic [2:0]           a_awsize,
  input  logic [1:0]           a_awburst,
  input  logic                 a_awvalid,
  input  logic [ID_W-1:0]      a_wid,
  input  logic [DATA_W-1:0]    a_wdata,
  input  logic [DATA_W/8-1:0]  a_wstrb,
  input  logic                 a_wlast,
  input  logic                 a_wvalid,
  input  logic                 a_bready,
  input  logic [ID_W-1:0]      a_arid,
  input  logic [ADDR_W-1:0]    a_araddr,
  input  logic [LEN_W-1:0]     a_arlen,
  input  logic [2:0]           a_arsize,
  input  logic [1:0]           a_arburst,
  input  logic                 a_arvalid,
  input  logic                 a_rready,
  output logic                 a_awready,
  output logic                 a_wready,
  output logic [ID_W-1:0]      a_bid,
  output logic [1:0]           a_bresp,
  output logic                 a_bvalid,
  output logic                 a_arready,
  output logic [ID_W-1:0]      a_rid,
  output logic [DATA_W-1:0]    a_rdata,
  output logic [1:0]           a_rresp,
  output logic                 a_rlast,
  output logic                 a_rvalid,
  input  logic [ID_W-1:0]      b_awid,
  input  logic [ADDR_W-1:0]    b_awaddr,
  input  logic [LEN_W-1:0]     b_awlen,
  input  logic [2:0]           b_awsize,
  input  logic [1:0]           b_awburst,
  input  logic                 b_awvalid,
  input  logic [ID_W-1:0]      b_wid,
  input  logic [DATA_W-1:0]    b_wdata,
  input  logic [DATA_W/8-1:0]  b_wstrb,
  input  logic                 b_wlast,
  input  logic                 b_wvalid,
  input  logic                 b_bready,
  input  logic [ID_W-1:0]      b_arid,
  input  logic [ADDR_W-1:0]    b_araddr,
  input  logic [LEN_W-1:0]     b_arlen,
  input  logic [2:0]           b_arsize,
  input  logic [1:0]           b_arburst,
  input  logic                 b_arvalid,
  input  logic                 b_rready,
  output logic                 b_awready,
  output logic                 b_wready,
  output logic [ID_W-1:0]      b_bid,
  output logic [1:0]           b_bresp,
  output logic                 b_bvalid,
  output logic                 b_arready,
  output logic [ID_W-1:0]      b_rid,
  output logic [DATA_W-1:0]    b_rdata,
  output logic [1:0]           b_rresp,
  output logic                 b_rlast,
  output logic                 b_rvalid,
  output logic [ID_W-1:0]      m_awid,
  output logic [ADDR_W-1:0]    m_awaddr,
  output logic [LEN_W-1:0]     m_awlen,
  output logic [2:0]           m_awsize,
  output logic [1:0]           m_awburst,
  output logic                 m_awvalid,
  output logic [ID_W-1:0]      m_wid,
  output logic [DATA_W-1:0]    m_wdata,
  output logic [DATA_W/8-1:0]  m_wstrb,
  output logic                 m_wlast,
  output logic                 m_wvalid,
  output logic                 m_bready,
  output logic [ID_W-1:0]      m_arid,
  output logic [ADDR_W-1:0]    m_araddr,
  output logic [LEN_W-1:0]     m_arlen,
  output logic [2:0]           m_arsize,
  output logic [1:0]           m_arburst,
  output logic                 m_arvalid,
  output logic                 m_rready,
  input  logic                 m_awready,
  input  logic                 m_wready,
  input  logic [ID_W-1:0]      m_bid,
  input  logic [1:0]           m_bresp,
  input  logic                 m_bvalid,
  input  logic                 m_arready,
  input  logic [ID_W-1:0]      m_rid,
  input  logic [DATA_W-1:0]    m_rdata,
  input  logic [1:0]           m_rresp,
  input  logic                 m_rlast,
  input  logic                 m_rvalid
);

  // Bursts in flight on the port, and write bursts whose data is still due.
  localparam int unsigned CNT_W = $clog2(4 * MAX_OUTSTANDING + 1);
  logic [CNT_W-1:0] wr_out, rd_out, w_pend;
  logic             quiet;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_out <= '0;
      rd_out <= '0;
      w_pend <= '0;
      sel    <= 1'b0;
    end else begin
      wr_out <= wr_out + CNT_W'(m_awvalid && m_awready) - CNT_W'(m_bvalid && m_bready);
      rd_out <= rd_out + CNT_W'(m_arvalid && m_arready)
                       - CNT_W'(m_rvalid && m_rready && m_rlast);
      w_pend <= w_pend + CNT_W'(m_awvalid && m_awready)
                       - CNT_W'(m_wvalid && m_wready && m_wlast);
      if (quiet && (sel_req != sel)) sel <= sel_req;
    end
  end

  assign quiet = (wr_out == '0) && (rd_out == '0) && (w_pend == '0) &&
                 !m_awvalid && !m_arvalid && !m_wvalid;

  always_comb begin
    m_awid = sel ? b_awid : a_awid;
    m_awaddr = sel ? b_awaddr : a_awaddr;
    m_awlen = sel ? b_awlen : a_awlen;
    m_awsize = sel ? b_awsize : a_awsize;
    m_awburst = sel ? b_awburst : a_awburst;
    m_awvalid = sel ? b_awvalid : a_awvalid;
    m_wid = sel ? b_wid : a_wid;
    m_wdata = sel ? b_wdata : a_wdata;
    m_wstrb = sel ? b_wstrb : a_wstrb;
    m_wlast = sel ? b_wlast : a_wlast;
    m_wvalid = sel ? b_wvalid : a_wvalid;
    m_bready = sel ? b_bready : a_bready;
    m_arid = sel ? b_arid : a_arid;
    m_araddr = sel ? b_araddr : a_araddr;
    m_arlen = sel ? b_arlen : a_arlen;
    m_arsize = sel ? b_arsize : a_arsize;
    m_arburst = sel ? b_arburst : a_arburst;
    m_arvalid = sel ? b_arvalid : a_arvalid;
    m_rready = sel ? b_rready : a_rready;
  end

  always_comb begin
    a_awready = !sel && m_awready;
    b_awready =  sel && m_awready;
    a_wready = !sel && m_wready;
    b_wready =  sel && m_wready;
    a_bid = m_bid;
    b_bid = m_bid;
    a_bresp = m_bresp;
    b_bresp = m_bresp;
    a_bvalid = !sel && m_bvalid;
    b_bvalid =  sel && m_bvalid;
    a_arready = !sel && m_arready;
    b_arready =  sel && m_arready;
    a_rid = m_rid;
    b_rid = m_rid;
    a_rdata = m_rdata;
    b_rdata = m_rdata;
    a_rresp = m_rresp;
    b_rresp = m_rresp;
    a_rlast = m_rlast;
    b_rlast = m_rlast;
    a_rvalid = !sel && m_rvalid;
    b_rvalid =  sel && m_rvalid;
  end

  a_no_switch_busy: assert property (@(posedge clk) disable iff (!rst_n)
      (sel != $past(sel)) |-> ($past(wr_out) == '0) && ($past(rd_out) == '0));
endmodule
