// Configurable Pattern Generator (CPG): emulates one processor thread that
// hammers one memory AXI port with sequential or pseudo-random traffic.
//
// A CPG holds two independent pipelines, one for writes and one for reads,
// each made of
//   seq_addr_gen   the sequential (RST) address stream of Num_trans bursts,
//   rand_addr_gen  the pseudo-random overlay, active in pseudo-random mode,
//   axi_*_engine   the state machine of the AXI channels, which keeps bursts
//                  outstanding so that the port stays saturated,
//   perf_counter   cycles, first-access latency, beats and errors.
// The run-time parameters and results sit in cpg_regs, reached over
// AXI4-Lite. Writing the start-write or start-read bit begins a run of that
// direction; both can run at once. In trace mode the CPG itself stays idle:
// its parameters and start bit go out on cfg_o and start_trace_o to the
// group's SpMV trace generator, whose status comes back on trace_i.
//
// Design parameters: IS_DDR chooses AXI4 with 512-bit data (DDR4) or AXI3
// with 256-bit data (HBM); RAND_* choose which address bits pseudo-random
// mode randomises; POLICY says where the bank, bank group, row and column
// bits are; ID is the AXI ID of every burst; SEED seeds the random register
// (the read side uses a different seed derived from it).
//
// Timing: the first address appears two cycles after the control register
// write is answered; then one burst per cycle whenever the port accepts it.
//
// The split into these sub-blocks, the register map and the seeds are
// choices of this design.
module cpg
  import ms_pkg::*;
#(
  parameter bit          IS_DDR          = 1'b0,
  parameter map_policy_e POLICY          = IS_DDR ? POL_DDR_RCB : POL_HBM_RGBCG,
  parameter bit          RAND_PSCH       = 1'b1,
  parameter bit          RAND_WHOLE_ADDR = 1'b1,
  parameter bit          RAND_BANK_GROUP = 1'b0,
  parameter bit          RAND_BANK       = 1'b0,
  parameter bit          RAND_COL        = 1'b0,
  parameter bit          RAND_ROW        = 1'b0,
  parameter int unsigned ID_W            = 6,
  parameter logic [ID_W-1:0] ID          = '0,
  parameter int unsigned MAX_OUTSTANDING = 32,
  parameter logic [63:0] SEED            = 64'h0123_4567_89AB_CDEF,
  localparam int unsigned ADDR_W = addr_w(IS_DDR),
  localparam int unsigned DATA_W = data_w(IS_DDR),
  localparam int unsigned LEN_W  = len_w(IS_DDR)
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite register port
  input  logic [7:0]          s_awaddr,
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [31:0]         s_wdata,
  input  logic [3:0]          s_wstrb,
  input  logic                s_wvalid,
  output logic                s_wready,
  output logic [1:0]          s_bresp,
  output logic                s_bvalid,
  input  logic                s_bready,
  input  logic [7:0]          s_araddr,
  input  logic                s_arvalid,
  output logic                s_arready,
  output logic [31:0]         s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rvalid,
  input  logic                s_rready,
  // AXI master port to the memory
  output logic [ID_W-1:0]     m_awid,
  output logic [ADDR_W-1:0]   m_awaddr,
  output logic [LEN_W-1:0]    m_awlen,
  output logic [2:0]          m_awsize,
  output logic [1:0]          m_awburst,
  output logic                m_awvalid,
  input  logic                m_awready,
  output logic [ID_W-1:0]     m_wid,
  output logic [DATA_W-1:0]   m_wdata,
  output logic [DATA_W/8-1:0] m_wstrb,
  output logic                m_wlast,
  output logic                m_wvalid,
  input  logic                m_wready,
  input  logic [ID_W-1:0]     m_bid,
  input  logic [1:0]          m_bresp,
  input  logic                m_bvalid,
  output logic                m_bready,
  output logic [ID_W-1:0]     m_arid,
  output logic [ADDR_W-1:0]   m_araddr,
  output logic [LEN_W-1:0]    m_arlen,
  output logic [2:0]          m_arsize,
  output logic [1:0]          m_arburst,
  output logic                m_arvalid,
  input  logic                m_arready,
  input  logic [ID_W-1:0]     m_rid,
  input  logic [DATA_W-1:0]   m_rdata,
  input  logic [1:0]          m_rresp,
  input  logic                m_rlast,
  input  logic                m_rvalid,
  output logic                m_rready,
  // trace mode hand-off
  output cfg_t                cfg_o,
  output logic                start_trace_o,
  input  trace_stat_t         trace_i,
  // run status, for the mode selector
  output logic                busy_o
);
  cfg_t  cfg;
  perf_t wr_perf, rd_perf;
  logic  start_wr_r, start_rd_r, start_trace_r, start_wr, start_rd;
  logic  rand_en;

  cpg_regs u_regs (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .cfg, .start_wr(start_wr_r), .start_rd(start_rd_r), .start_trace(start_trace_r),
    .wr_perf, .rd_perf, .trace(trace_i)
  );

  assign start_wr      = start_wr_r && (cfg.mode != MODE_TRACE) && !wr_perf.busy;
  assign start_rd      = start_rd_r && (cfg.mode != MODE_TRACE) && !rd_perf.busy;
  assign start_trace_o = start_trace_r && (cfg.mode == MODE_TRACE);
  assign cfg_o         = cfg;
  assign rand_en       = (cfg.mode == MODE_RAND);
  assign busy_o        = wr_perf.busy || rd_perf.busy;

  // ---------------- write pipeline ----------------
  logic w_seq_valid, w_seq_ready, w_seq_done, w_cmd_valid, w_cmd_ready;
  cmd_t w_seq_cmd, w_cmd;
  logic w_aw_fire, w_beat, w_resp, w_err, w_idle;

  seq_addr_gen #(.IS_DDR(IS_DDR)) u_wseq (
    .clk, .rst_n, .start(start_wr), .len(cfg.len), .num_trans(cfg.num_trans),
    .psch(cfg.psch_init), .cmd_valid(w_seq_valid), .cmd_ready(w_seq_ready),
    .cmd(w_seq_cmd), .done(w_seq_done)
  );

  rand_addr_gen #(
    .IS_DDR(IS_DDR), .POLICY(POLICY), .RAND_PSCH(RAND_PSCH),
    .RAND_WHOLE_ADDR(RAND_WHOLE_ADDR), .RAND_BANK_GROUP(RAND_BANK_GROUP),
    .RAND_BANK(RAND_BANK), .RAND_COL(RAND_COL), .RAND_ROW(RAND_ROW), .SEED(SEED)
  ) u_wrand (
    .clk, .rst_n, .enable(rand_en), .psch_init(cfg.psch_init), .psch_end(cfg.psch_end),
    .in_valid(w_seq_valid), .in_ready(w_seq_ready), .in_cmd(w_seq_cmd),
    .out_valid(w_cmd_valid), .out_ready(w_cmd_ready), .out_cmd(w_cmd)
  );

  axi_wr_engine #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .ID_W(ID_W),
    .MAX_OUTSTANDING(MAX_OUTSTANDING), .ID(ID)
  ) u_wr (
    .clk, .rst_n, .cmd_valid(w_cmd_valid), .cmd_ready(w_cmd_ready), .cmd(w_cmd),
    .awid(m_awid), .awaddr(m_awaddr), .awlen(m_awlen), .awsize(m_awsize),
    .awburst(m_awburst), .awvalid(m_awvalid), .awready(m_awready),
    .wid(m_wid), .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast),
    .wvalid(m_wvalid), .wready(m_wready),
    .bid(m_bid), .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready),
    .aw_fire(w_aw_fire), .beat_pulse(w_beat), .resp_pulse(w_resp), .err_pulse(w_err),
    .idle(w_idle)
  );

  perf_counter u_wperf (
    .clk, .rst_n, .start(start_wr), .addr_valid(m_awvalid), .resp_pulse(w_resp),
    .beat_pulse(w_beat), .err_pulse(w_err), .finished(w_seq_done && w_idle),
    .perf(wr_perf)
  );

  // ---------------- read pipeline ----------------
  logic r_seq_valid, r_seq_ready, r_seq_done, r_cmd_valid, r_cmd_ready;
  cmd_t r_seq_cmd, r_cmd;
  logic r_ar_fire, r_beat, r_last, r_err, r_idle;
  logic [DATA_W-1:0] r_data;

  seq_addr_gen #(.IS_DDR(IS_DDR)) u_rseq (
    .clk, .rst_n, .start(start_rd), .len(cfg.len), .num_trans(cfg.num_trans),
    .psch(cfg.psch_init), .cmd_valid(r_seq_valid), .cmd_ready(r_seq_ready),
    .cmd(r_seq_cmd), .done(r_seq_done)
  );

  rand_addr_gen #(
    .IS_DDR(IS_DDR), .POLICY(POLICY), .RAND_PSCH(RAND_PSCH),
    .RAND_WHOLE_ADDR(RAND_WHOLE_ADDR), .RAND_BANK_GROUP(RAND_BANK_GROUP),
    .RAND_BANK(RAND_BANK), .RAND_COL(RAND_COL), .RAND_ROW(RAND_ROW),
    .SEED(SEED ^ 64'h9E37_79B9_7F4A_7C15)
  ) u_rrand (
    .clk, .rst_n, .enable(rand_en), .psch_init(cfg.psch_init), .psch_end(cfg.psch_end),
    .in_valid(r_seq_valid), .in_ready(r_seq_ready), .in_cmd(r_seq_cmd),
    .out_valid(r_cmd_valid), .out_ready(r_cmd_ready), .out_cmd(r_cmd)
  );

  axi_rd_engine #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .ID_W(ID_W),
    .MAX_OUTSTANDING(MAX_OUTSTANDING), .ID(ID)
  ) u_rd (
    .clk, .rst_n, .cmd_valid(r_cmd_valid), .cmd_ready(r_cmd_ready), .cmd(r_cmd),
    .arid(m_arid), .araddr(m_araddr), .arlen(m_arlen), .arsize(m_arsize),
    .arburst(m_arburst), .arvalid(m_arvalid), .arready(m_arready),
    .rid(m_rid), .rdata(m_rdata), .rresp(m_rresp), .rlast(m_rlast),
    .rvalid(m_rvalid), .rready(m_rready),
    .ar_fire(r_ar_fire), .beat_pulse(r_beat), .last_pulse(r_last), .err_pulse(r_err),
    .idle(r_idle), .beat_data(r_data)
  );

  perf_counter u_rperf (
    .clk, .rst_n, .start(start_rd), .addr_valid(m_arvalid), .resp_pulse(r_beat),
    .beat_pulse(r_beat), .err_pulse(r_err), .finished(r_seq_done && r_idle),
    .perf(rd_perf)
  );
endmodule
