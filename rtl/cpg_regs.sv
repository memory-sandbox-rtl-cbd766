// Run-time parameter and result registers of one pattern generator, on an
// AXI4-Lite slave port (32-bit data, 8-bit byte address).
//
// Software writes the run-time parameters (Burst_Size, Num_trans,
// PSCH_Addrr_Init, PSCH_Addrr_End, the mode and, for trace mode, the x
// stride) and then a start bit; it polls the status register and reads back
// cycle counts, latencies, beat counts and error counts. Changing these
// values needs no new bitstream. The register map is in ms_pkg.
//
// Interface: AXI4-Lite slave; cfg holds the parameters; start_wr, start_rd
// and start_trace pulse for one cycle when the matching bit of the control
// register is written with 1; results come in as perf_t and trace_stat_t.
// Timing: a write is accepted when address and data are both valid and is
// answered the next cycle; a read is answered the cycle after its address.
//
// The register map, the reset values (16-beat bursts, one transaction,
// sequential mode, pseudo-channel 0, x stride 16) and the OKAY answer to
// unknown addresses are choices of this design.
module cpg_regs
  import ms_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic [7:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [7:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // to and from the generator
  output cfg_t        cfg,
  output logic        start_wr,
  output logic        start_rd,
  output logic        start_trace,
  input  perf_t       wr_perf,
  input  perf_t       rd_perf,
  input  trace_stat_t trace
);
  logic wr_en;
  logic [31:0] wdata;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_en     = s_awready;
  assign s_bresp   = RESP_OKAY;
  assign s_rresp   = RESP_OKAY;

  // Byte strobes applied to the current value of a register.
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] be);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) r[8*i +: 8] = be[i] ? d[8*i +: 8] : old[8*i +: 8];
    return r;
  endfunction

  logic [31:0] cur;
  always_comb begin
    unique case (s_awaddr)
      REG_CTRL:      cur = {26'd0, cfg.mode, 4'd0};
      REG_BURST:     cur = 32'(cfg.len);
      REG_NTRANS_LO: cur = cfg.num_trans[31:0];
      REG_NTRANS_HI: cur = 32'(cfg.num_trans[NUM_TRANS_W-1:32]);
      REG_PSCH_INIT: cur = 32'(cfg.psch_init);
      REG_PSCH_END:  cur = 32'(cfg.psch_end);
      REG_XSTRIDE:   cur = 32'(cfg.x_stride);
      default:       cur = '0;
    endcase
    wdata = merge(cur, s_wdata, s_wstrb);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg           <= '0;
      cfg.mode      <= MODE_SEQ;
      cfg.len       <= LEN_MAX'(15);
      cfg.num_trans <= NUM_TRANS_W'(1);
      cfg.x_stride  <= 16'd16;
      start_wr      <= 1'b0;
      start_rd      <= 1'b0;
      start_trace   <= 1'b0;
      s_bvalid      <= 1'b0;
    end else begin
      start_wr    <= 1'b0;
      start_rd    <= 1'b0;
      start_trace <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_en) begin
        s_bvalid <= 1'b1;
        unique case (s_awaddr)
          REG_CTRL: begin
            start_wr    <= wdata[0];
            start_rd    <= wdata[1];
            start_trace <= wdata[2];
            cfg.mode    <= mode_e'(wdata[5:4]);
          end
          REG_BURST:     cfg.len       <= wdata[LEN_MAX-1:0];
          REG_NTRANS_LO: cfg.num_trans[31:0] <= wdata;
          REG_NTRANS_HI: cfg.num_trans[NUM_TRANS_W-1:32] <= wdata[NUM_TRANS_W-33:0];
          REG_PSCH_INIT: cfg.psch_init <= wdata[4:0];
          REG_PSCH_END:  cfg.psch_end  <= wdata[4:0];
          REG_XSTRIDE:   cfg.x_stride  <= wdata[15:0];
          default: ;
        endcase
      end
    end
  end

  // Read side.
  logic [31:0] rd_mux;
  always_comb begin
    unique case (s_araddr)
      REG_CTRL:      rd_mux = {26'd0, cfg.mode, 4'd0};
      REG_STATUS:    rd_mux = {26'd0, trace.done, trace.busy, rd_perf.done, wr_perf.done,
                               rd_perf.busy, wr_perf.busy};
      REG_BURST:     rd_mux = 32'(cfg.len);
      REG_NTRANS_LO: rd_mux = cfg.num_trans[31:0];
      REG_NTRANS_HI: rd_mux = 32'(cfg.num_trans[NUM_TRANS_W-1:32]);
      REG_PSCH_INIT: rd_mux = 32'(cfg.psch_init);
      REG_PSCH_END:  rd_mux = 32'(cfg.psch_end);
      REG_XSTRIDE:   rd_mux = 32'(cfg.x_stride);
      REG_WR_CYC_LO: rd_mux = wr_perf.cycles[31:0];
      REG_WR_CYC_HI: rd_mux = wr_perf.cycles[63:32];
      REG_RD_CYC_LO: rd_mux = rd_perf.cycles[31:0];
      REG_RD_CYC_HI: rd_mux = rd_perf.cycles[63:32];
      REG_WR_LAT:    rd_mux = wr_perf.latency;
      REG_RD_LAT:    rd_mux = rd_perf.latency;
      REG_WR_ERR:    rd_mux = wr_perf.errors;
      REG_RD_ERR:    rd_mux = rd_perf.errors;
      REG_WR_BEATS:  rd_mux = wr_perf.beats[31:0];
      REG_RD_BEATS:  rd_mux = rd_perf.beats[31:0];
      REG_TR_CYC_LO: rd_mux = trace.cycles[31:0];
      REG_TR_CYC_HI: rd_mux = trace.cycles[63:32];
      REG_TR_ROWS:   rd_mux = trace.rows;
      REG_TR_ERR:    rd_mux = trace.errors;
      default:       rd_mux = '0;
    endcase
  end

  assign s_arready = !s_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else if (s_arvalid && s_arready) begin
      s_rvalid <= 1'b1;
      s_rdata  <= rd_mux;
    end else if (s_rready) begin
      s_rvalid <= 1'b0;
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
endmodule
