// Real-access-pattern trace mode: replays the memory access pattern of the
// sparse matrix-vector product (SpMV) of the HPCG benchmark on four ports,
// one pseudo-channel per address stream.
//
// A matrix in compressed sparse row (CSR) form is read as three streams and
// the result written as a fourth. For every matrix row r:
//   indexes  one dense read of IDX_BYTES (column indices) at r*IDX_BYTES;
//   values   one dense read of VAL_BYTES (non-zero values) at r*VAL_BYTES;
//   x        X_GROUPS sparse reads of X_BYTES of the dense vector x, which
//            may start only once the first index beat has arrived;
//            group g starts at element r + g*x_stride;
//   y        one write of Y_BYTES (the result element) at r*Y_BYTES, issued
//            once the other three streams have finished the row.
// The next row starts when the write of y has been answered. Each stream
// has its own state machine and AXI engine: ports 0, 1 and 2 carry the read
// streams indexes, values and x, port 3 the write stream y. Stream s uses
// pseudo-channel PSCH_Addrr_Init + s at offset 0. A byte span that does not
// start on a beat boundary becomes a burst of every beat it touches, and
// the y write carries byte strobes for its 8 bytes only.
//
// Interface: start pulse; cfg gives the row count (Num_trans), the first
// pseudo-channel and the x stride; stat reports busy, done, cycles from
// start to the last write response, rows completed and bad responses.
// Three AXI read masters and one AXI write master.
//
// The per-row sizes (108, 216, 6 x 24 and 8 bytes) and the order of the four
// streams follow the SpMV data-flow timing of the design. The address of the
// x groups, the stream-to-pseudo-channel placement and the base offsets are
// choices of this design: the addresses of the real trace are not given.
module spmv_trace_gen
  import ms_pkg::*;
#(
  parameter bit          IS_DDR          = 1'b0,
  parameter int unsigned ID_W            = 6,
  parameter logic [ID_W-1:0] ID          = '0,
  parameter int unsigned MAX_OUTSTANDING = 32,
  parameter int unsigned IDX_BYTES       = 108,
  parameter int unsigned VAL_BYTES       = 216,
  parameter int unsigned X_GROUPS        = 6,
  parameter int unsigned X_BYTES         = 24,
  parameter int unsigned Y_BYTES         = 8,
  parameter int unsigned ELEM_BYTES      = 8,
  localparam int unsigned ADDR_W = addr_w(IS_DDR),
  localparam int unsigned DATA_W = data_w(IS_DDR),
  localparam int unsigned LEN_W  = len_w(IS_DDR)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  cfg_t                cfg,
  output trace_stat_t         stat,
  // read masters: [0] indexes, [1] values, [2] x
  output logic [ID_W-1:0]     arid    [3],
  output logic [ADDR_W-1:0]   araddr  [3],
  output logic [LEN_W-1:0]    arlen   [3],
  output logic [2:0]          arsize  [3],
  output logic [1:0]          arburst [3],
  output logic                arvalid [3],
  input  logic                arready [3],
  input  logic [ID_W-1:0]     rid     [3],
  input  logic [DATA_W-1:0]   rdata   [3],
  input  logic [1:0]          rresp   [3],
  input  logic                rlast   [3],
  input  logic                rvalid  [3],
  output logic                rready  [3],
  // write master: y
  output logic [ID_W-1:0]     awid,
  output logic [ADDR_W-1:0]   awaddr,
  output logic [LEN_W-1:0]    awlen,
  output logic [2:0]          awsize,
  output logic [1:0]          awburst,
  output logic                awvalid,
  input  logic                awready,
  output logic [ID_W-1:0]     wid,
  output logic [DATA_W-1:0]   wdata,
  output logic [DATA_W/8-1:0] wstrb,
  output logic                wlast,
  output logic                wvalid,
  input  logic                wready,
  input  logic [ID_W-1:0]     bid,
  input  logic [1:0]          bresp,
  input  logic                bvalid,
  output logic                bready
);
  localparam int unsigned OFFS_W = offs_w(IS_DDR);
  localparam int unsigned BYTES  = DATA_W / 8;
  localparam int unsigned REG_W  = IS_DDR ? DDR_ADDR_W : HBM_PSCH_LSB;
  localparam int unsigned XG_W   = $clog2(X_GROUPS + 1);

  typedef enum logic [1:0] {T_IDLE, T_ROW, T_YWAIT} tstate_e;
  tstate_e state;

  logic [31:0] row, rows_total;
  logic [4:0]  psch;
  logic [15:0] stride;

  // Per-row progress of the four streams.
  logic            idx_sent, val_sent, idx_done, val_done, idx_first, y_sent;
  logic [XG_W-1:0] x_sent, x_done;

  // Burst covering bytes [start, start+n) of pseudo-channel p.
  function automatic cmd_t span(input logic [REG_W-1:0] start_b, input int unsigned n,
                                input logic [4:0] p);
    cmd_t c;
    logic [REG_W-1:0] first, last;
    first = start_b >> OFFS_W;
    last  = (start_b + REG_W'(n - 1)) >> OFFS_W;
    c      = '0;
    c.len  = LEN_MAX'(last - first);
    c.strb = '1;
    if (IS_DDR) c.addr = ADDR_MAX'(first << OFFS_W);
    else        c.addr = ADDR_MAX'({p, REG_W'(first << OFFS_W)});
    return c;
  endfunction

  // ---------------- command sources ----------------
  logic rd_cmd_valid [3];
  logic rd_cmd_ready [3];
  cmd_t rd_cmd       [3];
  logic y_cmd_valid, y_cmd_ready;
  cmd_t y_cmd;
  logic [REG_W-1:0] x_elem, y_start;

  always_comb begin
    x_elem  = REG_W'(row) + REG_W'(32'(x_sent) * 32'(stride));
    y_start = REG_W'(row * Y_BYTES);

    rd_cmd_valid[0] = (state == T_ROW) && !idx_sent;
    rd_cmd[0]       = span(REG_W'(row * IDX_BYTES), IDX_BYTES, psch);
    rd_cmd_valid[1] = (state == T_ROW) && !val_sent;
    rd_cmd[1]       = span(REG_W'(row * VAL_BYTES), VAL_BYTES, psch + 5'd1);
    rd_cmd_valid[2] = (state == T_ROW) && idx_first && (32'(x_sent) < X_GROUPS);
    rd_cmd[2]       = span(REG_W'(x_elem * ELEM_BYTES), X_BYTES, psch + 5'd2);

    y_cmd_valid = (state == T_ROW) && idx_done && val_done &&
                  (32'(x_done) == X_GROUPS) && !y_sent;
    y_cmd       = span(y_start, Y_BYTES, psch + 5'd3);
    y_cmd.strb  = STRB_MAX'(BYTES'((1 << Y_BYTES) - 1) << y_start[OFFS_W-1:0]);
  end

  // ---------------- AXI engines ----------------
  logic beat_p [3];
  logic last_p [3];
  logic rerr_p [3];
  logic ar_f   [3];
  logic ridle  [3];
  logic [DATA_W-1:0] rd_unused [3];
  logic y_aw_f, y_beat, y_resp, y_err, y_idle;

  for (genvar s = 0; s < 3; s++) begin : g_rd
    axi_rd_engine #(
      .ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .ID_W(ID_W),
      .MAX_OUTSTANDING(MAX_OUTSTANDING), .ID(ID)
    ) u_rd (
      .clk, .rst_n,
      .cmd_valid(rd_cmd_valid[s]), .cmd_ready(rd_cmd_ready[s]), .cmd(rd_cmd[s]),
      .arid(arid[s]), .araddr(araddr[s]), .arlen(arlen[s]), .arsize(arsize[s]),
      .arburst(arburst[s]), .arvalid(arvalid[s]), .arready(arready[s]),
      .rid(rid[s]), .rdata(rdata[s]), .rresp(rresp[s]), .rlast(rlast[s]),
      .rvalid(rvalid[s]), .rready(rready[s]),
      .ar_fire(ar_f[s]), .beat_pulse(beat_p[s]), .last_pulse(last_p[s]),
      .err_pulse(rerr_p[s]), .idle(ridle[s]), .beat_data(rd_unused[s])
    );
  end

  axi_wr_engine #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .LEN_W(LEN_W), .ID_W(ID_W),
    .MAX_OUTSTANDING(MAX_OUTSTANDING), .ID(ID)
  ) u_wr (
    .clk, .rst_n, .cmd_valid(y_cmd_valid), .cmd_ready(y_cmd_ready), .cmd(y_cmd),
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wid, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bid, .bresp, .bvalid, .bready,
    .aw_fire(y_aw_f), .beat_pulse(y_beat), .resp_pulse(y_resp), .err_pulse(y_err),
    .idle(y_idle)
  );

  // ---------------- row sequencing ----------------
  logic row_end;
  assign row_end = (state == T_YWAIT) && y_resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      row        <= '0;
      rows_total <= '0;
      psch       <= '0;
      stride     <= '0;
      idx_sent   <= 1'b0;
      val_sent   <= 1'b0;
      idx_done   <= 1'b0;
      val_done   <= 1'b0;
      idx_first  <= 1'b0;
      y_sent     <= 1'b0;
      x_sent     <= '0;
      x_done     <= '0;
      stat       <= '0;
    end else begin
      if (stat.busy) stat.cycles <= stat.cycles + 1'b1;
      if (rerr_p[0] || rerr_p[1] || rerr_p[2] || y_err) stat.errors <= stat.errors + 1'b1;

      if (rd_cmd_valid[0] && rd_cmd_ready[0]) idx_sent <= 1'b1;
      if (rd_cmd_valid[1] && rd_cmd_ready[1]) val_sent <= 1'b1;
      if (rd_cmd_valid[2] && rd_cmd_ready[2]) x_sent   <= x_sent + 1'b1;
      if (beat_p[0]) idx_first <= 1'b1;
      if (last_p[0]) idx_done  <= 1'b1;
      if (last_p[1]) val_done  <= 1'b1;
      if (last_p[2]) x_done    <= x_done + 1'b1;
      if (y_cmd_valid && y_cmd_ready) y_sent <= 1'b1;

      unique case (state)
        T_IDLE: if (start) begin
          row         <= '0;
          rows_total  <= cfg.num_trans[31:0];
          psch        <= cfg.psch_init;
          stride      <= cfg.x_stride;
          stat        <= '0;
          stat.busy   <= 1'b1;
          state       <= (cfg.num_trans == '0) ? T_IDLE : T_ROW;
          if (cfg.num_trans == '0) begin
            stat.busy <= 1'b0;
            stat.done <= 1'b1;
          end
        end
        T_ROW: if (y_cmd_valid && y_cmd_ready) state <= T_YWAIT;
        T_YWAIT: if (row_end) begin
          idx_sent  <= 1'b0;
          val_sent  <= 1'b0;
          idx_done  <= 1'b0;
          val_done  <= 1'b0;
          idx_first <= 1'b0;
          y_sent    <= 1'b0;
          x_sent    <= '0;
          x_done    <= '0;
          row       <= row + 1'b1;
          stat.rows <= stat.rows + 1'b1;
          if (row + 1'b1 == rows_total) begin
            state     <= T_IDLE;
            stat.busy <= 1'b0;
            stat.done <= 1'b1;
          end else begin
            state <= T_ROW;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The x stream waits for the first index beat of its row.
  a_x_after_idx: assert property (@(posedge clk) disable iff (!rst_n)
      rd_cmd_valid[2] |-> idx_first);
  // The y write leaves only after every read of the row has completed.
  a_y_after_reads: assert property (@(posedge clk) disable iff (!rst_n)
      y_cmd_valid |-> idx_done && val_done && ridle[2]);
endmodule
