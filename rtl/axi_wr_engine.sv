// Write state machine of a pattern generator: drives the write address (WA),
// write data (WD) and write response (WR) channels of one AXI3 (HBM) or
// AXI4 (DDR4) port.
//
// Each command becomes one write burst. The address goes out on WA while the
// burst's length, address and strobes are queued; WD then sends the bursts
// of the queue in order, one beat per cycle while WREADY is high. Bursts are
// kept outstanding, up to MAX_OUTSTANDING awaiting their response, and every
// response is accepted (BREADY high) and checked.
//
// Write data is a known pattern: each 32-bit word of a beat holds the byte
// address of that beat, so a read-back shows where a beat was written.
//
// Interface: cmd valid/ready in; AXI write master out (WID equals AWID, as
// AXI3 requires); event pulses for the address handshake, each data beat,
// each response and each bad response; idle when nothing is outstanding.
// Timing: AWVALID rises the cycle after a command is accepted; the first
// data beat of that burst can go in the same cycle.
//
// The data pattern, the single ID and the default limit of 32 outstanding
// bursts are choices of this design.
module axi_wr_engine
  import ms_pkg::*;
#(
  parameter int unsigned ADDR_W          = HBM_ADDR_W,
  parameter int unsigned DATA_W          = HBM_DATA_W,
  parameter int unsigned LEN_W           = HBM_LEN_W,
  parameter int unsigned ID_W            = 6,
  parameter int unsigned MAX_OUTSTANDING = 32,
  parameter logic [ID_W-1:0] ID          = '0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  cmd_t                cmd,
  // AXI write address channel
  output logic [ID_W-1:0]     awid,
  output logic [ADDR_W-1:0]   awaddr,
  output logic [LEN_W-1:0]    awlen,
  output logic [2:0]          awsize,
  output logic [1:0]          awburst,
  output logic                awvalid,
  input  logic                awready,
  // AXI write data channel
  output logic [ID_W-1:0]     wid,
  output logic [DATA_W-1:0]   wdata,
  output logic [DATA_W/8-1:0] wstrb,
  output logic                wlast,
  output logic                wvalid,
  input  logic                wready,
  // AXI write response channel
  input  logic [ID_W-1:0]     bid,
  input  logic [1:0]          bresp,
  input  logic                bvalid,
  output logic                bready,
  // events
  output logic                aw_fire,
  output logic                beat_pulse,
  output logic                resp_pulse,
  output logic                err_pulse,
  output logic                idle
);
  localparam int unsigned CNT_W  = $clog2(MAX_OUTSTANDING + 1);
  localparam int unsigned PTR_W  = (MAX_OUTSTANDING > 1) ? $clog2(MAX_OUTSTANDING) : 1;
  localparam int unsigned BYTES  = DATA_W / 8;
  localparam int unsigned OFFS_W = $clog2(BYTES);

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
    logic [BYTES-1:0]  strb;
  } wburst_t;

  wburst_t          q [MAX_OUTSTANDING];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] q_count;
  logic [CNT_W-1:0] outstanding;
  logic [LEN_W-1:0] beat;
  logic             load, w_fire, w_done;

  assign cmd_ready = (!awvalid || awready) && (outstanding < CNT_W'(MAX_OUTSTANDING));
  assign load      = cmd_valid && cmd_ready;
  assign aw_fire   = awvalid && awready;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (32'(p) == MAX_OUTSTANDING - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      awvalid <= 1'b0;
      awaddr  <= '0;
      awlen   <= '0;
    end else if (load) begin
      awvalid <= 1'b1;
      awaddr  <= cmd.addr[ADDR_W-1:0];
      awlen   <= cmd.len[LEN_W-1:0];
    end else if (awready) begin
      awvalid <= 1'b0;
    end
  end

  // Queue of bursts whose data is still to be sent.
  always_ff @(posedge clk) begin
    if (load) q[wr_ptr] <= '{addr: cmd.addr[ADDR_W-1:0], len: cmd.len[LEN_W-1:0],
                            strb: cmd.strb[BYTES-1:0]};
  end

  assign w_fire = wvalid && wready;
  assign w_done = w_fire && wlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      q_count <= '0;
      beat    <= '0;
    end else begin
      if (load)   wr_ptr <= inc(wr_ptr);
      if (w_done) rd_ptr <= inc(rd_ptr);
      q_count <= q_count + CNT_W'(load) - CNT_W'(w_done);
      if (w_done)      beat <= '0;
      else if (w_fire) beat <= beat + 1'b1;
    end
  end

  // Data of the head burst.
  logic [ADDR_W-1:0] beat_addr;
  always_comb begin
    beat_addr = q[rd_ptr].addr + (ADDR_W'(beat) << OFFS_W);
    for (int unsigned i = 0; i < DATA_W / 32; i++)
      wdata[32*i +: 32] = 32'(beat_addr);
  end
  assign wvalid = (q_count != '0);
  assign wlast  = (beat == q[rd_ptr].len);
  assign wstrb  = q[rd_ptr].strb;
  assign wid    = ID;

  assign awid    = ID;
  assign awsize  = 3'($clog2(BYTES));
  assign awburst = 2'b01;
  assign bready  = 1'b1;

  assign beat_pulse = w_fire;
  assign resp_pulse = bvalid && bready;
  assign err_pulse  = resp_pulse && (bresp != RESP_OKAY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else outstanding <= outstanding + CNT_W'(load) - CNT_W'(resp_pulse);
  end
  assign idle = (outstanding == '0);

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
      awvalid && !awready |=> awvalid && $stable(awaddr) && $stable(awlen));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
      wvalid && !wready |=> wvalid && $stable(wdata) && $stable(wlast));
  a_b_expected: assert property (@(posedge clk) disable iff (!rst_n)
      bvalid |-> (outstanding != '0) && (bid == ID));
endmodule
