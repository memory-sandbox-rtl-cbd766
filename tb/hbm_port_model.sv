// Behavioural model (not synthesizable) of one memory AXI port, used by the
// testbenches in place of an HBM pseudo-channel or a DDR4 bank.
//
// It accepts read and write bursts, holds written data in a sparse array,
// and answers each burst after a fixed latency, in order:
//   read:  the first beat appears RD_LAT cycles after the address was
//          accepted, then one beat per cycle;
//   write: the response appears WR_LAT cycles after the address was
//          accepted, or the cycle after the last data beat if that is later.
// At most MAX_OUT bursts per direction are admitted; beyond that the
// address ready goes low. With STALL_PCT above zero the address and data
// ready signals drop at random, to exercise the back-pressure paths. A
// high inject_err makes every response SLVERR. Unwritten locations read as
// their beat address in every 32-bit word.
//
// Defaults: 48 and 14 cycles (the read and write latency of the closest
// pseudo-channels of an HBM stack) and 22 admitted requests.
module hbm_port_model #(
  parameter int unsigned ADDR_W    = 33,
  parameter int unsigned DATA_W    = 256,
  parameter int unsigned LEN_W     = 4,
  parameter int unsigned ID_W      = 6,
  parameter int unsigned RD_LAT    = 48,
  parameter int unsigned WR_LAT    = 14,
  parameter int unsigned MAX_OUT   = 22,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                inject_err,
  input  logic [ID_W-1:0]     awid,
  input  logic [ADDR_W-1:0]   awaddr,
  input  logic [LEN_W-1:0]    awlen,
  input  logic                awvalid,
  output logic                awready,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [DATA_W/8-1:0] wstrb,
  input  logic                wlast,
  input  logic                wvalid,
  output logic                wready,
  output logic [ID_W-1:0]     bid,
  output logic [1:0]          bresp,
  output logic                bvalid,
  input  logic                bready,
  input  logic [ID_W-1:0]     arid,
  input  logic [ADDR_W-1:0]   araddr,
  input  logic [LEN_W-1:0]    arlen,
  input  logic                arvalid,
  output logic                arready,
  output logic [ID_W-1:0]     rid,
  output logic [DATA_W-1:0]   rdata,
  output logic [1:0]          rresp,
  output logic                rlast,
  output logic                rvalid,
  input  logic                rready,
  output int unsigned         rd_bursts,
  output int unsigned         wr_bursts,
  output int unsigned         wr_beats_total,
  output int unsigned         rd_beats_total,
  output int unsigned         max_rd_out,
  output int unsigned         max_wr_out
);
  localparam int unsigned BYTES  = DATA_W / 8;
  localparam int unsigned OFFS_W = $clog2(BYTES);

  typedef struct {
    logic [ADDR_W-1:0] addr;
    int unsigned       len;
    logic [ID_W-1:0]   id;
    longint unsigned   due;
  } req_t;

  req_t rq[$];   // reads waiting or being answered
  req_t wq[$];   // writes waiting for data
  req_t bq[$];   // writes waiting for their response
  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  longint unsigned cyc;
  int unsigned rbeat, wbeat, rd_out, wr_out;
  logic stall_a, stall_w, stall_r;

  function automatic logic [DATA_W-1:0] default_data(input logic [ADDR_W-1:0] a);
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[32*i +: 32] = 32'(a);
    return d;
  endfunction

  always_comb begin
    arready = rst_n && !stall_r && (rd_out < MAX_OUT);
    awready = rst_n && !stall_a && (wr_out < MAX_OUT);
    wready  = rst_n && !stall_w && (wq.size() != 0);
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq.delete(); wq.delete(); bq.delete();
      cyc = 0; rbeat = 0; wbeat = 0; rd_out = 0; wr_out = 0;
      rvalid <= 1'b0; rlast <= 1'b0; rdata <= '0; rid <= '0; rresp <= '0;
      bvalid <= 1'b0; bid <= '0; bresp <= '0;
      stall_a <= 1'b0; stall_w <= 1'b0; stall_r <= 1'b0;
      rd_bursts <= 0; wr_bursts <= 0; wr_beats_total <= 0; rd_beats_total <= 0;
      max_rd_out <= 0; max_wr_out <= 0;
    end else begin
      cyc++;
      // read address
      if (arvalid && arready) begin
        rq.push_back('{addr: araddr, len: int'(arlen), id: arid, due: cyc + RD_LAT - 1});
        rd_out++;
        rd_bursts <= rd_bursts + 1;
      end
      // write address
      if (awvalid && awready) begin
        wq.push_back('{addr: awaddr, len: int'(awlen), id: awid, due: cyc + WR_LAT - 1});
        wr_out++;
        wr_bursts <= wr_bursts + 1;
      end
      // write data
      if (wvalid && wready) begin
        logic [ADDR_W-1:0] a;
        logic [DATA_W-1:0] d;
        a = wq[0].addr + (ADDR_W'(wbeat) << OFFS_W);
        d = mem.exists(a) ? mem[a] : default_data(a);
        for (int b = 0; b < BYTES; b++) if (wstrb[b]) d[8*b +: 8] = wdata[8*b +: 8];
        mem[a] = d;
        wr_beats_total <= wr_beats_total + 1;
        if (wlast != (wbeat == wq[0].len))
          $error("hbm_port_model: WLAST on beat %0d of a %0d-beat burst", wbeat, wq[0].len + 1);
        if (wbeat == wq[0].len) begin
          req_t r;
          r = wq.pop_front();
          if (r.due < cyc) r.due = cyc;
          bq.push_back(r);
          wbeat = 0;
        end else wbeat++;
      end
      // write response
      if (bvalid && bready) begin
        bvalid <= 1'b0;
        wr_out--;
      end
      if ((!bvalid || bready) && bq.size() != 0 && bq[0].due <= cyc) begin
        req_t r;
        r = bq.pop_front();
        bvalid <= 1'b1;
        bid    <= r.id;
        bresp  <= inject_err ? 2'b10 : 2'b00;
      end
      // read data
      if (rvalid && rready) begin
        rd_beats_total <= rd_beats_total + 1;
        if (rbeat == rq[0].len) begin
          void'(rq.pop_front());
          rbeat = 0;
          rd_out--;
        end else rbeat++;
        rvalid <= 1'b0;
      end
      if ((!rvalid || rready) && rq.size() != 0 && rq[0].due <= cyc) begin
        logic [ADDR_W-1:0] a;
        // rbeat already points to the next beat of the head burst
        a = rq[0].addr + (ADDR_W'(rbeat) << OFFS_W);
        rvalid <= 1'b1;
        rid    <= rq[0].id;
        rdata  <= mem.exists(a) ? mem[a] : default_data(a);
        rlast  <= (rbeat == rq[0].len);
        rresp  <= inject_err ? 2'b10 : 2'b00;
      end
      if (rd_out > max_rd_out) max_rd_out <= rd_out;
      if (wr_out > max_wr_out) max_wr_out <= wr_out;
      if (STALL_PCT != 0) begin
        stall_a <= ($urandom_range(99) < STALL_PCT);
        stall_w <= ($urandom_range(99) < STALL_PCT);
        stall_r <= ($urandom_range(99) < STALL_PCT);
      end
    end
  end
endmodule
