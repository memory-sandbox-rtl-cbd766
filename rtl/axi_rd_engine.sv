// Read state machine of a pattern generator: drives the read address (RA)
// and read data (RD) channels of one AXI3 (HBM) or AXI4 (DDR4) port.
//
// Each command from the address generator becomes one read burst. The engine
// keeps requests outstanding, up to MAX_OUTSTANDING bursts, so the memory
// port is never left idle while there is work: a new address is presented in
// the cycle after the previous one was accepted. Read data is always
// accepted (RREADY held high) and each response code is checked; a code
// other than OKAY raises err_pulse with the beat.
//
// Interface: cmd valid/ready in; AXI read master out; event pulses for
// the address handshake, every data beat and the last beat of a burst; idle
// is high when no burst is outstanding. One fixed ID (ID) is used for every
// burst, so responses return in order.
// Timing: the address register is loaded in the cycle the command is
// accepted; ARVALID rises the next cycle and holds until ARREADY.
//
// Always-ready read data, the single ID and the default limit of 32
// outstanding bursts (above the 22 the HBM admits) are choices of this
// design.
module axi_rd_engine
  import ms_pkg::*;
#(
  parameter int unsigned ADDR_W          = HBM_ADDR_W,
  parameter int unsigned DATA_W          = HBM_DATA_W,
  parameter int unsigned LEN_W           = HBM_LEN_W,
  parameter int unsigned ID_W            = 6,
  parameter int unsigned MAX_OUTSTANDING = 32,
  parameter logic [ID_W-1:0] ID          = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  cmd_t              cmd,
  // AXI read address channel
  output logic [ID_W-1:0]   arid,
  output logic [ADDR_W-1:0] araddr,
  output logic [LEN_W-1:0]  arlen,
  output logic [2:0]        arsize,
  output logic [1:0]        arburst,
  output logic              arvalid,
  input  logic              arready,
  // AXI read data channel
  input  logic [ID_W-1:0]   rid,
  input  logic [DATA_W-1:0] rdata,
  input  logic [1:0]        rresp,
  input  logic              rlast,
  input  logic              rvalid,
  output logic              rready,
  // events
  output logic              ar_fire,
  output logic              beat_pulse,
  output logic              last_pulse,
  output logic              err_pulse,
  output logic              idle,
  output logic [DATA_W-1:0] beat_data
);
  localparam int unsigned CNT_W = $clog2(MAX_OUTSTANDING + 1);

  logic [CNT_W-1:0] outstanding;
  logic             load;

  assign cmd_ready = (!arvalid || arready) && (outstanding < CNT_W'(MAX_OUTSTANDING));
  assign load      = cmd_valid && cmd_ready;
  assign ar_fire   = arvalid && arready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arvalid <= 1'b0;
      araddr  <= '0;
      arlen   <= '0;
    end else if (load) begin
      arvalid <= 1'b1;
      araddr  <= cmd.addr[ADDR_W-1:0];
      arlen   <= cmd.len[LEN_W-1:0];
    end else if (arready) begin
      arvalid <= 1'b0;
    end
  end

  assign arid    = ID;
  assign arsize  = 3'($clog2(DATA_W / 8));
  assign arburst = 2'b01;   // INCR
  assign rready  = 1'b1;

  assign beat_pulse = rvalid && rready;
  assign last_pulse = beat_pulse && rlast;
  assign err_pulse  = beat_pulse && (rresp != RESP_OKAY);
  assign beat_data  = rdata;

  // Bursts counted from command acceptance to their last beat.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else outstanding <= outstanding + CNT_W'(load) - CNT_W'(last_pulse);
  end
  assign idle = (outstanding == '0);

  // AXI: a valid address stays valid and unchanged until it is accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
      arvalid && !arready |=> arvalid && $stable(araddr) && $stable(arlen));
  // Data arrives only for requested bursts, with the engine's ID.
  a_r_expected: assert property (@(posedge clk) disable iff (!rst_n)
      rvalid |-> (outstanding != '0) && (rid == ID));
endmodule
