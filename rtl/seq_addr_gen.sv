// Sequential mode address generator of a Configurable Pattern Generator.
//
// Produces the Repetitive Sequential Traversal (RST) stream: Num_trans bursts
// of Burst_Size beats, each starting where the previous one ended, inside one
// pseudo-channel (HBM) or one bank (DDR4). When the traversal reaches the end
// of the 256 MB pseudo-channel (16 GB bank) it wraps to its start, so long
// runs sweep the region again and again. The pseudo-channel is the run-time
// parameter PSCH_Addrr_Init.
//
// Interface: a start pulse loads len (beats - 1), num_trans and the
// pseudo-channel and begins the stream; the commands leave on a
// valid/ready port; done is high once every command has been accepted.
// Timing: one command per cycle while cmd_ready is high, the first one
// the cycle after start.
//
// The traversal starts at offset 0 of the pseudo-channel and wraps at its
// end; both are choices of this design. Bursts are not kept inside 4 KB
// pages, because 256-beat DDR4 bursts of 64 bytes are 16 KB long.
module seq_addr_gen
  import ms_pkg::*;
#(
  parameter bit IS_DDR = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [LEN_MAX-1:0]     len,
  input  logic [NUM_TRANS_W-1:0] num_trans,
  input  logic [4:0]             psch,
  output logic                   cmd_valid,
  input  logic                   cmd_ready,
  output cmd_t                   cmd,
  output logic                   done
);
  localparam int unsigned OFFS_W = offs_w(IS_DDR);
  // Address bits inside one pseudo-channel or bank.
  localparam int unsigned REG_W  = IS_DDR ? DDR_ADDR_W : HBM_PSCH_LSB;

  logic [NUM_TRANS_W-1:0] remaining;
  logic [REG_W-1:0]       offset;
  logic [LEN_MAX-1:0]     len_q;
  logic [4:0]             psch_q;
  logic [REG_W-1:0]       step;

  assign step = (REG_W'(len_q) + REG_W'(1)) << OFFS_W;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      offset    <= '0;
      len_q     <= '0;
      psch_q    <= '0;
    end else if (start) begin
      remaining <= num_trans;
      offset    <= '0;
      len_q     <= len;
      psch_q    <= psch;
    end else if (cmd_valid && cmd_ready) begin
      remaining <= remaining - 1'b1;
      offset    <= offset + step;   // wraps at the end of the region
    end
  end

  assign cmd_valid = (remaining != '0);
  assign done      = (remaining == '0);

  always_comb begin
    cmd      = '0;
    cmd.len  = len_q;
    cmd.strb = '1;
    if (IS_DDR) cmd.addr = ADDR_MAX'(offset);
    else        cmd.addr = ADDR_MAX'({psch_q, offset});
  end
endmodule
