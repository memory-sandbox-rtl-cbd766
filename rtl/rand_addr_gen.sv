// Pseudo-random mode of a Configurable Pattern Generator.
//
// Sits between the sequential address generator and an AXI engine and, in
// pseudo-random mode, replaces chosen address bits with bits of a 64-bit
// linear feedback shift register. The design parameters choose which bits:
//   RAND_WHOLE_ADDR  all application address bits above the beat offset
//                    (HBM [27:5], DDR4 [33:6]);
//   otherwise        the union of the row, column, bank and bank group fields
//                    selected by RAND_ROW, RAND_COL, RAND_BANK and
//                    RAND_BANK_GROUP, located by the mapping policy POLICY;
//   RAND_PSCH        the pseudo-channel, drawn evenly from PSCH_Addrr_Init to
//                    PSCH_Addrr_End (HBM only).
// Bits that are not randomised keep the sequential value, so a field-wise
// randomisation still sweeps the other fields. The random address is aligned
// down to the burst size rounded up to a power of two, so that a burst stays
// inside the block it was aimed at. In sequential mode (enable low) commands
// pass unchanged.
//
// Interface: valid/ready in, valid/ready out, no storage: out_valid equals
// in_valid and in_ready equals out_ready. The register advances once per
// accepted command, so the address sequence is fixed by SEED.
//
// The register polynomial, the seed, the even spread over the pseudo-channel
// range (a multiply-and-shift) and the alignment are choices of this design.
module rand_addr_gen
  import ms_pkg::*;
#(
  parameter bit          IS_DDR          = 1'b0,
  parameter map_policy_e POLICY          = POL_HBM_RGBCG,
  parameter bit          RAND_PSCH       = 1'b1,
  parameter bit          RAND_WHOLE_ADDR = 1'b1,
  parameter bit          RAND_BANK_GROUP = 1'b0,
  parameter bit          RAND_BANK       = 1'b0,
  parameter bit          RAND_COL        = 1'b0,
  parameter bit          RAND_ROW        = 1'b0,
  parameter logic [63:0] SEED            = 64'h0123_4567_89AB_CDEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [4:0] psch_init,
  input  logic [4:0] psch_end,
  input  logic       in_valid,
  output logic       in_ready,
  input  cmd_t       in_cmd,
  output logic       out_valid,
  input  logic       out_ready,
  output cmd_t       out_cmd
);
  localparam int unsigned OFFS_W  = offs_w(IS_DDR);
  localparam int unsigned APP_HI  = IS_DDR ? 33 : 27;
  localparam field_masks_t F      = policy_masks(POLICY);
  localparam logic [ADDR_MAX-1:0] FIELD_MASK =
      (RAND_ROW        ? F.row  : '0) |
      (RAND_COL        ? F.col  : '0) |
      (RAND_BANK       ? F.bank : '0) |
      (RAND_BANK_GROUP ? F.bg   : '0);
  localparam logic [ADDR_MAX-1:0] APP_MASK =
      RAND_WHOLE_ADDR ? bits(APP_HI, OFFS_W) : FIELD_MASK;
  localparam logic [63:0] SEED_NZ = (SEED == '0) ? 64'h1 : SEED;

  logic [63:0] lfsr;

  // Galois form of x^64 + x^63 + x^61 + x^60 + 1 (maximal length).
  function automatic logic [63:0] lfsr_next(input logic [63:0] s);
    return s[0] ? ((s >> 1) ^ 64'hD800_0000_0000_0000) : (s >> 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          lfsr <= SEED_NZ;
    else if (enable && out_valid && out_ready) lfsr <= lfsr_next(lfsr);
  end

  // Bits below the burst size, rounded up to a power of two.
  logic [ADDR_MAX-1:0] align_mask;
  always_comb begin
    align_mask = '0;
    for (int unsigned i = 0; i < LEN_MAX; i++)
      if ((32'(in_cmd.len) >> i) != 0) align_mask[OFFS_W + i] = 1'b1;
    align_mask = align_mask | bits(OFFS_W - 1, 0);
  end

  // Pseudo-channel drawn from [psch_init, psch_end].
  logic [5:0]  range_n;
  logic [21:0] scaled;
  logic [4:0]  rand_psch;
  always_comb begin
    range_n   = (psch_end >= psch_init) ? (6'(psch_end) - 6'(psch_init) + 6'd1) : 6'd1;
    scaled    = 22'(lfsr[63:48]) * 22'(range_n);
    rand_psch = psch_init + 5'(scaled[21:16]);
  end

  logic [ADDR_MAX-1:0] a;
  always_comb begin
    a = in_cmd.addr;
    if (enable) begin
      a = (a & ~APP_MASK) | (lfsr[ADDR_MAX-1:0] & APP_MASK);
      a = a & ~align_mask;
      if (!IS_DDR && RAND_PSCH)
        a[HBM_PSCH_LSB +: 5] = rand_psch;
    end
    out_cmd      = in_cmd;
    out_cmd.addr = a;
  end

  assign out_valid = in_valid;
  assign in_ready  = out_ready;
endmodule
