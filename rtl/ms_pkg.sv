// Shared types and constants of the memory traffic generator (memory_sandbox).
//
// The design drives the AXI ports of an HBM (AXI3, 256-bit data,
// 33-bit byte address, 32 pseudo-channels of 256 MB) or of a DDR4 bank
// (AXI4, 512-bit data, 34-bit byte address) with synthetic traffic.
// This package holds the address layout of both memories, the address
// mapping policies of their controllers (which bits of the application
// address are row, column, bank and bank group), the command that an
// address generator hands to an AXI engine, and the run-time configuration
// that software writes into each pattern generator.
//
// The bit layouts of the mapping policies are those of the HBM and DDR4
// memory controllers (HBM application address bits [27:5], DDR4 bits
// [33:6]). Widths of commands are sized for the larger of the two memories
// and sliced by each module.
package ms_pkg;

  // Widest address, burst length and strobe over both memory kinds.
  localparam int unsigned ADDR_MAX = 34;
  localparam int unsigned LEN_MAX  = 8;
  localparam int unsigned STRB_MAX = 64;

  // HBM: 32 pseudo-channels of 256 MB, selected by address bits [32:28].
  localparam int unsigned HBM_ADDR_W   = 33;
  localparam int unsigned HBM_DATA_W   = 256;
  localparam int unsigned HBM_LEN_W    = 4;   // AXI3: up to 16 beats
  localparam int unsigned HBM_PSCH_LSB = 28;
  localparam int unsigned HBM_NUM_PSCH = 32;
  localparam int unsigned HBM_OFFS_W   = 5;   // 32 bytes per beat

  // DDR4: one 16 GB bank per AXI port.
  localparam int unsigned DDR_ADDR_W   = 34;
  localparam int unsigned DDR_DATA_W   = 512;
  localparam int unsigned DDR_LEN_W    = 8;   // AXI4: up to 256 beats
  localparam int unsigned DDR_OFFS_W   = 6;   // 64 bytes per beat

  // Width of the transaction counter (Num_trans), from the experiment count
  // 2^4 * 2^33 * ... of the run-time parameter space.
  localparam int unsigned NUM_TRANS_W  = 33;

  // AXI response codes.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Address mapping policies of the memory controllers. Capital letters,
  // most significant first: R row, C column, B bank, G bank group.
  typedef enum logic [3:0] {
    POL_HBM_RCB   = 4'd0,   // 14R-5C-2G-2B
    POL_HBM_BRC   = 4'd1,   // 2G-2B-14R-5C
    POL_HBM_BRGCG = 4'd2,   // 2B-14R-1G-5C-1G
    POL_HBM_RBC   = 4'd3,   // 14R-2G-2B-5C
    POL_HBM_RGBCG = 4'd4,   // 14R-1G-2B-5C-1G (HBM default)
    POL_DDR_RCB   = 4'd8,   // 17R-7C-2B-2G (DDR4 default)
    POL_DDR_RCBI  = 4'd9,   // 17R-6C-2B-1C-2G
    POL_DDR_BRC   = 4'd10,  // 2G-2B-17R-7C
    POL_DDR_RBC   = 4'd11   // 17R-2G-2B-7C
  } map_policy_e;

  // Masks, over the byte address, of the bits of each DRAM field.
  typedef struct packed {
    logic [ADDR_MAX-1:0] row;
    logic [ADDR_MAX-1:0] col;
    logic [ADDR_MAX-1:0] bank;
    logic [ADDR_MAX-1:0] bg;
  } field_masks_t;

  // Ones in bits hi..lo.
  function automatic logic [ADDR_MAX-1:0] bits(input int unsigned hi, input int unsigned lo);
    logic [ADDR_MAX-1:0] m;
    m = '0;
    for (int unsigned i = 0; i < ADDR_MAX; i++)
      if (i >= lo && i <= hi) m[i] = 1'b1;
    return m;
  endfunction

  function automatic field_masks_t policy_masks(input map_policy_e p);
    field_masks_t f;
    f = '0;
    unique case (p)
      POL_HBM_RCB: begin
        f.row = bits(27, 14); f.col = bits(13, 9); f.bg = bits(8, 7); f.bank = bits(6, 5);
      end
      POL_HBM_BRC: begin
        f.bg = bits(27, 26); f.bank = bits(25, 24); f.row = bits(23, 10); f.col = bits(9, 5);
      end
      POL_HBM_BRGCG: begin
        f.bank = bits(27, 26); f.row = bits(25, 12); f.bg = bits(11, 11) | bits(5, 5);
        f.col = bits(10, 6);
      end
      POL_HBM_RBC: begin
        f.row = bits(27, 14); f.bg = bits(13, 12); f.bank = bits(11, 10); f.col = bits(9, 5);
      end
      POL_HBM_RGBCG: begin
        f.row = bits(27, 14); f.bg = bits(13, 13) | bits(5, 5); f.bank = bits(12, 11);
        f.col = bits(10, 6);
      end
      POL_DDR_RCB: begin
        f.row = bits(33, 17); f.col = bits(16, 10); f.bank = bits(9, 8); f.bg = bits(7, 6);
      end
      POL_DDR_RCBI: begin
        f.row = bits(33, 17); f.col = bits(16, 11) | bits(8, 8); f.bank = bits(10, 9);
        f.bg = bits(7, 6);
      end
      POL_DDR_BRC: begin
        f.bg = bits(33, 32); f.bank = bits(31, 30); f.row = bits(29, 13); f.col = bits(12, 6);
      end
      POL_DDR_RBC: begin
        f.row = bits(33, 17); f.bg = bits(16, 15); f.bank = bits(14, 13); f.col = bits(12, 6);
      end
      default: f = '0;
    endcase
    return f;
  endfunction

  // Per-memory constants, chosen by the IS_DDR design parameter.
  function automatic int unsigned addr_w(input bit is_ddr);
    return is_ddr ? DDR_ADDR_W : HBM_ADDR_W;
  endfunction
  function automatic int unsigned data_w(input bit is_ddr);
    return is_ddr ? DDR_DATA_W : HBM_DATA_W;
  endfunction
  function automatic int unsigned len_w(input bit is_ddr);
    return is_ddr ? DDR_LEN_W : HBM_LEN_W;
  endfunction
  function automatic int unsigned offs_w(input bit is_ddr);
    return is_ddr ? DDR_OFFS_W : HBM_OFFS_W;
  endfunction

  // Pattern generator modes, picked by the mode selector.
  typedef enum logic [1:0] {
    MODE_SEQ   = 2'd0,   // repetitive sequential traversal
    MODE_RAND  = 2'd1,   // pseudo-random addresses
    MODE_TRACE = 2'd2    // SpMV access pattern, four ports of a group
  } mode_e;

  // One burst handed from an address generator to an AXI engine.
  typedef struct packed {
    logic [ADDR_MAX-1:0] addr;
    logic [LEN_MAX-1:0]  len;    // beats - 1
    logic [STRB_MAX-1:0] strb;   // byte strobes, applied to every beat
  } cmd_t;

  // Run-time parameters of one pattern generator.
  typedef struct packed {
    mode_e                  mode;
    logic [LEN_MAX-1:0]     len;        // Burst_Size - 1
    logic [NUM_TRANS_W-1:0] num_trans;  // Num_trans
    logic [4:0]             psch_init;  // PSCH_Addrr_Init
    logic [4:0]             psch_end;   // PSCH_Addrr_End
    logic [15:0]            x_stride;   // trace mode: x element stride between groups
  } cfg_t;

  // Results of one direction (read or write) of a run.
  typedef struct packed {
    logic        busy;
    logic        done;
    logic [63:0] cycles;    // first address valid to last response
    logic [31:0] latency;   // first address valid to first response
    logic [63:0] beats;     // data beats transferred
    logic [31:0] errors;    // responses other than OKAY
  } perf_t;

  // Results of a trace-mode run of a group of four ports.
  typedef struct packed {
    logic        busy;
    logic        done;
    logic [63:0] cycles;    // start to the last write response
    logic [31:0] rows;      // matrix rows completed
    logic [31:0] errors;    // responses other than OKAY, all four streams
  } trace_stat_t;

  // Register map of a pattern generator (byte offsets, 32-bit registers).
  localparam logic [7:0] REG_CTRL      = 8'h00;  // W: [0] start write, [1] start read,
                                                 //    [2] start trace; R/W: [5:4] mode
  localparam logic [7:0] REG_STATUS    = 8'h04;  // R: busy/done of write, read, trace
  localparam logic [7:0] REG_BURST     = 8'h08;  // Burst_Size - 1
  localparam logic [7:0] REG_NTRANS_LO = 8'h0C;  // Num_trans [31:0]
  localparam logic [7:0] REG_NTRANS_HI = 8'h10;  // Num_trans [32]
  localparam logic [7:0] REG_PSCH_INIT = 8'h14;
  localparam logic [7:0] REG_PSCH_END  = 8'h18;
  localparam logic [7:0] REG_XSTRIDE   = 8'h1C;
  localparam logic [7:0] REG_WR_CYC_LO = 8'h20;
  localparam logic [7:0] REG_WR_CYC_HI = 8'h24;
  localparam logic [7:0] REG_RD_CYC_LO = 8'h28;
  localparam logic [7:0] REG_RD_CYC_HI = 8'h2C;
  localparam logic [7:0] REG_WR_LAT    = 8'h30;
  localparam logic [7:0] REG_RD_LAT    = 8'h34;
  localparam logic [7:0] REG_WR_ERR    = 8'h38;
  localparam logic [7:0] REG_RD_ERR    = 8'h3C;
  localparam logic [7:0] REG_WR_BEATS  = 8'h40;  // [31:0]
  localparam logic [7:0] REG_RD_BEATS  = 8'h44;  // [31:0]
  localparam logic [7:0] REG_TR_CYC_LO = 8'h48;
  localparam logic [7:0] REG_TR_CYC_HI = 8'h4C;
  localparam logic [7:0] REG_TR_ROWS   = 8'h50;
  localparam logic [7:0] REG_TR_ERR    = 8'h54;

endpackage
