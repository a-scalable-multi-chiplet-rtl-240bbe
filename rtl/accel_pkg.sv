// accel_pkg: types and constants shared by the multi-chiplet accelerator.
//
// Precision modes of the MAC pair (8b x 8b, 8b x 4b, 16b x 8b activation x
// weight), weight-buffer sharing modes (UMA and the three NUMA modes), the
// core's instruction encoding, its host memory map, and the 64-bit packet
// ("flit") format carried between chiplets. The precision modes and the
// sharing modes follow the design; the encodings, the memory map and the
// packet format are this implementation's own choices.
package accel_pkg;

  // ---------------- MAC precision modes ----------------
  typedef enum logic [1:0] {
    PREC_A8W8  = 2'd0,   // two 8b x 8b products per MAC pair
    PREC_A8W4  = 2'd1,   // four 8b x 4b products per MAC pair
    PREC_A16W8 = 2'd2    // one 16b x 8b product per MAC pair
  } prec_e;

  // ---------------- weight buffer sharing modes ----------------
  // Group size 1/2/4/8 PEs per (merged) bank; 1-tile/2-tile/4-tile/8-tile.
  typedef enum logic [1:0] {
    WB_UMA   = 2'd0,     // bank i feeds PE i
    WB_DUAL  = 2'd1,     // banks merged in pairs, each pair feeds 2 PEs
    WB_QUAD  = 2'd2,     // banks merged in fours, each feeds 4 PEs
    WB_FULL  = 2'd3      // all banks merged, shared by all 8 PEs
  } wb_mode_e;

  // ---------------- core geometry ----------------
  localparam int unsigned NPE      = 8;     // Flexible Tensor PEs per core
  localparam int unsigned COLS     = 16;    // MAC columns per PE
  localparam int unsigned PAIRS    = 4;     // MAC pairs per column (8 MAC rows)
  localparam int unsigned ACC_W    = 32;    // accumulator width
  localparam int unsigned PSUM_W   = 24;    // width of one MAC pair's sum
  localparam int unsigned WORD_W   = 64;    // memory word / flit width
  localparam int unsigned WROW_W   = COLS * PAIRS * 16;  // one weight row

  // ---------------- core memory sizes ----------------
  localparam int unsigned LLC_DEPTH = 32768; // 64-bit words, 256 KB
  localparam int unsigned L1_DEPTH  = 1024;  // 64-bit words per PE, 8 KB
  localparam int unsigned WB_ROWS   = 128;   // rows per weight bank

  // ---------------- core host memory map (64-bit word addresses) ----------
  // addr[19:18] selects the region.
  localparam logic [1:0] REG_LLC  = 2'd0;   // [14:0] LLC word
  localparam logic [1:0] REG_WB   = 2'd1;   // [13:11] bank [10:4] row [3:0] sub-bank
  localparam logic [1:0] REG_CTRL = 2'd3;   // [0]: 0 instruction, 1 status

  // ---------------- instructions (64 bits) ----------------
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_LOADL1 = 4'd1,
    OP_CONV   = 4'd2,
    OP_ELTW   = 4'd3,
    OP_POOL   = 4'd4,
    OP_SCALE  = 4'd5
  } op_e;

  // LOADL1: copy cnt LLC words from src to L1[dst..] of each PE in mask
  typedef struct packed {
    op_e         op;        // [63:60]
    logic [7:0]  mask;      // [59:52]
    logic [14:0] src;       // [51:37]
    logic [9:0]  dst;       // [36:27]
    logic [10:0] cnt;       // [26:16]
    logic [15:0] rsvd;
  } ins_load_t;

  // CONV: K accumulation steps; PE p writes its results at dst + p*words
  typedef struct packed {
    op_e         op;        // [63:60]
    prec_e       prec;      // [59:58]
    wb_mode_e    wbmode;    // [57:56]
    logic [9:0]  l1a;       // [55:46] first activation vector in L1
    logic [9:0]  wa;        // [45:36] first weight row (group address space)
    logic [10:0] k;         // [35:25] steps (>= 1)
    logic [14:0] dst;       // [24:10] LLC result address
    logic [4:0]  shift;     // [9:5]
    logic        relu;      // [4]
    logic [3:0]  rsvd;
  } ins_conv_t;

  // ELTW / POOL / SCALE: cnt words, dst[i] = f(src0[i], src1[i])
  typedef struct packed {
    op_e         op;        // [63:60]
    logic [14:0] src0;      // [59:45]
    logic [14:0] src1;      // [44:30]
    logic [14:0] dst;       // [29:15]
    logic [10:0] cnt;       // [14:4]
    logic [3:0]  shift;     // [3:0] SCALE only; SCALE takes its multiplier from src1[7:0]
  } ins_vec_t;

  // ---------------- inter-chiplet packets ----------------
  typedef enum logic [3:0] {
    PK_WRITE = 4'd0,        // head + len data flits
    PK_READ  = 4'd1,        // head only, answered by PK_RESP
    PK_RESP  = 4'd2         // head + len data flits
  } pkind_e;

  typedef struct packed {
    pkind_e      kind;      // [63:60]
    logic [3:0]  target;    // [59:56] 0..3 HUB cores, 4..9 SIDE chiplets
    logic [11:0] len;       // [55:44] data words (1..4095)
    logic [11:0] tag;       // [43:32] free for the requester, echoed in RESP
    logic [31:0] addr;      // [31:0] 64-bit word address in the target
  } head_t;

  localparam int unsigned PAGE_WORDS = 512;  // 4 KB page of 64-bit words

endpackage
