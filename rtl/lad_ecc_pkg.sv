// lad_ecc_pkg: sizes, types and helper functions shared by the LAD-ECC register file.
//
// The register file follows a GPU streaming multiprocessor with a 128KB register file:
// 32 banks of 256 entries x 128 bits (four 32-bit registers per entry). A warp of 32
// threads keeps one architectural register (a "warp-register", 32 x 32 bits) in the same
// entry of 8 consecutive banks, so the 32 banks form 4 bank groups of 8 and hold 1024
// warp-registers.
//
// Two ECC codes are used. The approximation-aware code (AP-ECC) protects only bits 31..15
// of a register (sign, 8 exponent bits and the upper 8 mantissa bits, 17 bits) with a
// 6-bit Hamming SEC-DED code. The duplication path protects the whole 32-bit register of
// one thread with a 7-bit Hamming SEC-DED code. Both are built from the generic Hamming
// helpers below: data bit k sits at the k-th Hamming position that is not a power of two;
// parity bit i covers the positions whose index has bit i set; one more bit is the
// overall parity of data and Hamming bits.
//
// Each instruction carries "duplication information" bits, one per operand, produced by
// the compiler: the highest bit belongs to the destination, the others to the sources,
// the first source taking the next lower bit. A bit is 1 for a duplicate operand (same
// value in every thread) and 0 for a divergent one.
package lad_ecc_pkg;

  localparam int REG_W          = 32;    // register width
  localparam int WARP_SIZE      = 32;    // threads per warp
  localparam int NUM_BANKS      = 32;    // banks per register file
  localparam int BANK_ENTRIES   = 256;   // entries per bank
  localparam int REGS_PER_ENTRY = 4;     // 32-bit registers per 128-bit bank entry
  localparam int BANK_W         = REG_W * REGS_PER_ENTRY;               // 128
  localparam int BANKS_PER_WREG = WARP_SIZE / REGS_PER_ENTRY;           // 8
  localparam int NUM_GROUPS     = NUM_BANKS / BANKS_PER_WREG;           // 4
  localparam int NUM_WREG       = NUM_GROUPS * BANK_ENTRIES;            // 1024
  localparam int WREG_AW        = $clog2(NUM_WREG);                     // 10
  localparam int GROUP_W        = $clog2(NUM_GROUPS);                   // 2
  localparam int ENTRY_AW       = $clog2(BANK_ENTRIES);                 // 8
  localparam int LANE_W         = $clog2(WARP_SIZE);                    // 5
  localparam int MAX_SRC        = 4;     // source operands per instruction
  localparam int NSRC_W         = 3;     // width of a source count 0..MAX_SRC
  localparam int WARP_ID_W      = 6;     // 64 warps per SM
  localparam int AP_LSB         = 15;    // lowest bit protected by AP-ECC

  // Number of Hamming check bits for dw data bits (without the overall parity bit).
  function automatic int ecc_hbits(input int dw);
    int r;
    r = 0;
    while ((1 << r) < dw + r + 1) r++;
    return r;
  endfunction

  // Width of a SEC-DED code word's check part: Hamming bits plus overall parity.
  function automatic int ecc_width(input int dw);
    return ecc_hbits(dw) + 1;
  endfunction

  // 1-based Hamming position of data bit k.
  function automatic int data_pos(input int k);
    int pos, n;
    pos = 0;
    n   = -1;
    while (n < k) begin
      pos++;
      if ((pos & (pos - 1)) != 0) n++;
    end
    return pos;
  endfunction

  // Mask of the data bits that Hamming parity bit i covers.
  function automatic logic [63:0] parity_mask(input int dw, input int i);
    logic [63:0] m;
    m = '0;
    for (int k = 0; k < dw; k++)
      if (((data_pos(k) >> i) & 1) == 1) m[k] = 1'b1;
    return m;
  endfunction

  localparam int AP_ECC_W  = ecc_width(REG_W - AP_LSB);   // 6
  localparam int DUP_ECC_W = ecc_width(REG_W);            // 7

  typedef logic [REG_W-1:0]                 reg_t;
  typedef reg_t [WARP_SIZE-1:0]             warp_reg_t;
  typedef logic [WARP_SIZE-1:0]             lane_mask_t;
  typedef logic [WREG_AW-1:0]               wreg_addr_t;
  typedef logic [AP_ECC_W-1:0]              ap_ecc_t;
  typedef logic [DUP_ECC_W-1:0]             dup_ecc_t;

  // ECC table entry of a divergent warp-register: one AP-ECC field per thread and a
  // parity bit that keeps the whole entry at even parity.
  typedef struct packed {
    logic                        parity;
    ap_ecc_t [WARP_SIZE-1:0]     ecc;
  } trad_entry_t;

  // ECC table entry of a duplicate warp-register: one full-register ECC and its parity.
  typedef struct packed {
    logic     parity;
    dup_ecc_t ecc;
  } dup_entry_t;

  // Outcome of the ECC verification of one warp-register read.
  typedef struct packed {
    logic       dup;          // verified on the duplicate path
    logic       ecc_invalid;  // entry parity failed: verification skipped
    lane_mask_t ce;           // single error corrected, per thread
    lane_mask_t ue;           // uncorrectable error detected, per thread
  } rd_status_t;

  typedef struct packed {
    warp_reg_t  data;
    rd_status_t st;
  } rd_result_t;

  // A warp instruction entering the operand collector.
  typedef struct packed {
    logic [WARP_ID_W-1:0]              warp_id;
    logic [NSRC_W-1:0]                 nsrc;      // 0..MAX_SRC source operands
    wreg_addr_t [MAX_SRC-1:0]          src;       // physical warp-register of each source
    logic [MAX_SRC:0]                  dup_info;  // duplication information bits
    lane_mask_t                        mask;      // active threads
  } instr_t;

  // Bank group and bank entry of a warp-register: consecutive warp-registers go to
  // consecutive bank groups.
  function automatic logic [GROUP_W-1:0] wreg_group(input wreg_addr_t a);
    return a[GROUP_W-1:0];
  endfunction

  function automatic logic [ENTRY_AW-1:0] wreg_entry(input wreg_addr_t a);
    return a[WREG_AW-1:GROUP_W];
  endfunction

  // Duplication bit of source operand i of an instruction with nsrc sources.
  function automatic logic src_is_dup(input logic [MAX_SRC:0] info, input int nsrc, input int i);
    return info[nsrc-1-i];
  endfunction

  // Duplication bit of the destination operand.
  function automatic logic dst_is_dup(input logic [MAX_SRC:0] info, input int nsrc);
    return info[nsrc];
  endfunction

  // Index of the lowest set bit of an active mask (0 when the mask is empty).
  function automatic logic [LANE_W-1:0] first_lane(input lane_mask_t m);
    logic [LANE_W-1:0] f;
    f = '0;
    for (int t = WARP_SIZE - 1; t >= 0; t--)
      if (m[t]) f = LANE_W'(t);
    return f;
  endfunction

endpackage
