// ecc_table: ECC storage of the LAD-ECC register file, one entry per warp-register.
//
// Each entry has two parts, of which only one is powered at a time:
//   - the traditional part: one AP-ECC field per thread (6 bits with the default
//     PROT_LSB = 15, 7 bits with PROT_LSB = 0) plus a parity bit, used while
//     the warp-register holds divergent values;
//   - the duplication part: one 7-bit full-register ECC plus a parity bit, used while the
//     warp-register holds the same value in every thread.
// A per-entry mode bit (dup_mode) records which part is live; the other part is power
// gated, modelled as losing its contents (it reads as all zeros until written again).
// The parity bit keeps its part at even parity, so a read can tell a corrupted ECC entry.
//
// Write (one per cycle, from the writeback side):
//   wr_dup = 0: the AP-ECC fields of the threads in wr_lanes are replaced, the others kept
//     (they read as zero if the entry was gated); parity is recomputed over the merged
//     entry; the entry switches to divergent mode.
//   wr_dup = 1: the duplication part takes wr_dup_ecc and its parity; the entry switches to
//     duplicate mode and the traditional part is gated.
// Reads: one port per bank group; rd_trad / rd_dup show the entry of rd_wreg one cycle
// after rd_en, in step with the register banks. A read of the entry being written returns
// the old contents.
// dup_entries counts the entries in duplicate mode, i.e. those whose 32 AP-ECC fields are
// gated. The two parts, the parity bit and gating of unused fields follow the design; the
// zero read-out of a gated part, the mode bit and the merge on a partial write are this
// implementation's choices. Only the mode bits and the counter are reset.
module ecc_table
  import lad_ecc_pkg::*;
#(
  parameter int ENTRIES  = NUM_WREG,
  parameter int NRD      = NUM_GROUPS,
  parameter int PROT_LSB = AP_LSB,
  localparam int AW      = $clog2(ENTRIES),
  localparam int EW      = ecc_width(REG_W - PROT_LSB),   // per-thread code width
  localparam int TW      = 1 + WARP_SIZE * EW             // traditional part with parity
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_wreg,
  input  logic                         wr_dup,
  input  lane_mask_t                   wr_lanes,
  input  logic [WARP_SIZE-1:0][EW-1:0] wr_ap_ecc,
  input  dup_ecc_t                     wr_dup_ecc,
  input  logic [NRD-1:0]               rd_en,
  input  logic [NRD-1:0][AW-1:0]       rd_wreg,
  output logic [NRD-1:0][TW-1:0]      rd_trad,
  output dup_entry_t  [NRD-1:0]        rd_dup,
  output logic [AW:0]                  dup_entries
);

  typedef struct packed {
    logic                         parity;
    logic [WARP_SIZE-1:0][EW-1:0] ecc;
  } trad_t;

  trad_t                trad_mem [ENTRIES];
  dup_entry_t           dup_mem  [ENTRIES];
  logic [ENTRIES-1:0]   dup_mode;

  trad_t old_trad, new_trad;

  always_comb begin
    old_trad = dup_mode[wr_wreg] ? '0 : trad_mem[wr_wreg];
    new_trad = old_trad;
    for (int t = 0; t < WARP_SIZE; t++)
      if (wr_lanes[t]) new_trad.ecc[t] = wr_ap_ecc[t];
    new_trad.parity = ^new_trad.ecc;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_dup) dup_mem[wr_wreg]  <= '{parity: ^wr_dup_ecc, ecc: wr_dup_ecc};
      else        trad_mem[wr_wreg] <= new_trad;
    end
    for (int p = 0; p < NRD; p++)
      if (rd_en[p]) begin
        rd_trad[p] <= dup_mode[rd_wreg[p]] ? '0 : trad_mem[rd_wreg[p]];
        rd_dup[p]  <= dup_mode[rd_wreg[p]] ? dup_mem[rd_wreg[p]] : '0;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dup_mode    <= '0;
      dup_entries <= '0;
    end else if (wr_en) begin
      dup_mode[wr_wreg] <= wr_dup;
      if (wr_dup && !dup_mode[wr_wreg])      dup_entries <= dup_entries + 1'b1;
      else if (!wr_dup && dup_mode[wr_wreg]) dup_entries <= dup_entries - 1'b1;
    end
  end

endmodule
