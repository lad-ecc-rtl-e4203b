// lad_ecc_rf: register file of one GPU SIMT core protected by LAD-ECC.
//
// The register file (128KB, 32 banks in 4 groups of 8, 1024 warp-registers of 32 x 32
// bits) is protected by an ECC scheme that spends energy only where it matters:
//   - approximation awareness (AP-ECC): for divergent warp-registers each thread's
//     register carries a 6-bit SEC-DED code over bits 31..15 only (sign, exponent, upper 8
//     mantissa bits); errors in bits 14..0 are tolerated;
//   - duplication awareness (DA-ECC): when the compiler marks a warp-register duplicate
//     (all threads hold one value), one 7-bit SEC-DED code over the first active thread's
//     whole register replaces the 32 per-thread codes, the per-thread fields are power
//     gated, and a duplicate read verifies only that thread and broadcasts its value;
//   - each ECC table entry carries a parity bit; a read whose entry fails parity skips
//     verification rather than "correcting" with a corrupt code.
//
// Structure: writeback -> lad_ecc_wb (DMUX1 + generators) -> register_file and ecc_table.
// Issue -> operand_collector (bank_arbiter, rf_crossbar) -> reads on the 4 bank-group
// ports -> register_file and ecc_table -> one lad_ecc_rd per group (DMUX2 + checkers) ->
// back to the collector -> dispatch.
//
// Interface:
//   issue      in_valid / in_ready / in_instr: a warp instruction (warp id, up to 4 source
//              warp-registers, duplication information bits, active mask).
//   dispatch   out_valid / out_ready and the verified operands with per-thread ECC status
//              (corrected, uncorrectable, entry invalid) and the destination's dup bit.
//   writeback  wb_valid, wb_wreg, wb_mask, wb_dup, wb_data: one warp-register write per
//              cycle, taking effect at the clock edge; wb_dup is the destination's bit.
//   statistics ecc_gen_count / ecc_chk_count: register values encoded / verified this
//              cycle; bank_conflict: a read lost bank arbitration this cycle;
//              dup_entries: warp-registers whose per-thread ECC fields are power gated.
// Timing: ECC generation and checking add no cycle; an instruction with no bank conflict
// dispatches 2 cycles after it is accepted.
// The mechanism follows the design; warp-register addressing, the handshakes, the single
// operand collector and the statistics outputs are this implementation's choices.
module lad_ecc_rf
  import lad_ecc_pkg::*;
#(
  // lowest register bit covered by the per-thread code: 15 = AP-ECC (sign, exponent,
  // 8 mantissa bits, 6-bit code); 0 = full per-thread protection (7-bit code), for
  // programs that tolerate no error in any bit
  parameter int PROT_LSB = AP_LSB,
  localparam int EW      = ecc_width(REG_W - PROT_LSB),
  localparam int TW      = 1 + WARP_SIZE * EW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // issue
  input  logic                         in_valid,
  output logic                         in_ready,
  input  instr_t                       in_instr,
  // dispatch
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [WARP_ID_W-1:0]         out_warp_id,
  output logic [NSRC_W-1:0]            out_nsrc,
  output lane_mask_t                   out_mask,
  output logic                         out_dst_dup,
  output rd_result_t [MAX_SRC-1:0]     out_opnd,
  // writeback
  input  logic                         wb_valid,
  input  wreg_addr_t                   wb_wreg,
  input  lane_mask_t                   wb_mask,
  input  logic                         wb_dup,
  input  warp_reg_t                    wb_data,
  // statistics
  output logic [LANE_W:0]              ecc_gen_count,
  output logic [LANE_W+2:0]            ecc_chk_count,
  output logic                         bank_conflict,
  output logic [WREG_AW:0]             dup_entries
);

  // writeback side
  logic                    rf_wr_en, et_wr_en, et_wr_dup;
  wreg_addr_t              rf_wr_wreg, et_wr_wreg;
  lane_mask_t              rf_wr_mask, et_wr_lanes;
  warp_reg_t               rf_wr_data;
  logic [WARP_SIZE-1:0][EW-1:0] et_wr_ap_ecc;
  dup_ecc_t                et_wr_dup_ecc;

  lad_ecc_wb #(.PROT_LSB(PROT_LSB)) u_wb (
    .wb_valid      (wb_valid),
    .wb_wreg       (wb_wreg),
    .wb_mask       (wb_mask),
    .wb_dup        (wb_dup),
    .wb_data       (wb_data),
    .rf_wr_en      (rf_wr_en),
    .rf_wr_wreg    (rf_wr_wreg),
    .rf_wr_mask    (rf_wr_mask),
    .rf_wr_data    (rf_wr_data),
    .et_wr_en      (et_wr_en),
    .et_wr_wreg    (et_wr_wreg),
    .et_wr_dup     (et_wr_dup),
    .et_wr_lanes   (et_wr_lanes),
    .et_wr_ap_ecc  (et_wr_ap_ecc),
    .et_wr_dup_ecc (et_wr_dup_ecc),
    .gen_count     (ecc_gen_count)
  );

  // read side
  logic        [NUM_GROUPS-1:0]                rd_en, chk_valid, chk_dup;
  wreg_addr_t  [NUM_GROUPS-1:0]                rd_wreg;
  logic        [NUM_GROUPS-1:0][ENTRY_AW-1:0]  rd_entry;
  lane_mask_t                                  chk_mask;
  warp_reg_t   [NUM_GROUPS-1:0]                rd_data;
  logic        [NUM_GROUPS-1:0][TW-1:0]        rd_trad;
  dup_entry_t  [NUM_GROUPS-1:0]                rd_dupe;
  rd_result_t  [NUM_GROUPS-1:0]                rd_res;
  logic        [NUM_GROUPS-1:0][LANE_W:0]      chk_cnt;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_port
    assign rd_entry[g] = wreg_entry(rd_wreg[g]);
    lad_ecc_rd #(.PROT_LSB(PROT_LSB)) u_rd (
      .valid     (chk_valid[g]),
      .rd_dup    (chk_dup[g]),
      .mask      (chk_mask),
      .raw       (rd_data[g]),
      .trad      (rd_trad[g]),
      .dupe      (rd_dupe[g]),
      .res       (rd_res[g]),
      .chk_count (chk_cnt[g])
    );
  end

  register_file u_rf (
    .clk      (clk),
    .wr_en    (rf_wr_en),
    .wr_wreg  (rf_wr_wreg),
    .wr_mask  (rf_wr_mask),
    .wr_data  (rf_wr_data),
    .rd_en    (rd_en),
    .rd_entry (rd_entry),
    .rd_data  (rd_data)
  );

  ecc_table #(.ENTRIES(NUM_WREG), .NRD(NUM_GROUPS), .PROT_LSB(PROT_LSB)) u_et (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en       (et_wr_en),
    .wr_wreg     (et_wr_wreg),
    .wr_dup      (et_wr_dup),
    .wr_lanes    (et_wr_lanes),
    .wr_ap_ecc   (et_wr_ap_ecc),
    .wr_dup_ecc  (et_wr_dup_ecc),
    .rd_en       (rd_en),
    .rd_wreg     (rd_wreg),
    .rd_trad     (rd_trad),
    .rd_dup      (rd_dupe),
    .dup_entries (dup_entries)
  );

  operand_collector u_oc (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .in_instr    (in_instr),
    .rd_en       (rd_en),
    .rd_wreg     (rd_wreg),
    .chk_valid   (chk_valid),
    .chk_dup     (chk_dup),
    .chk_mask    (chk_mask),
    .rd_res      (rd_res),
    .out_valid   (out_valid),
    .out_ready   (out_ready),
    .out_warp_id (out_warp_id),
    .out_nsrc    (out_nsrc),
    .out_mask    (out_mask),
    .out_dst_dup (out_dst_dup),
    .out_opnd    (out_opnd),
    .conflict    (bank_conflict)
  );

  always_comb begin
    ecc_chk_count = '0;
    for (int g = 0; g < NUM_GROUPS; g++) ecc_chk_count += ($bits(ecc_chk_count))'(chk_cnt[g]);
  end

endmodule
