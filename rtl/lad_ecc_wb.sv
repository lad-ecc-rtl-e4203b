// lad_ecc_wb: writeback side of LAD-ECC (ECC generation for one warp-register write).
//
// DMUX1 looks at the destination's duplication bit (the highest duplication-information
// bit of the instruction) and sends the written warp-register down one of two paths:
//   divergent (wb_dup = 0): 32 AP-ECC generators (ecc_gen, bits 31..15, 6-bit code) encode
//     each active thread's register, and the ECC table fields of those threads are written;
//   duplicate (wb_dup = 1): one full-register generator (ecc_gen with PROT_LSB = 0, 7-bit
//     code) encodes only the first active thread's register, and only the duplication part
//     of the entry is written; the per-thread fields are gated by the ECC table.
// The register data itself go to the banks unchanged. The generators of the unused path
// see zero inputs, so they do not toggle (the energy the scheme saves).
// gen_count is the number of register values encoded this cycle (active threads on the
// divergent path, 1 on the duplicate path, 0 when idle), the quantity the energy figures
// of the scheme are built from.
// PROT_LSB sets the lowest per-thread protected bit: 15 (default) is AP-ECC, 0 protects
// all 32 bits of each divergent thread with a 7-bit code.
// Combinational: the ECC write happens in the same cycle as the register write.
// Paths, code widths and the first-valid-thread rule follow the design; operand isolation
// by zeroing and the gen_count output are this implementation's additions.
module lad_ecc_wb
  import lad_ecc_pkg::*;
#(
  parameter int PROT_LSB = AP_LSB,
  localparam int EW      = ecc_width(REG_W - PROT_LSB)
) (
  input  logic                     wb_valid,
  input  wreg_addr_t               wb_wreg,
  input  lane_mask_t               wb_mask,
  input  logic                     wb_dup,
  input  warp_reg_t                wb_data,
  // to the register banks
  output logic                     rf_wr_en,
  output wreg_addr_t               rf_wr_wreg,
  output lane_mask_t               rf_wr_mask,
  output warp_reg_t                rf_wr_data,
  // to the ECC table
  output logic                     et_wr_en,
  output wreg_addr_t               et_wr_wreg,
  output logic                     et_wr_dup,
  output lane_mask_t               et_wr_lanes,
  output logic [WARP_SIZE-1:0][EW-1:0] et_wr_ap_ecc,
  output dup_ecc_t                 et_wr_dup_ecc,
  output logic [LANE_W:0]          gen_count
);

  logic              any_lane, trad_sel, dup_sel;
  logic [LANE_W-1:0] first;
  reg_t              dup_in;

  assign any_lane = |wb_mask;
  assign trad_sel = wb_valid && any_lane && !wb_dup;   // DMUX1 output 0
  assign dup_sel  = wb_valid && any_lane &&  wb_dup;   // DMUX1 output 1
  assign first    = first_lane(wb_mask);

  // ECC Generators1: one AP-ECC generator per thread
  for (genvar t = 0; t < WARP_SIZE; t++) begin : g_gen1
    reg_t gin;
    assign gin = (trad_sel && wb_mask[t]) ? wb_data[t] : '0;
    ecc_gen #(.REG_BITS(REG_W), .PROT_LSB(PROT_LSB)) u_gen (.data(gin), .ecc(et_wr_ap_ecc[t]));
  end

  // ECC Generators2: one full-register generator for the first active thread
  assign dup_in = dup_sel ? wb_data[first] : '0;
  ecc_gen #(.REG_BITS(REG_W), .PROT_LSB(0)) u_gen2 (.data(dup_in), .ecc(et_wr_dup_ecc));

  assign rf_wr_en   = wb_valid && any_lane;
  assign rf_wr_wreg = wb_wreg;
  assign rf_wr_mask = wb_mask;
  assign rf_wr_data = wb_data;

  assign et_wr_en    = wb_valid && any_lane;
  assign et_wr_wreg  = wb_wreg;
  assign et_wr_dup   = wb_dup;
  assign et_wr_lanes = trad_sel ? wb_mask : '0;

  always_comb begin
    gen_count = '0;
    if (dup_sel) gen_count = 1;
    else if (trad_sel) gen_count = ($bits(gen_count))'($countones(wb_mask));
  end

endmodule
