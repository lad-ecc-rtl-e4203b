// register_file: the 128KB banked register file of one SM, 32 rf_bank instances.
//
// A warp-register (one 32-bit register in each of the 32 threads of a warp) lives in the
// same entry of 8 consecutive banks, thread t in bank 8*g + t/4, register slot t%4, where
// g is its bank group. Warp-register a uses bank group a[1:0] and entry a[9:2], so
// consecutive warp-registers fall into different groups.
//
// Ports: one warp-register write per cycle (the writeback), with a per-thread write mask;
// one warp-register read per bank group per cycle (NUM_GROUPS read ports), each addressed
// by a bank entry. Read data appear one cycle after rd_en and hold until the next read on
// that port. Both ports can be used in the same cycle (each bank is 1R1W); a read of the
// warp-register being written returns the old value.
// Bank count, bank size, entry width and the 8-bank warp-register layout follow the
// design; the address interleaving over groups is this implementation's choice.
module register_file
  import lad_ecc_pkg::*;
(
  input  logic                               clk,
  // writeback
  input  logic                               wr_en,
  input  wreg_addr_t                         wr_wreg,
  input  lane_mask_t                         wr_mask,
  input  warp_reg_t                          wr_data,
  // one read port per bank group
  input  logic       [NUM_GROUPS-1:0]        rd_en,
  input  logic       [NUM_GROUPS-1:0][ENTRY_AW-1:0] rd_entry,
  output warp_reg_t  [NUM_GROUPS-1:0]        rd_data
);

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_grp
    logic wsel;
    assign wsel = wr_en && (wreg_group(wr_wreg) == GROUP_W'(g));
    for (genvar b = 0; b < BANKS_PER_WREG; b++) begin : g_bank
      logic [BANK_W-1:0] wdata, rdata;
      assign wdata = wr_data[b*REGS_PER_ENTRY +: REGS_PER_ENTRY];
      rf_bank #(.ENTRIES(BANK_ENTRIES), .REGS(REGS_PER_ENTRY), .RW(REG_W)) u_bank (
        .clk   (clk),
        .we    (wsel),
        .waddr (wreg_entry(wr_wreg)),
        .wmask (wr_mask[b*REGS_PER_ENTRY +: REGS_PER_ENTRY]),
        .wdata (wdata),
        .re    (rd_en[g]),
        .raddr (rd_entry[g]),
        .rdata (rdata)
      );
      for (genvar r = 0; r < REGS_PER_ENTRY; r++) begin : g_reg
        assign rd_data[g][b*REGS_PER_ENTRY+r] = rdata[r*REG_W +: REG_W];
      end
    end
  end

endmodule
