// rf_bank: one register-file bank, 4KB = 256 entries x 128 bits, one read and one write
// port (1R1W). An entry holds four 32-bit registers, the registers of four consecutive
// threads of one warp-register.
//
// Write: when we is high, the registers selected by wmask (one bit per 32-bit register) of
// entry waddr take their slice of wdata at the clock edge.
// Read: when re is high, rdata shows entry raddr from the next cycle on and holds until the
// next read. A read of the entry being written in the same cycle returns the old value.
// Sizes follow the design; the per-register write mask and read-before-write are this
// implementation's own choices. No reset: the contents start undefined.
module rf_bank
  import lad_ecc_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int REGS    = 4,
  parameter int RW      = 32,
  localparam int AW     = $clog2(ENTRIES)
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [REGS-1:0]        wmask,
  input  logic [REGS*RW-1:0]     wdata,
  input  logic                   re,
  input  logic [AW-1:0]          raddr,
  output logic [REGS*RW-1:0]     rdata
);

  logic [REGS-1:0][RW-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    if (we)
      for (int r = 0; r < REGS; r++)
        if (wmask[r]) mem[waddr][r] <= wdata[r*RW +: RW];
  end

endmodule
