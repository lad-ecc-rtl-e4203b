// lad_ecc_rd: read side of LAD-ECC (ECC verification of one warp-register read).
//
// It sits behind one bank-group read port and takes, in the cycle the banks deliver the
// data, the raw warp-register, the ECC table entry read alongside it and the duplication
// bit of the operand being read. DMUX2 selects the path:
//   divergent (rd_dup = 0): the traditional entry's parity is checked; if it holds, 32
//     AP-ECC checkers (ecc_chk, bits 31..15) verify and correct each active thread's
//     register; inactive threads pass unchecked;
//   duplicate (rd_dup = 1): the duplication entry's parity is checked; if it holds, one
//     full-register checker (ecc_chk, PROT_LSB = 0) verifies the first active thread's
//     register, and that corrected value is given to every thread, so an error in any
//     other thread's copy cannot reach the program.
// When the parity of the entry fails the ECC itself is wrong: verification is skipped, the
// raw data pass through and st.ecc_invalid is set. The entry is repaired by the next write
// of that warp-register.
// chk_count is the number of register values verified this cycle.
// PROT_LSB sets the lowest per-thread checked bit: 15 (default) is AP-ECC, 0 checks all
// 32 bits of each divergent thread with a 7-bit code.
// Purely combinational; it adds no cycle to the register read. Paths, the broadcast of
// the first thread and the parity rule follow the design; status flags and operand
// isolation of unused checkers are this implementation's own.
module lad_ecc_rd
  import lad_ecc_pkg::*;
#(
  parameter int PROT_LSB = AP_LSB,
  localparam int EW      = ecc_width(REG_W - PROT_LSB),
  localparam int TW      = 1 + WARP_SIZE * EW
) (
  input  logic                valid,
  input  logic                rd_dup,
  input  lane_mask_t          mask,
  input  warp_reg_t           raw,
  input  logic [TW-1:0]       trad,
  input  dup_entry_t          dupe,
  output rd_result_t          res,
  output logic [LANE_W:0]     chk_count
);

  typedef struct packed {
    logic                         parity;
    logic [WARP_SIZE-1:0][EW-1:0] ecc;
  } trad_t;

  trad_t             tr;
  logic              trad_par_ok, dup_par_ok, trad_sel, dup_sel;
  logic [LANE_W-1:0] first;
  warp_reg_t         trad_out;
  lane_mask_t        trad_ce, trad_ue;
  reg_t              dup_in, dup_out;
  logic              dup_ce, dup_ue;

  assign tr          = trad;
  assign trad_par_ok = ~^tr;
  assign dup_par_ok  = ~^dupe;
  assign first       = first_lane(mask);
  assign trad_sel    = valid && !rd_dup && trad_par_ok;   // DMUX2 output 0
  assign dup_sel     = valid &&  rd_dup && dup_par_ok;    // DMUX2 output 1

  // ECC Checkers1
  for (genvar t = 0; t < WARP_SIZE; t++) begin : g_chk1
    reg_t    cin, cout;
    logic [EW-1:0] ein;
    logic    ce, ue;
    assign cin = (trad_sel && mask[t]) ? raw[t] : '0;
    assign ein = (trad_sel && mask[t]) ? tr.ecc[t] : '0;
    ecc_chk #(.REG_BITS(REG_W), .PROT_LSB(PROT_LSB)) u_chk (
      .data(cin), .ecc(ein), .data_out(cout), .ce(ce), .ue(ue));
    assign trad_out[t] = (trad_sel && mask[t]) ? cout : raw[t];
    assign trad_ce[t]  = trad_sel && mask[t] && ce;
    assign trad_ue[t]  = trad_sel && mask[t] && ue;
  end

  // ECC Checkers2
  assign dup_in = dup_sel ? raw[first] : '0;
  ecc_chk #(.REG_BITS(REG_W), .PROT_LSB(0)) u_chk2 (
    .data(dup_in), .ecc(dup_sel ? dupe.ecc : '0), .data_out(dup_out), .ce(dup_ce), .ue(dup_ue));

  always_comb begin
    res             = '0;
    res.st.dup      = rd_dup;
    chk_count       = '0;
    if (!rd_dup) begin
      res.data           = trad_out;
      res.st.ecc_invalid = valid && !trad_par_ok;
      res.st.ce          = trad_ce;
      res.st.ue          = trad_ue;
      if (trad_sel) chk_count = ($bits(chk_count))'($countones(mask));
    end else begin
      for (int t = 0; t < WARP_SIZE; t++)
        res.data[t] = dup_sel ? dup_out : raw[first];
      res.st.ecc_invalid = valid && !dup_par_ok;
      res.st.ce[first]   = dup_sel && dup_ce;
      res.st.ue[first]   = dup_sel && dup_ue;
      if (dup_sel) chk_count = 1;
    end
  end

endmodule
