// ecc_chk: Hamming SEC-DED checker and corrector for the protected part of one register.
//
// Recomputes the Hamming bits over data[REG_BITS-1:PROT_LSB] and compares them with the
// stored ecc (same layout as ecc_gen) to form a syndrome, and recomputes the overall parity:
//   syndrome 0, parity ok          -> no error
//   parity wrong, syndrome points  -> single error; a data bit at that position is flipped
//     at a valid position             back (an error in a check bit needs no data change)
//   parity ok, syndrome non-zero   -> double error, reported as uncorrectable
//   parity wrong, syndrome beyond  -> multiple error, reported as uncorrectable
//     the last position
// Bits below PROT_LSB pass unchanged and unchecked: with the default PROT_LSB = 15 this is
// the AP-ECC checker, which ignores errors in the lower mantissa bits. PROT_LSB = 0 gives
// the full-register checker of the duplication path.
//
// Purely combinational.
module ecc_chk
  import lad_ecc_pkg::*;
#(
  parameter int REG_BITS = 32,
  parameter int PROT_LSB = 15,
  localparam int DW   = REG_BITS - PROT_LSB,
  localparam int R    = ecc_hbits(DW),
  localparam int EW   = R + 1,
  localparam int NPOS = DW + R
) (
  input  logic [REG_BITS-1:0] data,
  input  logic [EW-1:0]       ecc,
  output logic [REG_BITS-1:0] data_out,
  output logic                ce,   // single error corrected
  output logic                ue    // uncorrectable error detected
);

  logic [DW-1:0] d, flip;
  logic [R-1:0]  syn;
  logic          par_err, pos_bad;

  assign d = data[REG_BITS-1:PROT_LSB];

  for (genvar i = 0; i < R; i++) begin : g_syn
    localparam logic [63:0] M = parity_mask(DW, i);
    assign syn[i] = ecc[i] ^ (^(d & M[DW-1:0]));
  end

  assign par_err = (^d) ^ (^ecc);
  assign pos_bad = int'(syn) > NPOS;

  for (genvar k = 0; k < DW; k++) begin : g_fix
    localparam int POS = data_pos(k);
    assign flip[k] = par_err && (int'(syn) == POS);
  end

  if (PROT_LSB > 0) begin : g_low
    assign data_out = {d ^ flip, data[PROT_LSB-1:0]};
  end else begin : g_full
    assign data_out = d ^ flip;
  end
  assign ce       = par_err && !pos_bad;
  assign ue       = (!par_err && (syn != '0)) || (par_err && pos_bad);

endmodule
