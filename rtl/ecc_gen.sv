// ecc_gen: Hamming SEC-DED parity-bit generator for the protected part of one register.
//
// Only bits [REG_W-1:PROT_LSB] are encoded. With the default PROT_LSB = 15 this is the
// approximation-aware code (AP-ECC): sign, exponent and the upper 8 mantissa bits of an
// IEEE-754 single, 17 data bits, 5 Hamming bits and one overall parity bit (P0-P5). With
// PROT_LSB = 0 the same module is the full-register generator of the duplication path,
// 32 data bits, 6 Hamming bits and one overall parity bit (P0-P6).
//
// Hamming bit i is the XOR tree over the data bits whose Hamming position has bit i set;
// the top bit of ecc is the overall parity of the protected data and the Hamming bits.
// The range 15..31, the 6- and 7-bit widths and the use of a Hamming code follow the
// design; the ordering of data bits over Hamming positions is this implementation's own.
//
// Purely combinational: ecc is valid in the same cycle as data.
module ecc_gen
  import lad_ecc_pkg::*;
#(
  parameter int REG_BITS = 32,
  parameter int PROT_LSB = 15,
  localparam int DW = REG_BITS - PROT_LSB,
  localparam int R  = ecc_hbits(DW),
  localparam int EW = R + 1
) (
  input  logic [REG_BITS-1:0] data,
  output logic [EW-1:0]       ecc
);

  logic [DW-1:0] d;
  logic [R-1:0]  p;

  assign d = data[REG_BITS-1:PROT_LSB];

  for (genvar i = 0; i < R; i++) begin : g_hbit
    localparam logic [63:0] M = parity_mask(DW, i);
    assign p[i] = ^(d & M[DW-1:0]);
  end

  assign ecc = {(^d) ^ (^p), p};

endmodule
