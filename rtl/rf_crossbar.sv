// rf_crossbar: interconnect between the bank-group read ports and the operand slots.
//
// Each of the NSLOT operand slots takes the (ECC-verified) read result of the bank group
// named by sel[i]; any group can feed any number of slots. A full crossbar of multiplexers,
// combinational. The design names this interconnect without detailing it; the
// multiplexer form is this implementation's own.
module rf_crossbar
  import lad_ecc_pkg::*;
#(
  parameter int NSLOT = MAX_SRC,
  parameter int NG    = NUM_GROUPS,
  localparam int GW   = $clog2(NG)
) (
  input  rd_result_t [NG-1:0]          grp_res,
  input  logic [NSLOT-1:0][GW-1:0]     sel,
  output rd_result_t [NSLOT-1:0]       slot_res
);

  for (genvar i = 0; i < NSLOT; i++) begin : g_slot
    assign slot_res[i] = grp_res[sel[i]];
  end

endmodule
