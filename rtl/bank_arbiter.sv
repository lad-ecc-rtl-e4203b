// bank_arbiter: bank-group arbiter in front of the register banks.
//
// Each requester (an operand slot of the operand collector) wants one read of a
// warp-register in bank group grp[i]. Every group has one read port, so at most one
// request per group is granted per cycle; requests that lose are serialised into later
// cycles (a bank conflict). Priority is fixed, lowest requester index first; since a
// granted slot drops its request, every request is granted within NREQ cycles.
// Combinational: gnt is valid in the cycle req is presented. conflict is high when a
// request was refused this cycle.
// Serialising conflicting accesses follows the design; the fixed-priority policy is this
// implementation's choice, the design gives none.
module bank_arbiter
  import lad_ecc_pkg::*;
#(
  parameter int NREQ = MAX_SRC,
  parameter int NG   = NUM_GROUPS,
  localparam int GW  = $clog2(NG)
) (
  input  logic [NREQ-1:0]         req,
  input  logic [NREQ-1:0][GW-1:0] grp,
  output logic [NREQ-1:0]         gnt,
  output logic                    conflict
);

  always_comb begin
    logic [NG-1:0] taken;
    taken = '0;
    gnt   = '0;
    for (int i = 0; i < NREQ; i++)
      if (req[i] && !taken[grp[i]]) begin
        gnt[i]          = 1'b1;
        taken[grp[i]]   = 1'b1;
      end
    conflict = |(req & ~gnt);
  end

endmodule
