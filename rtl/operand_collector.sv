// operand_collector: gathers the source operands of one warp instruction.
//
// Flow: an instruction is accepted (in_valid && in_ready) when the collector is empty.
// Each of its nsrc source operands becomes a pending slot. Every cycle the bank arbiter
// grants at most one pending slot per bank group, and the collector issues those reads
// (rd_en / rd_wreg per group). The register banks and the ECC table answer one cycle
// later; in that cycle chk_valid / chk_dup / chk_mask tell the read-side ECC logic of each
// group whether its port carries an operand, whether that operand is duplicate (from the
// instruction's duplication information) and which threads are active. The verified
// result comes back on rd_res and is routed to its slot by the crossbar. When every
// source has arrived, out_valid is raised with the operands, their ECC status and the
// destination's duplication bit, and held until out_ready.
// Latency: with no bank conflict an instruction is dispatchable 2 cycles after it is
// accepted (1 cycle to issue the reads, 1 for the banks); each conflict adds a cycle.
// conflict pulses in every cycle in which a pending read lost arbitration.
// Assertions hold the handshake rules: out_valid and the operands stay until out_ready,
// nsrc is at most 4, reads are issued only for a held instruction and at most one per
// bank group. They are disabled in reset, so lint sees rst_n used both as the
// asynchronous reset and in a clocked expression; that is intended.
// Buffering operands until all are ready, bank arbitration and the duplication
// information encoding follow the design; the single collector unit, its handshake and
// timing are this implementation's choices.
module operand_collector
  import lad_ecc_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  // instruction in
  input  logic                               in_valid,
  output logic                               in_ready,
  input  instr_t                             in_instr,
  // read requests, one port per bank group
  output logic       [NUM_GROUPS-1:0]        rd_en,
  output wreg_addr_t [NUM_GROUPS-1:0]        rd_wreg,
  // read response control and data, one cycle after rd_en
  output logic       [NUM_GROUPS-1:0]        chk_valid,
  output logic       [NUM_GROUPS-1:0]        chk_dup,
  output lane_mask_t                         chk_mask,
  input  rd_result_t [NUM_GROUPS-1:0]        rd_res,
  // dispatch to the execution units
  output logic                               out_valid,
  input  logic                               out_ready,
  output logic [WARP_ID_W-1:0]               out_warp_id,
  output logic [NSRC_W-1:0]                  out_nsrc,
  output lane_mask_t                         out_mask,
  output logic                               out_dst_dup,
  output rd_result_t [MAX_SRC-1:0]           out_opnd,
  // events
  output logic                               conflict
);

  logic                              busy;
  instr_t                            ins;
  logic [MAX_SRC-1:0]                pend, have, used;
  logic [MAX_SRC-1:0][GROUP_W-1:0]   grp;
  logic [MAX_SRC-1:0]                gnt, src_dup, arrive;
  logic [NUM_GROUPS-1:0][$clog2(MAX_SRC)-1:0] fl_slot, g_slot;
  rd_result_t [MAX_SRC-1:0]          slot_res;

  always_comb begin
    for (int i = 0; i < MAX_SRC; i++) begin
      grp[i]     = wreg_group(ins.src[i]);
      used[i]    = i < int'(ins.nsrc);
      src_dup[i] = used[i] ? src_is_dup(ins.dup_info, int'(ins.nsrc), i) : 1'b0;
    end
  end

  bank_arbiter #(.NREQ(MAX_SRC), .NG(NUM_GROUPS)) u_arb (
    .req      (pend & {MAX_SRC{busy}}),
    .grp      (grp),
    .gnt      (gnt),
    .conflict (conflict)
  );

  always_comb begin
    rd_en   = '0;
    rd_wreg = '0;
    g_slot  = '0;
    for (int i = 0; i < MAX_SRC; i++)
      if (gnt[i]) begin
        rd_en[grp[i]]   = 1'b1;
        rd_wreg[grp[i]] = ins.src[i];
        g_slot[grp[i]]  = ($clog2(MAX_SRC))'(i);
      end
  end

  rf_crossbar #(.NSLOT(MAX_SRC), .NG(NUM_GROUPS)) u_xbar (
    .grp_res  (rd_res),
    .sel      (grp),
    .slot_res (slot_res)
  );

  for (genvar i = 0; i < MAX_SRC; i++) begin : g_arrive
    assign arrive[i] = chk_valid[grp[i]] && (int'(fl_slot[grp[i]]) == i) && used[i] && !have[i];
  end

  // Handshake and arbitration rules
  function automatic int grants_in_group(input logic [MAX_SRC-1:0] g_v,
                                         input logic [MAX_SRC-1:0][GROUP_W-1:0] g_grp, input int g);
    int n;
    n = 0;
    for (int i = 0; i < MAX_SRC; i++) if (g_v[i] && int'(g_grp[i]) == g) n++;
    return n;
  endfunction

  a_out_held: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_warp_id) && $stable(out_mask));
  a_nsrc_range: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> int'(in_instr.nsrc) <= MAX_SRC);
  a_reads_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    |rd_en |-> busy);
  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_one_read
    a_one_read_per_group: assert property (@(posedge clk) disable iff (!rst_n)
      grants_in_group(gnt, grp, g) <= 1);
  end

  // operand buffers (no reset: only read once their slot has arrived)
  always_ff @(posedge clk) begin
    for (int i = 0; i < MAX_SRC; i++)
      if (arrive[i]) out_opnd[i] <= slot_res[i];
  end

  assign chk_mask    = ins.mask;
  assign in_ready    = !busy;
  assign out_valid   = busy && ((have | ~used) == '1);
  assign out_warp_id = ins.warp_id;
  assign out_nsrc    = ins.nsrc;
  assign out_mask    = ins.mask;
  assign out_dst_dup = dst_is_dup(ins.dup_info, int'(ins.nsrc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      pend      <= '0;
      have      <= '0;
      chk_valid <= '0;
      chk_dup   <= '0;
      fl_slot   <= '0;
      ins       <= '0;
    end else begin
      chk_valid <= rd_en;
      fl_slot   <= g_slot;
      for (int g = 0; g < NUM_GROUPS; g++) chk_dup[g] <= src_dup[g_slot[g]];
      pend <= pend & ~gnt;
      for (int i = 0; i < MAX_SRC; i++)
        if (arrive[i]) have[i] <= 1'b1;
      if (out_valid && out_ready) begin
        busy <= 1'b0;
      end else if (in_valid && in_ready) begin
        busy <= 1'b1;
        ins  <= in_instr;
        have <= '0;
        for (int i = 0; i < MAX_SRC; i++) pend[i] <= i < int'(in_instr.nsrc);
      end
    end
  end

endmodule
