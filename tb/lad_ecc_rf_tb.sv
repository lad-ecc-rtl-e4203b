// lad_ecc_rf_tb: end-to-end test of the LAD-ECC register file at its full size.
//
// A model keeps the value of all 1024 warp-registers and whether each was last written as
// duplicate. After reset every warp-register is written (a mix of duplicate and divergent
// values). Then random traffic runs: warp instructions with 1 to 4 sources go through the
// operand collector, whose duplication bits match how each source was written, while
// writebacks (full and partial thread masks) to other warp-registers proceed in parallel.
// Every dispatched operand is compared with the model.
// Directed cases then inject soft errors straight into the bank and ECC table storage:
// a single error in a protected bit (corrected), a double error (reported), an error in a
// low mantissa bit (tolerated, passed through), a corrupt ECC field (entry parity fails,
// verification skipped, repaired by the next write), and for a duplicate warp-register an
// error in another thread (hidden by the broadcast of the first thread), an error in the
// first thread (corrected) and a corrupt duplication entry.
// Each mechanism is counted and must occur at least once; the number of ECC encodings and
// verifications is compared with what a per-thread full ECC would have needed.
module lad_ecc_rf_tb;
  import lad_ecc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  instr_t in_instr;
  logic out_valid, out_ready, out_dst_dup;
  logic [WARP_ID_W-1:0] out_warp_id;
  logic [NSRC_W-1:0] out_nsrc;
  lane_mask_t out_mask;
  rd_result_t [MAX_SRC-1:0] out_opnd;
  logic wb_valid, wb_dup;
  wreg_addr_t wb_wreg;
  lane_mask_t wb_mask;
  warp_reg_t wb_data;
  logic [LANE_W:0] ecc_gen_count;
  logic [LANE_W+2:0] ecc_chk_count;
  logic bank_conflict;
  logic [WREG_AW:0] dup_entries;

  lad_ecc_rf dut (.*);

  always #5 clk = ~clk;

  warp_reg_t gold [NUM_WREG];
  logic [NUM_WREG-1:0] is_dup;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_div_wr = 0, n_dup_wr = 0, n_part_wr = 0, n_div_rd = 0, n_dup_rd = 0, n_conflict = 0;
  int n_corr = 0, n_ue = 0, n_low = 0, n_inv = 0, n_repair = 0, n_bcast = 0, n_dup_corr = 0;
  int n_gated = 0, n_overlap = 0;
  longint gens = 0, chks = 0, base_gens = 0, base_chks = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    gens += ecc_gen_count;
    chks += ecc_chk_count;
    if (bank_conflict) n_conflict++;
    if (wb_valid && in_valid == 0 && !in_ready) n_overlap++;
  end

  function automatic warp_reg_t rnd_warp(input logic dup);
    warp_reg_t w;
    logic [31:0] v;
    v = $urandom();
    for (int t = 0; t < WARP_SIZE; t++) w[t] = dup ? v : $urandom();
    return w;
  endfunction

  // drive one writeback in the current cycle (called at a negative edge)
  task automatic put_wb(input wreg_addr_t a, input logic dup, input lane_mask_t m, input warp_reg_t d);
    wb_valid = 1; wb_wreg = a; wb_dup = dup; wb_mask = m; wb_data = d;
    for (int t = 0; t < WARP_SIZE; t++) if (m[t]) gold[a][t] = d[t];
    is_dup[a] = dup;
    base_gens += $countones(m);
    if (dup) n_dup_wr++; else n_div_wr++;
    if (!dup && m != '1) n_part_wr++;
  endtask

  task automatic write_now(input wreg_addr_t a, input logic dup, input lane_mask_t m, input warp_reg_t d);
    @(negedge clk);
    put_wb(a, dup, m, d);
    @(negedge clk);
    wb_valid = 0;
  endtask

  // issue an instruction and wait for its dispatch; optional writebacks to other
  // warp-registers meanwhile. Returns the edges from acceptance to dispatch.
  task automatic run_instr(input instr_t ins, input logic bg_writes, output int lat);
    int t0;
    @(negedge clk);
    in_valid = 1; in_instr = ins;
    @(negedge clk);
    in_valid = 0;
    lat = 0;
    while (!out_valid) begin
      if (bg_writes && ($urandom() % 2)) begin
        wreg_addr_t a;
        logic clash, d;
        lane_mask_t m;
        a = wreg_addr_t'($urandom());
        clash = 0;
        for (int i = 0; i < int'(ins.nsrc); i++) if (ins.src[i] == a) clash = 1;
        d = $urandom() % 2;
        // a partial write only into a warp-register that is already divergent: the
        // per-thread codes of a duplicate one are gated and cannot cover the other threads
        m = (d || is_dup[a]) ? '1 : (($urandom() % 2) ? '1 : lane_mask_t'($urandom()));
        if (!clash) put_wb(a, d, m, rnd_warp(d)); else wb_valid = 0;
      end else wb_valid = 0;
      @(negedge clk);
      lat++;
    end
    wb_valid = 0;
    out_ready = 1;
    for (int i = 0; i < int'(ins.nsrc); i++) begin
      base_chks += $countones(ins.mask);
      if (ins.dup_info[int'(ins.nsrc) - 1 - i]) n_dup_rd++; else n_div_rd++;
    end
  endtask

  task automatic finish_instr();
    @(negedge clk);
    out_ready = 0;
  endtask

  function automatic instr_t mk_instr(input int nsrc, input wreg_addr_t s0, input wreg_addr_t s1,
                                      input wreg_addr_t s2, input wreg_addr_t s3, input lane_mask_t m);
    instr_t ins;
    ins = '0;
    ins.warp_id = WARP_ID_W'($urandom());
    ins.nsrc = NSRC_W'(nsrc);
    ins.src[0] = s0; ins.src[1] = s1; ins.src[2] = s2; ins.src[3] = s3;
    ins.mask = m;
    ins.dup_info[nsrc] = $urandom() % 2;
    for (int i = 0; i < nsrc; i++) ins.dup_info[nsrc - 1 - i] = is_dup[ins.src[i]];
    return ins;
  endfunction

  function automatic int first_of(input lane_mask_t m);
    for (int t = 0; t < WARP_SIZE; t++) if (m[t]) return t;
    return 0;
  endfunction

  // compare a dispatched operand with the model, expecting no ECC event
  task automatic check_clean(input int i, input wreg_addr_t a, input lane_mask_t m, input logic dup, input string tag);
    int f;
    f = first_of(m);
    chk(out_opnd[i].st.ce == '0 && out_opnd[i].st.ue == '0 && !out_opnd[i].st.ecc_invalid, {tag, ": no ECC event"});
    chk(out_opnd[i].st.dup == dup, {tag, ": path"});
    for (int t = 0; t < WARP_SIZE; t++)
      if (dup) chk(out_opnd[i].data[t] == gold[a][f], {tag, ": duplicate value"});
      else if (m[t]) chk(out_opnd[i].data[t] == gold[a][t], {tag, ": divergent value"});
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    instr_t ins;
    in_valid = 0; in_instr = '0; out_ready = 0; wb_valid = 0; wb_dup = 0; wb_wreg = '0;
    wb_mask = '0; wb_data = '0; is_dup = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // fill the register file
    for (int a = 0; a < NUM_WREG; a++) begin
      logic d;
      d = ($urandom() % 10) < 4;
      @(negedge clk);
      put_wb(wreg_addr_t'(a), d, '1, rnd_warp(d));
    end
    @(negedge clk); wb_valid = 0;
    @(negedge clk);
    chk(int'(dup_entries) == $countones(is_dup), "gated entries after fill");
    if (dup_entries != 0) n_gated++;

    // latency with no bank conflict: two sources in different groups
    ins = mk_instr(2, 10'd4, 10'd5, 10'd0, 10'd0, '1);
    run_instr(ins, 0, lat);
    chk(lat == 2, "dispatch two edges after acceptance");
    check_clean(0, 10'd4, '1, is_dup[4], "latency");
    finish_instr();

    // random traffic
    for (int n = 0; n < 1500; n++) begin
      lane_mask_t m;
      int ns;
      wreg_addr_t s [4];
      ns = 1 + $urandom() % 4;
      for (int i = 0; i < 4; i++) s[i] = wreg_addr_t'($urandom() % ((n % 3 == 0) ? 16 : 1024));
      m = ($urandom() % 2) ? '1 : (lane_mask_t'($urandom()) | 32'h8000_0000);
      ins = mk_instr(ns, s[0], s[1], s[2], s[3], m);
      run_instr(ins, 1, lat);
      chk(out_dst_dup == ins.dup_info[ns] && out_nsrc == ins.nsrc && out_warp_id == ins.warp_id, "dispatch header");
      for (int i = 0; i < ns; i++) check_clean(i, s[i], m, is_dup[s[i]], "traffic");
      finish_instr();
      chk(int'(dup_entries) == $countones(is_dup), "gated entries");
    end

    // ---------------- directed soft errors, divergent warp-register 5 ----------------
    // warp-register 5: bank group 1, entry 1; thread 14 in bank 8+3, register slot 2
    write_now(10'd5, 0, '1, rnd_warp(0));
    dut.u_rf.g_grp[1].g_bank[3].u_bank.mem[1][2][20] ^= 1'b1;           // single, protected
    run_instr(mk_instr(1, 10'd5, 0, 0, 0, '1), 0, lat);
    chk(out_opnd[0].data[14] == gold[5][14] && out_opnd[0].st.ce == (32'h1 << 14) && out_opnd[0].st.ue == '0,
        "single error corrected");
    if (out_opnd[0].st.ce[14]) n_corr++;
    finish_instr();
    dut.u_rf.g_grp[1].g_bank[3].u_bank.mem[1][2][27] ^= 1'b1;           // now a double error
    run_instr(mk_instr(1, 10'd5, 0, 0, 0, '1), 0, lat);
    chk(out_opnd[0].st.ue == (32'h1 << 14), "double error detected");
    if (out_opnd[0].st.ue[14]) n_ue++;
    finish_instr();
    write_now(10'd5, 0, '1, rnd_warp(0));
    dut.u_rf.g_grp[1].g_bank[3].u_bank.mem[1][2][3] ^= 1'b1;            // low mantissa bit
    run_instr(mk_instr(1, 10'd5, 0, 0, 0, '1), 0, lat);
    chk(out_opnd[0].data[14] == (gold[5][14] ^ 32'h8) && out_opnd[0].st.ce == '0 && out_opnd[0].st.ue == '0,
        "low-bit error tolerated");
    if (out_opnd[0].data[14] == (gold[5][14] ^ 32'h8)) n_low++;
    finish_instr();
    write_now(10'd5, 0, '1, rnd_warp(0));
    dut.u_et.trad_mem[5].ecc[14][2] ^= 1'b1;                           // corrupt ECC field
    run_instr(mk_instr(1, 10'd5, 0, 0, 0, '1), 0, lat);
    chk(out_opnd[0].st.ecc_invalid && out_opnd[0].data == gold[5] && out_opnd[0].st.ce == '0,
        "corrupt ECC entry skipped");
    if (out_opnd[0].st.ecc_invalid) n_inv++;
    finish_instr();
    write_now(10'd5, 0, '1, rnd_warp(0));                              // repaired by rewriting
    run_instr(mk_instr(1, 10'd5, 0, 0, 0, '1), 0, lat);
    check_clean(0, 10'd5, '1, 0, "entry repaired");
    if (!out_opnd[0].st.ecc_invalid) n_repair++;
    finish_instr();

    // ---------------- directed soft errors, duplicate warp-register 9 ----------------
    // warp-register 9: bank group 1, entry 2; thread 0 in bank 8 slot 0, thread 31 in bank 15 slot 3
    write_now(10'd9, 1, '1, rnd_warp(1));
    dut.u_rf.g_grp[1].g_bank[7].u_bank.mem[2][3] ^= 32'h0040_0101;       // other thread
    run_instr(mk_instr(1, 10'd9, 0, 0, 0, '1), 0, lat);
    check_clean(0, 10'd9, '1, 1, "error in another thread hidden");
    if (out_opnd[0].data[31] == gold[9][0]) n_bcast++;
    finish_instr();
    dut.u_rf.g_grp[1].g_bank[0].u_bank.mem[2][0][7] ^= 1'b1;             // first thread
    run_instr(mk_instr(1, 10'd9, 0, 0, 0, '1), 0, lat);
    for (int t = 0; t < WARP_SIZE; t++) chk(out_opnd[0].data[t] == gold[9][0], "first-thread error corrected");
    chk(out_opnd[0].st.ce == 32'h1 && out_opnd[0].st.dup, "first-thread ce");
    if (out_opnd[0].st.ce[0]) n_dup_corr++;
    finish_instr();
    write_now(10'd9, 1, '1, rnd_warp(1));
    dut.u_et.dup_mem[9].ecc[1] ^= 1'b1;                                // corrupt duplication entry
    run_instr(mk_instr(1, 10'd9, 0, 0, 0, '1), 0, lat);
    chk(out_opnd[0].st.ecc_invalid && out_opnd[0].data[17] == gold[9][0], "corrupt duplication entry skipped");
    if (out_opnd[0].st.ecc_invalid) n_inv++;
    finish_instr();

    // ---------------- mechanism coverage ----------------
    chk(n_div_wr > 0, "divergent writes");
    chk(n_dup_wr > 0, "duplicate writes");
    chk(n_part_wr > 0, "partial writes");
    chk(n_div_rd > 0, "divergent reads");
    chk(n_dup_rd > 0, "duplicate reads");
    chk(n_conflict > 0, "bank conflicts");
    chk(n_corr > 0 && n_ue > 0 && n_low > 0, "AP-ECC correction, detection, tolerance");
    chk(n_inv >= 2 && n_repair > 0, "entry parity");
    chk(n_bcast > 0 && n_dup_corr > 0, "duplicate broadcast and correction");
    chk(n_gated > 0, "power-gated entries");
    chk(n_overlap > 0, "writeback during operand collection");
    $display("writes: divergent %0d (partial %0d) duplicate %0d; reads: divergent %0d duplicate %0d",
             n_div_wr, n_part_wr, n_dup_wr, n_div_rd, n_dup_rd);
    $display("bank conflict cycles %0d; writebacks during collection %0d; gated entries now %0d",
             n_conflict, n_overlap, dup_entries);
    $display("errors: corrected %0d, uncorrectable %0d, low-bit tolerated %0d, invalid entries %0d, hidden by broadcast %0d, first-thread corrected %0d",
             n_corr, n_ue, n_low, n_inv, n_bcast, n_dup_corr);
    $display("ECC encodings %0d vs %0d per-thread; verifications %0d vs %0d per-thread",
             gens, base_gens, chks, base_chks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
