// dup_traffic_tb: register traffic with the average share of duplicate values measured
// for GPU programs (44.20% of warp-register writes and 40.96% of operand reads are
// duplicate), run through the full-size register file at its default parameters.
//
// Phase 1 writes every warp-register once, each one duplicate with probability 0.4420,
// then NWR further random full-mask writes with the same probability. Phase 2 issues NRD
// instructions of 1 to 3 sources; each source is taken from the duplicate registers with
// probability 0.4096, else from the divergent ones, and its duplication bit is set to
// match. Every operand is compared with the value last written (broadcast value for a
// duplicate register).
// The encodings (ecc_gen_count) and verifications (ecc_chk_count) are summed over the
// run and must equal the count worked out from the traffic (1 per duplicate access, 32
// per divergent one). The saving against a per-thread code on every access is printed and
// must lie within 3 points of the ideal 31/32 of the duplicate share.
module dup_traffic_tb;
  import lad_ecc_pkg::*;

  localparam int NWR      = 3000;
  localparam int NRD      = 3000;
  localparam int WR_DUP   = 4420;   // per 10000
  localparam int RD_DUP   = 4096;   // per 10000

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

  int checks = 0, failures = 0;
  warp_reg_t gold [NUM_WREG];
  logic [NUM_WREG-1:0] is_dup;

  longint gen_sum = 0, chk_sum = 0;
  longint exp_gen = 0, exp_chk = 0;
  longint wr_total = 0, wr_dup = 0, rd_total = 0, rd_dup = 0;

  // counted only out of reset: before the first clock edge the registers hold no state
  always @(posedge clk) if (rst_n) begin
    gen_sum <= gen_sum + longint'(ecc_gen_count);
    chk_sum <= chk_sum + longint'(ecc_chk_count);
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic write_reg(input wreg_addr_t a, input logic dup);
    warp_reg_t w;
    logic [31:0] v;
    v = $urandom();
    for (int t = 0; t < WARP_SIZE; t++) w[t] = dup ? v : $urandom();
    @(negedge clk);
    wb_valid = 1; wb_wreg = a; wb_dup = dup; wb_mask = '1; wb_data = w;
    gold[a] = w; is_dup[a] = dup;
    wr_total++; if (dup) wr_dup++;
    exp_gen += dup ? 64'd1 : 64'(WARP_SIZE);
    @(negedge clk);
    wb_valid = 0;
  endtask

  function automatic wreg_addr_t pick(input logic want_dup);
    wreg_addr_t a;
    a = wreg_addr_t'($urandom());
    for (int i = 0; i < NUM_WREG; i++)
      if (is_dup[wreg_addr_t'(int'(a) + i)] == want_dup) return wreg_addr_t'(int'(a) + i);
    return a;
  endfunction

  initial begin
    in_valid = 0; in_instr = '0; out_ready = 0; wb_valid = 0; wb_dup = 0; wb_wreg = '0;
    wb_mask = '0; wb_data = '0; is_dup = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int a = 0; a < NUM_WREG; a++) write_reg(wreg_addr_t'(a), ($urandom() % 10000) < WR_DUP);
    for (int n = 0; n < NWR; n++) write_reg(wreg_addr_t'($urandom()), ($urandom() % 10000) < WR_DUP);
    chk(int'(dup_entries) == $countones(is_dup), "dup_entries matches the duplicate registers");

    for (int n = 0; n < NRD; n++) begin
      instr_t ins;
      ins = '0;
      ins.warp_id = WARP_ID_W'($urandom());
      ins.nsrc = NSRC_W'(1 + $urandom_range(2));
      ins.mask = '1;
      for (int i = 0; i < int'(ins.nsrc); i++) begin
        logic d;
        d = ($urandom() % 10000) < RD_DUP;
        ins.src[i] = pick(d);
        d = is_dup[ins.src[i]];
        ins.dup_info[int'(ins.nsrc) - 1 - i] = d;
        rd_total++; if (d) rd_dup++;
        exp_chk += d ? 64'd1 : 64'(WARP_SIZE);
      end
      @(negedge clk);
      in_valid = 1; in_instr = ins;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      while (!out_valid) @(negedge clk);
      for (int i = 0; i < int'(ins.nsrc); i++) begin
        warp_reg_t want;
        want = gold[ins.src[i]];
        if (is_dup[ins.src[i]]) for (int t = 0; t < WARP_SIZE; t++) want[t] = gold[ins.src[i]][0];
        chk(out_opnd[i].data == want, "operand value");
        chk(out_opnd[i].st.ce == '0 && out_opnd[i].st.ue == '0 && !out_opnd[i].st.ecc_invalid,
            "no error reported");
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    repeat (3) @(negedge clk);

    chk(gen_sum == exp_gen, "encodings counted");
    chk(chk_sum == exp_chk, "verifications counted");
    begin
      int gen_save, chk_save, gen_ideal, chk_ideal;
      gen_save  = int'(1000 - (gen_sum * 1000) / (wr_total * WARP_SIZE));
      chk_save  = int'(1000 - (chk_sum * 1000) / (rd_total * WARP_SIZE));
      gen_ideal = WR_DUP * 31 / 320;
      chk_ideal = RD_DUP * 31 / 320;
      $display("writes %0d (duplicate %0d): %0d encodings against %0d, saving %0d per mille",
               wr_total, wr_dup, gen_sum, wr_total * WARP_SIZE, gen_save);
      $display("reads  %0d (duplicate %0d): %0d verifications against %0d, saving %0d per mille",
               rd_total, rd_dup, chk_sum, rd_total * WARP_SIZE, chk_save);
      chk(gen_save > gen_ideal - 30 && gen_save < gen_ideal + 30, "encoding saving near the duplicate share");
      chk(chk_save > chk_ideal - 30 && chk_save < chk_ideal + 30, "verification saving near the duplicate share");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
