// campaign_core: single-bit soft-error injection campaign over every bit offset, for one
// configuration of the register file (PROT_LSB = lowest bit of the per-thread code).
// Used by soft_error_campaign_tb, which runs it for both configurations.
//
// The full-size register file is filled with a mix of duplicate and divergent
// warp-registers. For each bit offset 0..31, TRIALS single-bit errors are injected, each
// into a random thread's register of a random warp-register, directly in bank storage;
// the warp-register is then read by a one-source instruction (all threads active, its
// duplication bit as written) and the result compared with the true value, after which it
// is rewritten to clear the error. Expected outcome:
//   divergent, bits 31..15: corrected, reported as corrected;
//   divergent, bits 14..0 : delivered with the error, nothing reported (tolerated);
//   duplicate, first thread: corrected; other threads: never visible (broadcast).
// Prints, per bit offset, how many injected errors reached the program.
module campaign_core
  import lad_ecc_pkg::*;
#(
  parameter int PROT_LSB = AP_LSB,
  parameter int TRIALS   = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);

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

  lad_ecc_rf #(.PROT_LSB(PROT_LSB)) dut (.*);

  always #5 clk = ~clk;

  warp_reg_t gold [NUM_WREG];
  logic [NUM_WREG-1:0] is_dup;

  // storage injection: flip one bit of thread inj_t of warp-register inj_a
  event inj_ev;
  wreg_addr_t inj_a;
  int inj_t, inj_bit;
  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_ig
    for (genvar b = 0; b < BANKS_PER_WREG; b++) begin : g_ib
      always @(inj_ev)
        if (int'(wreg_group(inj_a)) == g && inj_t / REGS_PER_ENTRY == b)
          dut.u_rf.g_grp[g].g_bank[b].u_bank.mem[wreg_entry(inj_a)][inj_t % REGS_PER_ENTRY][inj_bit] ^= 1'b1;
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_reg(input wreg_addr_t a, input logic dup, input warp_reg_t d);
    @(negedge clk);
    wb_valid = 1; wb_wreg = a; wb_dup = dup; wb_mask = '1; wb_data = d;
    gold[a] = d; is_dup[a] = dup;
    @(negedge clk);
    wb_valid = 0;
  endtask

  task automatic read_reg(input wreg_addr_t a);
    instr_t ins;
    ins = '0;
    ins.nsrc = 1;
    ins.src[0] = a;
    ins.mask = '1;
    ins.dup_info[0] = is_dup[a];
    @(negedge clk);
    in_valid = 1; in_instr = ins;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    out_ready = 1;
  endtask

  initial begin
    int visible [32], corrected [32], hidden [32];
    done = 0; checks = 0; failures = 0;
    in_valid = 0; in_instr = '0; out_ready = 0; wb_valid = 0; wb_dup = 0; wb_wreg = '0;
    wb_mask = '0; wb_data = '0; is_dup = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NUM_WREG; a++) begin
      logic d;
      warp_reg_t w;
      logic [31:0] v;
      d = ($urandom() % 10) < 4;
      v = $urandom();
      for (int t = 0; t < WARP_SIZE; t++) w[t] = d ? v : $urandom();
      write_reg(wreg_addr_t'(a), d, w);
    end
    for (int bit_i = 0; bit_i < 32; bit_i++) begin
      visible[bit_i] = 0; corrected[bit_i] = 0; hidden[bit_i] = 0;
      for (int n = 0; n < TRIALS; n++) begin
        wreg_addr_t a;
        int t;
        a = wreg_addr_t'($urandom());
        t = $urandom_range(WARP_SIZE - 1);
        @(negedge clk);
        inj_a = a; inj_t = t; inj_bit = bit_i;
        -> inj_ev;
        #1;
        read_reg(a);
        if (is_dup[a]) begin
          for (int k = 0; k < WARP_SIZE; k++) chk(out_opnd[0].data[k] == gold[a][0], "duplicate: value");
          chk(out_opnd[0].st.ce == (t == 0 ? 32'h1 : 32'h0) && out_opnd[0].st.ue == '0, "duplicate: report");
          if (t == 0) corrected[bit_i]++; else hidden[bit_i]++;
        end else if (bit_i >= PROT_LSB) begin
          chk(out_opnd[0].data == gold[a], "protected bit: corrected value");
          chk(out_opnd[0].st.ce == (lane_mask_t'(1) << t) && out_opnd[0].st.ue == '0, "protected bit: report");
          corrected[bit_i]++;
        end else begin
          chk(out_opnd[0].data[t] == (gold[a][t] ^ (32'h1 << bit_i)), "low bit: delivered as stored");
          chk(out_opnd[0].st.ce == '0 && out_opnd[0].st.ue == '0, "low bit: nothing reported");
          visible[bit_i]++;
        end
        @(negedge clk);
        out_ready = 0;
        write_reg(a, is_dup[a], gold[a]);
      end
    end
    $display("per-thread code from bit %0d up", PROT_LSB);
    $display("bit  corrected  hidden-by-broadcast  reached-program");
    for (int b = 31; b >= 0; b--) $display("%3d  %9d  %19d  %15d", b, corrected[b], hidden[b], visible[b]);
    for (int b = PROT_LSB; b < 32; b++) chk(visible[b] == 0, "no error in a protected bit reaches the program");
    for (int b = 0; b < PROT_LSB; b++) chk(visible[b] > 0, "unprotected bits are tolerated, not corrected");
    done = 1;
  end
endmodule
