// operand_collector_tb: the operand collector with a model of the register file behind it.
// The model answers each bank-group read one cycle later with a warp-register whose
// contents are a fixed function of its address, and echoes the duplication flag it is
// given. Random instructions (0 to 4 sources, random addresses so that bank conflicts
// occur, random duplication bits) are issued with random dispatch back-pressure. Checks:
// every operand arrives in its slot with the right data and duplication flag, the
// destination's duplication bit, and the exact number of cycles from acceptance to
// dispatch (1 + the largest number of sources sharing one bank group clock edges after
// the accepting edge; none with no sources) and of conflict cycles (that number - 1).
module operand_collector_tb;
  import lad_ecc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  instr_t in_instr;
  logic [NUM_GROUPS-1:0] rd_en, chk_valid, chk_dup;
  wreg_addr_t [NUM_GROUPS-1:0] rd_wreg, q_wreg;
  lane_mask_t chk_mask;
  rd_result_t [NUM_GROUPS-1:0] rd_res;
  logic out_valid, out_ready, out_dst_dup;
  logic [WARP_ID_W-1:0] out_warp_id;
  logic [NSRC_W-1:0] out_nsrc;
  lane_mask_t out_mask;
  rd_result_t [MAX_SRC-1:0] out_opnd;
  logic conflict;
  int checks = 0, failures = 0, n_conf_total = 0, cyc = 0;

  operand_collector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic warp_reg_t val(input wreg_addr_t a);
    warp_reg_t w;
    for (int t = 0; t < WARP_SIZE; t++) w[t] = {a, 5'(t), 17'h1abcd ^ {7'(a), a}};
    return w;
  endfunction

  // register-file model: one cycle of read latency
  always_ff @(posedge clk) q_wreg <= rd_wreg;
  always_comb
    for (int g = 0; g < NUM_GROUPS; g++) begin
      rd_res[g]        = '0;
      rd_res[g].data   = val(q_wreg[g]);
      rd_res[g].st.dup = chk_dup[g];
      rd_res[g].st.ce  = chk_mask;
    end

  int conf_cnt;
  always @(posedge clk) if (conflict) conf_cnt++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_instr = '0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int t0, lat, maxk, cnt[NUM_GROUPS], bp;
      instr_t ins;
      ins.warp_id  = WARP_ID_W'($urandom());
      ins.nsrc     = NSRC_W'($urandom() % 5);
      for (int i = 0; i < MAX_SRC; i++) ins.src[i] = wreg_addr_t'($urandom() % ((n % 2) ? 8 : 1024));
      ins.dup_info = 5'($urandom());
      ins.mask     = $urandom();
      maxk = 0;
      cnt = '{0, 0, 0, 0};
      for (int i = 0; i < int'(ins.nsrc); i++) cnt[ins.src[i] % 4]++;
      for (int g = 0; g < NUM_GROUPS; g++) if (cnt[g] > maxk) maxk = cnt[g];
      @(negedge clk);
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready"); end
      in_valid = 1; in_instr = ins;
      @(negedge clk);
      in_valid = 0;
      t0 = cyc;
      conf_cnt = 0;
      while (!out_valid) @(negedge clk);
      lat = cyc - t0;   // clock edges after the accepting edge
      checks += 2;
      if (lat != (maxk == 0 ? 0 : maxk + 1)) begin failures++; $display("FAIL latency %0d maxk %0d", lat, maxk); end
      if (conf_cnt != (maxk > 1 ? maxk - 1 : 0)) begin failures++; $display("FAIL conflicts %0d maxk %0d", conf_cnt, maxk); end
      n_conf_total += conf_cnt;
      bp = $urandom() % 3;
      repeat (bp) @(negedge clk);
      checks += 4;
      if (!out_valid) begin failures++; $display("FAIL valid dropped"); end
      if (out_warp_id != ins.warp_id || out_nsrc != ins.nsrc || out_mask != ins.mask) begin failures++; $display("FAIL header"); end
      if (out_dst_dup != ins.dup_info[ins.nsrc]) begin failures++; $display("FAIL dst dup"); end
      if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      for (int i = 0; i < int'(ins.nsrc); i++) begin
        checks += 3;
        if (out_opnd[i].data != val(ins.src[i])) begin failures++; $display("FAIL data slot %0d", i); end
        if (out_opnd[i].st.dup != ins.dup_info[int'(ins.nsrc) - 1 - i]) begin failures++; $display("FAIL dup slot %0d", i); end
        if (out_opnd[i].st.ce != ins.mask) begin failures++; $display("FAIL mask slot %0d", i); end
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid after dispatch"); end
    end
    checks++;
    if (n_conf_total == 0) begin failures++; $display("FAIL no bank conflict seen"); end
    $display("bank conflict cycles %0d", n_conf_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
