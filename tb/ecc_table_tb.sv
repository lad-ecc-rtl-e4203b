// ecc_table_tb: the ECC table against a model of its two parts and mode bits.
// All entries are first written divergent with every thread; then random divergent writes
// (random thread subsets) and duplicate writes run alongside random reads on all four
// ports. Checked one cycle after each read: the traditional part (zero while gated), its
// even parity, the duplication part (zero while gated) and its parity; and every cycle the
// count of duplicate-mode entries. A divergent write into a gated entry must keep zeros in
// the threads it does not write.
module ecc_table_tb;
  import lad_ecc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_en, wr_dup;
  logic [WREG_AW-1:0] wr_wreg;
  lane_mask_t wr_lanes;
  ap_ecc_t [WARP_SIZE-1:0] wr_ap_ecc;
  dup_ecc_t wr_dup_ecc;
  logic [NUM_GROUPS-1:0] rd_en;
  logic [NUM_GROUPS-1:0][WREG_AW-1:0] rd_wreg;
  trad_entry_t [NUM_GROUPS-1:0] rd_trad, exp_trad;
  dup_entry_t  [NUM_GROUPS-1:0] rd_dup, exp_dup;
  logic [WREG_AW:0] dup_entries;
  logic [NUM_GROUPS-1:0] pend;

  ap_ecc_t [WARP_SIZE-1:0] m_trad [NUM_WREG];
  dup_ecc_t m_dup [NUM_WREG];
  logic [NUM_WREG-1:0] m_mode;
  int checks = 0, failures = 0, n_regate = 0, n_dupw = 0;

  ecc_table #(.ENTRIES(NUM_WREG), .NRD(NUM_GROUPS)) dut (.*);

  always #5 clk = ~clk;

  function automatic trad_entry_t exp_t(input int a);
    trad_entry_t e;
    e = '0;
    if (!m_mode[a]) begin
      e.ecc    = m_trad[a];
      e.parity = ^m_trad[a];
    end
    return e;
  endfunction

  function automatic dup_entry_t exp_d(input int a);
    dup_entry_t e;
    e = '0;
    if (m_mode[a]) begin
      e.ecc    = m_dup[a];
      e.parity = ^m_dup[a];
    end
    return e;
  endfunction

  task automatic model_write();
    if (wr_dup) begin
      m_dup[wr_wreg]  = wr_dup_ecc;
      m_mode[wr_wreg] = 1;
      n_dupw++;
    end else begin
      if (m_mode[wr_wreg]) begin
        m_trad[wr_wreg] = '0;
        if (wr_lanes != '1) n_regate++;
      end
      for (int t = 0; t < WARP_SIZE; t++)
        if (wr_lanes[t]) m_trad[wr_wreg][t] = wr_ap_ecc[t];
      m_mode[wr_wreg] = 0;
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_dup = 0; wr_wreg = 0; wr_lanes = 0; wr_ap_ecc = '0; wr_dup_ecc = 0;
    rd_en = 0; rd_wreg = '0; pend = 0; m_mode = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < NUM_WREG; a++) begin
      @(negedge clk);
      wr_en = 1; wr_dup = 0; wr_wreg = WREG_AW'(a); wr_lanes = '1;
      for (int t = 0; t < WARP_SIZE; t++) wr_ap_ecc[t] = AP_ECC_W'($urandom());
      model_write();
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      for (int g = 0; g < NUM_GROUPS; g++)
        if (pend[g]) begin
          checks += 2;
          if (rd_trad[g] !== exp_trad[g]) begin failures++; $display("FAIL trad port %0d", g); end
          if (rd_dup[g]  !== exp_dup[g])  begin failures++; $display("FAIL dup port %0d", g); end
        end
      checks++;
      if (dup_entries !== ($bits(dup_entries))'($countones(m_mode))) begin
        failures++; $display("FAIL dup_entries %0d exp %0d", dup_entries, $countones(m_mode));
      end
      wr_en      = $urandom() % 2;
      wr_dup     = $urandom() % 3 == 0;
      wr_wreg    = WREG_AW'($urandom() % 64);   // a small set, so modes flip often
      wr_lanes   = ($urandom() % 2) ? '1 : lane_mask_t'($urandom());
      wr_dup_ecc = DUP_ECC_W'($urandom());
      for (int t = 0; t < WARP_SIZE; t++) wr_ap_ecc[t] = AP_ECC_W'($urandom());
      for (int g = 0; g < NUM_GROUPS; g++) begin
        rd_en[g]   = $urandom() % 2;
        rd_wreg[g] = ($urandom() % 4 == 0) ? wr_wreg : WREG_AW'($urandom() % 64);
        if (rd_en[g]) begin
          exp_trad[g] = exp_t(rd_wreg[g]);
          exp_d_set(g, rd_wreg[g]);
          pend[g] = 1;
        end
      end
      if (wr_en) model_write();
    end
    checks++;
    if (n_regate == 0 || n_dupw == 0) begin failures++; $display("FAIL coverage"); end
    $display("duplicate writes %0d, partial writes into gated entries %0d", n_dupw, n_regate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exp_d_set(input int g, input int a);
    exp_dup[g] = exp_d(a);
  endtask
endmodule
