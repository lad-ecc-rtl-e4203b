// register_file_tb: the 32-bank register file against a model of 1024 warp-registers.
// Every warp-register is written once in full, then random writes with random thread
// masks run alongside random reads on all four bank-group ports. Each port's data must
// equal the model one cycle after its read (the old value when the same warp-register is
// written in that cycle), and the model's thread-to-bank layout is checked by reading
// individual banks.
module register_file_tb;
  import lad_ecc_pkg::*;

  logic clk = 0;
  logic wr_en;
  wreg_addr_t wr_wreg;
  lane_mask_t wr_mask;
  warp_reg_t  wr_data;
  logic       [NUM_GROUPS-1:0]               rd_en;
  logic       [NUM_GROUPS-1:0][ENTRY_AW-1:0] rd_entry;
  warp_reg_t  [NUM_GROUPS-1:0]               rd_data;
  warp_reg_t  model [NUM_WREG];
  warp_reg_t  [NUM_GROUPS-1:0]               expq;
  logic       [NUM_GROUPS-1:0]               pend;
  int checks = 0, failures = 0;

  register_file dut (.*);

  always #5 clk = ~clk;

  function automatic warp_reg_t rnd_warp();
    warp_reg_t w;
    for (int t = 0; t < WARP_SIZE; t++) w[t] = $urandom();
    return w;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = '0; rd_entry = '0; wr_wreg = '0; wr_mask = '0; wr_data = '0; pend = '0;
    for (int a = 0; a < NUM_WREG; a++) begin
      @(negedge clk);
      wr_en = 1; wr_wreg = wreg_addr_t'(a); wr_mask = '1; wr_data = rnd_warp();
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int g = 0; g < NUM_GROUPS; g++)
        if (pend[g]) begin
          checks++;
          if (rd_data[g] !== expq[g]) begin failures++; $display("FAIL group %0d", g); end
        end
      wr_en   = $urandom() % 2;
      wr_wreg = wreg_addr_t'($urandom());
      wr_mask = $urandom();
      wr_data = rnd_warp();
      for (int g = 0; g < NUM_GROUPS; g++) begin
        rd_en[g]    = $urandom() % 2;
        rd_entry[g] = ($urandom() % 4 == 0 && wr_wreg[1:0] == 2'(g)) ? wr_wreg[9:2] : ENTRY_AW'($urandom());
        if (rd_en[g]) begin
          expq[g] = model[{rd_entry[g], 2'(g)}];
          pend[g] = 1;
        end
      end
      if (wr_en)
        for (int t = 0; t < WARP_SIZE; t++)
          if (wr_mask[t]) model[wr_wreg][t] = wr_data[t];
    end
    // layout: thread t of warp-register a sits in bank 8*(a%4) + t/4, slot t%4, entry a/4
    @(negedge clk); wr_en = 0; rd_en = '0;
    checks += 4;
    if (dut.g_grp[0].g_bank[0].u_bank.mem[0][0] !== model[0][0])   begin failures++; $display("FAIL layout 0/0"); end
    if (dut.g_grp[1].g_bank[3].u_bank.mem[1][2] !== model[5][14])  begin failures++; $display("FAIL layout 5/14"); end
    if (dut.g_grp[3].g_bank[7].u_bank.mem[255][3] !== model[1023][31]) begin failures++; $display("FAIL layout 1023/31"); end
    if (dut.g_grp[2].g_bank[4].u_bank.mem[10][1] !== model[42][17]) begin failures++; $display("FAIL layout 42/17"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
