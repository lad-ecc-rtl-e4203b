// lad_ecc_wb_tb: the writeback-side ECC generation against the reference encoder.
// Random warp-register writes, divergent and duplicate, with random active masks (some
// empty, some full). Checks the register write passes through, the ECC table write
// enable, the thread fields written (AP-ECC of each active thread on the divergent path,
// none on the duplicate path), the full-register code of the first active thread on the
// duplicate path, and the number of generations.
module lad_ecc_wb_tb;
  import lad_ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic wb_valid, wb_dup;
  wreg_addr_t wb_wreg;
  lane_mask_t wb_mask;
  warp_reg_t  wb_data;
  logic rf_wr_en, et_wr_en, et_wr_dup;
  wreg_addr_t rf_wr_wreg, et_wr_wreg;
  lane_mask_t rf_wr_mask, et_wr_lanes;
  warp_reg_t  rf_wr_data;
  ap_ecc_t [WARP_SIZE-1:0] et_wr_ap_ecc;
  dup_ecc_t et_wr_dup_ecc;
  logic [LANE_W:0] gen_count;
  int checks = 0, failures = 0;
  longint gens_total = 0, gens_full = 0;

  lad_ecc_wb dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int first, ones;
      logic [7:0] e;
      wb_valid = ($urandom() % 8) != 0;
      wb_dup   = $urandom() % 2;
      wb_wreg  = wreg_addr_t'($urandom());
      case ($urandom() % 4)
        0: wb_mask = '1;
        1: wb_mask = '0;
        2: wb_mask = lane_mask_t'(1) << ($urandom() % 32);
        default: wb_mask = $urandom();
      endcase
      for (int t = 0; t < WARP_SIZE; t++) wb_data[t] = $urandom();
      #1;
      first = -1;
      ones  = 0;
      for (int t = 0; t < WARP_SIZE; t++) if (wb_mask[t]) begin ones++; if (first < 0) first = t; end
      chk(rf_wr_en == (wb_valid && ones > 0) && rf_wr_wreg == wb_wreg && rf_wr_mask == wb_mask
          && rf_wr_data == wb_data, "register write");
      chk(et_wr_en == (wb_valid && ones > 0) && et_wr_wreg == wb_wreg && et_wr_dup == wb_dup, "table write");
      if (wb_valid && ones > 0 && !wb_dup) begin
        chk(et_wr_lanes == wb_mask, "lanes divergent");
        for (int t = 0; t < WARP_SIZE; t++)
          if (wb_mask[t]) begin
            e = ref_encode(wb_data[t], 15);
            chk(et_wr_ap_ecc[t] == e[5:0], "AP-ECC field");
          end
        chk(int'(gen_count) == ones, "gen count divergent");
      end
      if (wb_valid && ones > 0 && wb_dup) begin
        chk(et_wr_lanes == '0, "no thread fields on duplicate write");
        e = ref_encode(wb_data[first], 0);
        chk(et_wr_dup_ecc == e[6:0], "duplicate ECC of first thread");
        chk(gen_count == 1, "gen count duplicate");
      end
      if (!(wb_valid && ones > 0)) chk(gen_count == 0, "gen count idle");
      gens_total += gen_count;
      if (wb_valid) gens_full += ones;
    end
    $display("generations %0d against %0d without duplication awareness", gens_total, gens_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
