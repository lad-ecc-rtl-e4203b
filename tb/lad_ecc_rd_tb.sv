// lad_ecc_rd_tb: the read-side ECC verification against the reference codes.
// Each trial builds a warp-register and correct ECC entries with the reference encoder,
// then corrupts it in one of several ways:
//   divergent reads - single errors in bits 31..15 (must be corrected), double errors
//     (must be flagged), errors in bits 14..0 (must pass unflagged), a flipped ECC field
//     bit (entry parity fails: raw data out, ecc_invalid);
//   duplicate reads - errors in threads other than the first active one (must not reach
//     any thread, since the first thread's value is given to all), a single error in the
//     first active thread (corrected, in all threads), a flipped entry bit (ecc_invalid).
// Also checks the number of verifications per read.
module lad_ecc_rd_tb;
  import lad_ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic valid, rd_dup;
  lane_mask_t mask;
  warp_reg_t raw, good;
  trad_entry_t trad;
  dup_entry_t dupe;
  rd_result_t res;
  logic [LANE_W:0] chk_count;
  int checks = 0, failures = 0;
  int n_corr = 0, n_det = 0, n_low = 0, n_inv = 0, n_bcast = 0;

  lad_ecc_rd dut (.*);

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
    for (int n = 0; n < 2000; n++) begin
      int first, ones, mode;
      logic [7:0] e;
      logic [31:0] v;
      valid  = 1;
      rd_dup = n % 2;
      mask   = ($urandom() % 2) ? '1 : (lane_mask_t'($urandom()) | 32'h0100_0000);
      first = -1; ones = 0;
      for (int t = 0; t < WARP_SIZE; t++) if (mask[t]) begin ones++; if (first < 0) first = t; end
      mode = $urandom() % 4;
      if (!rd_dup) begin
        logic [WARP_SIZE-1:0] kind1, kind2, kindl;
        for (int t = 0; t < WARP_SIZE; t++) begin
          good[t] = $urandom();
          e = ref_encode(good[t], 15);
          trad.ecc[t] = e[5:0];
        end
        trad.parity = ^trad.ecc;
        dupe = '0;
        raw = good;
        kind1 = '0; kind2 = '0; kindl = '0;
        for (int t = 0; t < WARP_SIZE; t++) begin
          case ($urandom() % 4)
            0: begin int a; a = 15 + $urandom() % 17; raw[t][a] ^= 1'b1; kind1[t] = 1; end
            1: begin
                 int a, b;
                 a = $urandom() % 17;
                 b = (a + 1 + $urandom() % 16) % 17;
                 raw[t][15 + a] ^= 1'b1; raw[t][15 + b] ^= 1'b1; kind2[t] = 1;
               end
            2: begin int a; a = $urandom() % 15; raw[t][a] ^= 1'b1; kindl[t] = 1; end
            default: ;
          endcase
        end
        if (mode == 0) begin int a, b; a = $urandom() % 32; b = $urandom() % 6; trad.ecc[a][b] ^= 1'b1; end   // corrupt the entry
        #1;
        if (mode == 0) begin
          chk(res.st.ecc_invalid && res.data == raw && res.st.ce == '0 && res.st.ue == '0, "divergent invalid entry");
          chk(chk_count == 0, "no checks on invalid entry");
          n_inv++;
        end else begin
          chk(!res.st.ecc_invalid && !res.st.dup, "divergent flags");
          chk(int'(chk_count) == ones, "divergent check count");
          for (int t = 0; t < WARP_SIZE; t++) begin
            if (!mask[t]) chk(res.data[t] == raw[t] && !res.st.ce[t] && !res.st.ue[t], "inactive thread untouched");
            else if (kind1[t]) begin chk(res.data[t] == good[t] && res.st.ce[t] && !res.st.ue[t], "single corrected"); n_corr++; end
            else if (kind2[t]) begin chk(res.st.ue[t] && !res.st.ce[t], "double detected"); n_det++; end
            else if (kindl[t]) begin chk(res.data[t] == raw[t] && !res.st.ce[t] && !res.st.ue[t], "low bits ignored"); n_low++; end
            else chk(res.data[t] == good[t] && !res.st.ce[t] && !res.st.ue[t], "clean thread");
          end
        end
      end else begin
        v = $urandom();
        e = ref_encode(v, 0);
        dupe.ecc = e[6:0];
        dupe.parity = ^dupe.ecc;
        trad = '0;
        for (int t = 0; t < WARP_SIZE; t++) raw[t] = v;
        for (int t = 0; t < WARP_SIZE; t++) if (t != first && $urandom() % 3 == 0) begin logic [31:0] x; x = $urandom() | 1; raw[t] ^= x; end
        if (mode == 1) begin int a; a = $urandom() % 32; raw[first][a] ^= 1'b1; end
        if (mode == 0) begin int a; a = $urandom() % 7; dupe.ecc[a] ^= 1'b1; end
        #1;
        if (mode == 0) begin
          for (int t = 0; t < WARP_SIZE; t++) chk(res.data[t] == raw[first], "invalid dup entry: first thread raw to all");
          chk(res.st.ecc_invalid && chk_count == 0, "dup invalid flags");
          n_inv++;
        end else begin
          for (int t = 0; t < WARP_SIZE; t++) chk(res.data[t] == v, "duplicate broadcast");
          chk(res.st.dup && !res.st.ecc_invalid && chk_count == 1, "dup flags");
          chk(res.st.ce == (mode == 1 ? (lane_mask_t'(1) << first) : '0) && res.st.ue == '0, "dup ce");
          if (mode == 1) n_corr++;
          n_bcast++;
        end
      end
    end
    valid = 0; rd_dup = 0; #1;
    chk(chk_count == 0 && res.st.ce == '0 && !res.st.ecc_invalid, "idle");
    chk(n_corr > 0 && n_det > 0 && n_low > 0 && n_inv > 0 && n_bcast > 0, "coverage");
    $display("corrected %0d detected %0d low-bit ignored %0d invalid entries %0d broadcasts %0d",
             n_corr, n_det, n_low, n_inv, n_bcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
