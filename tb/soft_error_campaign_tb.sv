// soft_error_campaign_tb: 1000 single-bit soft-errors injected at every bit offset of the
// full-size register file, in its two configurations side by side:
//   - per-thread AP-ECC over bits 31..15 (the default): upsets in bits 31..15 are
//     corrected, upsets in bits 14..0 of divergent registers reach the program unreported;
//   - per-thread code over all 32 bits (PROT_LSB = 0, for programs that tolerate no
//     error): no upset reaches the program.
// In both, duplicate warp-registers hide every upset (first thread corrected, other
// threads replaced by the first thread's value). Each configuration prints a per-bit
// table; see campaign_core for the procedure.
module soft_error_campaign_tb;
  logic done_ap, done_full;
  int   checks_ap, failures_ap, checks_full, failures_full;

  campaign_core #(.PROT_LSB(15), .TRIALS(1000)) u_ap   (.done(done_ap),   .checks(checks_ap),   .failures(failures_ap));
  campaign_core #(.PROT_LSB(0),  .TRIALS(1000)) u_full (.done(done_full), .checks(checks_full), .failures(failures_full));

  initial begin
    #200000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks_ap + checks_full, failures_ap + failures_full + 1);
    $finish;
  end

  initial begin
    wait (done_ap && done_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks_ap + checks_full, failures_ap + failures_full);
    $finish;
  end
endmodule
