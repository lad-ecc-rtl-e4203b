// ecc_chk_tb: checks both configurations of ecc_chk against the reference decoder.
// Code words come from the reference encoder; then none, one or two bits of the protected
// data or the check bits are flipped, and for the AP-ECC checker also bits 14..0, which
// must pass unchanged and unreported. Single errors must be corrected, double errors
// reported uncorrectable.
module ecc_chk_tb;
  import ecc_ref_pkg::*;

  logic [31:0] d, ap_out, full_out;
  logic [5:0]  ap_e;
  logic [6:0]  full_e;
  logic        ap_ce, ap_ue, full_ce, full_ue;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  ecc_chk #(.REG_BITS(32), .PROT_LSB(15)) u_ap (
    .data(d), .ecc(ap_e), .data_out(ap_out), .ce(ap_ce), .ue(ap_ue));
  ecc_chk #(.REG_BITS(32), .PROT_LSB(0)) u_full (
    .data(d), .ecc(full_e), .data_out(full_out), .ce(full_ce), .ue(full_ue));

  // one trial for one code; nflip errors among protected data and check bits
  task automatic trial(input int lsb, input int nflip, input logic [31:0] v, input logic low_noise);
    logic [7:0]  e, e_bad;
    logic [31:0] v_bad, rdo, got;
    logic        rce, rue, gce, gue;
    int          nbits, nchk, f1, f2;
    e     = ref_encode(v, lsb);
    nchk  = ref_nchk(32 - lsb) + 1;
    nbits = (32 - lsb) + nchk;
    v_bad = v;
    e_bad = e;
    f1 = $urandom_range(nbits - 1);
    do f2 = $urandom_range(nbits - 1); while (f2 == f1);
    if (nflip >= 1) begin
      if (f1 < 32 - lsb) v_bad[lsb + f1] = ~v_bad[lsb + f1]; else e_bad[f1 - (32 - lsb)] = ~e_bad[f1 - (32 - lsb)];
    end
    if (nflip >= 2) begin
      if (f2 < 32 - lsb) v_bad[lsb + f2] = ~v_bad[lsb + f2]; else e_bad[f2 - (32 - lsb)] = ~e_bad[f2 - (32 - lsb)];
    end
    if (low_noise && lsb > 0) v_bad = v_bad ^ ($urandom() & ((32'h1 << lsb) - 1));
    d      = v_bad;
    ap_e   = e_bad[5:0];
    full_e = e_bad[6:0];
    #1;
    ref_decode(v_bad, e_bad, lsb, rdo, rce, rue);
    if (lsb == 15) begin got = ap_out;   gce = ap_ce;   gue = ap_ue;   end
    else           begin got = full_out; gce = full_ce; gue = full_ue; end
    checks += 3;
    if (got !== rdo) begin failures++; $display("FAIL lsb=%0d n=%0d data %h exp %h", lsb, nflip, got, rdo); end
    if (gce !== rce || gue !== rue) begin
      failures++; $display("FAIL lsb=%0d n=%0d ce/ue %b%b exp %b%b", lsb, nflip, gce, gue, rce, rue);
    end
    // independent expectations on top of the reference decoder
    checks++;
    case (nflip)
      0: if (gce || gue || (got >> lsb) !== (v >> lsb)) begin failures++; $display("FAIL clean word flagged"); end
      1: if (!gce || gue || (got >> lsb) !== (v >> lsb)) begin failures++; $display("FAIL single not corrected"); end
      default: if (!gue || gce) begin failures++; $display("FAIL double not detected"); end
    endcase
    if (nflip == 1) n_single++;
    if (nflip == 2) n_double++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1500; n++) begin
      trial(15, n % 3, $urandom(), 1'b1);
      trial(0,  n % 3, $urandom(), 1'b0);
    end
    checks++;
    if (n_single == 0 || n_double == 0) failures++;
    $display("single=%0d double=%0d", n_single, n_double);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
