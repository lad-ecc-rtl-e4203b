// ecc_gen_tb: checks both configurations of ecc_gen against the reference encoder.
// The AP-ECC instance (bits 31..15, 6-bit code) and the full-register instance (7-bit
// code) see the same random and corner-case values; the AP-ECC code must also be blind to
// bits 14..0.
module ecc_gen_tb;
  import ecc_ref_pkg::*;

  logic [31:0] d, d2;
  logic [5:0]  ap, ap2;
  logic [6:0]  full;
  int checks = 0, failures = 0;

  ecc_gen #(.REG_BITS(32), .PROT_LSB(15)) u_ap   (.data(d),  .ecc(ap));
  ecc_gen #(.REG_BITS(32), .PROT_LSB(15)) u_ap2  (.data(d2), .ecc(ap2));
  ecc_gen #(.REG_BITS(32), .PROT_LSB(0))  u_full (.data(d),  .ecc(full));

  task automatic check(input logic [31:0] v);
    logic [7:0] ea, ef;
    d  = v;
    d2 = v ^ ($urandom() & 32'h0000_7fff);
    #1;
    ea = ref_encode(v, 15);
    ef = ref_encode(v, 0);
    checks += 3;
    if (ap !== ea[5:0]) begin failures++; $display("FAIL ap  %h: %h exp %h", v, ap, ea[5:0]); end
    if (full !== ef[6:0]) begin failures++; $display("FAIL full %h: %h exp %h", v, full, ef[6:0]); end
    if (ap2 !== ap) begin failures++; $display("FAIL low bits change AP-ECC %h", v); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0);
    check(32'hffff_ffff);
    for (int b = 0; b < 32; b++) check(32'h1 << b);
    for (int n = 0; n < 3000; n++) check($urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
