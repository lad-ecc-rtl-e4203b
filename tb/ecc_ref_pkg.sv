// ecc_ref_pkg: reference model of the Hamming SEC-DED codes, for the testbenches.
//
// Written in the textbook form, independent of the RTL: the protected bits
// data[31:lsb] are laid out in a code word at the positions 1, 2, 3, ... that are not
// powers of two; the check bits are the bits of the XOR of the positions holding a 1;
// the last bit is the overall parity of the whole word. Decoding XORs the positions of all
// ones of the received word (check bits at the power-of-two positions) into a syndrome.
package ecc_ref_pkg;

  function automatic int ref_nchk(input int dw);
    int r;
    r = 0;
    while ((2 ** r) < dw + r + 1) r++;
    return r;
  endfunction

  // Returns {overall, check bits}; width ref_nchk(32-lsb)+1, zero-extended to 8.
  function automatic logic [7:0] ref_encode(input logic [31:0] data, input int lsb);
    int dw, r, pos, k, s;
    logic ov;
    logic [7:0] e;
    dw = 32 - lsb;
    r  = ref_nchk(dw);
    s  = 0;
    ov = 0;
    pos = 0;
    k   = 0;
    while (k < dw) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        if (data[lsb + k]) begin
          s  = s ^ pos;
          ov = ~ov;
        end
        k++;
      end
    end
    e = '0;
    for (int i = 0; i < r; i++) begin
      e[i] = s[i];
      if (s[i]) ov = ~ov;
    end
    e[r] = ov;
    return e;
  endfunction

  // Decodes; returns corrected data, and ce / ue flags.
  function automatic void ref_decode(input logic [31:0] data, input logic [7:0] ecc, input int lsb,
                                     output logic [31:0] dout, output logic ce, output logic ue);
    int dw, r, n, pos, k, s;
    logic ov;
    logic [63:0] cw;
    dw = 32 - lsb;
    r  = ref_nchk(dw);
    n  = dw + r;
    cw = '0;
    pos = 0;
    k   = 0;
    while (k < dw) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        cw[pos] = data[lsb + k];
        k++;
      end
    end
    for (int i = 0; i < r; i++) cw[2 ** i] = ecc[i];
    s  = 0;
    ov = ecc[r];
    for (int j = 1; j <= n; j++)
      if (cw[j]) begin
        s  = s ^ j;
        ov = ~ov;
      end
    ce = 0;
    ue = 0;
    if (ov) begin
      if (s > n) ue = 1;
      else begin
        ce = 1;
        if (s != 0) cw[s] = ~cw[s];
      end
    end else if (s != 0) ue = 1;
    dout = data;
    pos = 0;
    k   = 0;
    while (k < dw) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        dout[lsb + k] = cw[pos];
        k++;
      end
    end
  endfunction

endpackage
