// bank_arbiter_tb: exhaustive check of the bank-group arbiter over every combination of
// four requests and their bank groups: a request is granted exactly when no lower-indexed
// request wants the same group, no group is granted twice, nothing is granted unrequested,
// and conflict flags a refused request.
module bank_arbiter_tb;
  logic [3:0]      req, gnt;
  logic [3:0][1:0] grp;
  logic            conflict;
  int checks = 0, failures = 0, n_conf = 0;

  bank_arbiter #(.NREQ(4), .NG(4)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++)
      for (int gg = 0; gg < 256; gg++) begin
        logic [3:0] exp_g;
        int per_grp [4];
        req = 4'(r);
        grp = 8'(gg);
        #1;
        for (int i = 0; i < 4; i++) begin
          exp_g[i] = req[i];
          for (int j = 0; j < i; j++) if (req[j] && grp[j] == grp[i]) exp_g[i] = 0;
        end
        per_grp = '{0, 0, 0, 0};
        for (int i = 0; i < 4; i++) if (gnt[i]) per_grp[grp[i]]++;
        checks += 3;
        if (gnt !== exp_g) begin failures++; $display("FAIL req %b grp %h gnt %b exp %b", req, grp, gnt, exp_g); end
        if (per_grp[0] > 1 || per_grp[1] > 1 || per_grp[2] > 1 || per_grp[3] > 1) begin failures++; $display("FAIL group granted twice"); end
        if (conflict !== (req != gnt)) begin failures++; $display("FAIL conflict"); end
        if (conflict) n_conf++;
      end
    $display("conflicting combinations %0d", n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
