// rf_bank_tb: random simultaneous reads and writes of one 256 x 128 bank against a model.
// Checks the one-cycle read latency, the per-register write mask, read-before-write on a
// same-entry access and that rdata holds when no read is issued.
module rf_bank_tb;
  logic         clk = 0, we, re;
  logic [7:0]   waddr, raddr;
  logic [3:0]   wmask;
  logic [127:0] wdata, rdata, expq;
  logic [127:0] model [256];
  logic         pend;
  int checks = 0, failures = 0;

  rf_bank #(.ENTRIES(256), .REGS(4), .RW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wmask = 0; wdata = 0; pend = 0;
    // fill every entry
    for (int e = 0; e < 256; e++) begin
      @(negedge clk);
      we = 1; waddr = e[7:0]; wmask = 4'hf;
      wdata = {$urandom(), $urandom(), $urandom(), $urandom()};
      model[e] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (pend) begin
        checks++;
        if (rdata !== expq) begin failures++; $display("FAIL read %h exp %h", rdata, expq); end
      end
      re    = ($urandom() % 4) != 0;
      raddr = ($urandom() % 3 == 0) ? waddr : 8'($urandom());
      we    = $urandom() % 2;
      waddr = ($urandom() % 4 == 0) ? raddr : 8'($urandom());
      wmask = 4'($urandom());
      wdata = {$urandom(), $urandom(), $urandom(), $urandom()};
      if (re) expq = model[raddr];         // old value on a same-cycle write
      pend = re || pend;
      if (we)
        for (int r = 0; r < 4; r++)
          if (wmask[r]) model[waddr][r*32 +: 32] = wdata[r*32 +: 32];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
