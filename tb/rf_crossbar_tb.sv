// rf_crossbar_tb: random read results on the four bank-group ports and random slot
// selections; every slot must carry the result of the group it selects.
module rf_crossbar_tb;
  import lad_ecc_pkg::*;

  rd_result_t [NUM_GROUPS-1:0]         grp_res;
  logic [MAX_SRC-1:0][GROUP_W-1:0]     sel;
  rd_result_t [MAX_SRC-1:0]            slot_res;
  int checks = 0, failures = 0;

  rf_crossbar #(.NSLOT(MAX_SRC), .NG(NUM_GROUPS)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int g = 0; g < NUM_GROUPS; g++) begin
        for (int t = 0; t < WARP_SIZE; t++) grp_res[g].data[t] = $urandom();
        grp_res[g].st = {$urandom(), $urandom(), $urandom()};
      end
      sel = 8'($urandom());
      #1;
      for (int i = 0; i < MAX_SRC; i++) begin
        checks++;
        if (slot_res[i] !== grp_res[sel[i]]) begin failures++; $display("FAIL slot %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
