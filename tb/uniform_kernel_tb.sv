// uniform_kernel_tb: a five-instruction kernel fragment run through the register file.
//
//   mov.u32     %r0, %ctaid.x      dup info 1 1    (duplicate destination and source)
//   mov.u32     %r1, %ntid.x       dup info 1 1
//   mul.lo.u32  %r2, %r0, %r1      dup info 1 1 1
//   mov.u32     %r3, %tid.x        dup info 0 0
//   add.u32     %r4, %r3, %r2      dup info 0 0 1  (divergent r4, r3; duplicate r2)
// The special registers ctaid.x, ntid.x, tid.x are modelled as one-operand reads of
// pre-loaded warp-registers; the arithmetic is done by the testbench, acting as the
// execution units, on the dispatched operands, and the result is written back with the
// destination's duplication bit. All five instructions then produce thread t's
// r4 = tid + ctaid * ntid. The ECC work is counted: duplicate writes and reads need one
// encoding or verification, divergent ones one per thread. The counts are checked
// exactly against that rule and printed next to a per-thread scheme.
module uniform_kernel_tb;
  import lad_ecc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  instr_t in_instr;
  logic out_valid, out_ready, out_dst_dup;
  logic [WARP_ID_W-1:0] out_warp_id;
  logic [NSRC_W-1:0] out_nsrc;
  lane_mask_t out_mask;
  rd_result_t [MAX_SRC-1:0] out_opnd;
  logic wb_valid, wb_dup;
  wreg_addr_t wb_wreg;
  lane_mask_t wb_mask;
  warp_reg_t wb_data;
  logic [LANE_W:0] ecc_gen_count;
  logic [LANE_W+2:0] ecc_chk_count;
  logic bank_conflict;
  logic [WREG_AW:0] dup_entries;

  lad_ecc_rf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint gens = 0, chks = 0;
  always @(posedge clk) if (rst_n) begin gens += ecc_gen_count; chks += ecc_chk_count; end

  // physical warp-registers of the special registers and of r0..r4 (warp 3)
  localparam wreg_addr_t CTAID = 10'd1000, NTID = 10'd1001, TID = 10'd1002;
  function automatic wreg_addr_t R(input int i); return wreg_addr_t'(3 * 16 + i); endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic writeback(input wreg_addr_t a, input logic dup, input warp_reg_t d);
    @(negedge clk);
    wb_valid = 1; wb_wreg = a; wb_dup = dup; wb_mask = '1; wb_data = d;
    @(negedge clk);
    wb_valid = 0;
  endtask

  // issue, wait for the operands, return them
  task automatic issue(input int nsrc, input wreg_addr_t s0, input wreg_addr_t s1,
                       input logic [MAX_SRC:0] info, output warp_reg_t o0, output warp_reg_t o1,
                       output logic dst_dup);
    instr_t ins;
    ins = '0;
    ins.warp_id = 3;
    ins.nsrc = NSRC_W'(nsrc);
    ins.src[0] = s0;
    ins.src[1] = s1;
    ins.dup_info = info;
    ins.mask = '1;
    @(negedge clk);
    in_valid = 1; in_instr = ins;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    o0 = out_opnd[0].data;
    o1 = out_opnd[1].data;
    dst_dup = out_dst_dup;
    for (int i = 0; i < nsrc; i++)
      chk(out_opnd[i].st.ce == '0 && out_opnd[i].st.ue == '0 && !out_opnd[i].st.ecc_invalid, "clean operands");
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    warp_reg_t a, b, r, tid;
    logic dd;
    longint g0, c0;
    int ctaid, ntid;
    in_valid = 0; in_instr = '0; out_ready = 0; wb_valid = 0; wb_dup = 0; wb_wreg = '0;
    wb_mask = '0; wb_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ctaid = 7;
    ntid  = 256;
    for (int t = 0; t < WARP_SIZE; t++) begin a[t] = ctaid; b[t] = ntid; tid[t] = 64 + t; end
    writeback(CTAID, 1, a);
    writeback(NTID, 1, b);
    writeback(TID, 0, tid);
    @(negedge clk);
    g0 = gens; c0 = chks;
    // mov %r0, %ctaid.x
    issue(1, CTAID, 0, 5'b00011, a, b, dd); chk(dd == 1, "r0 duplicate"); writeback(R(0), dd, a);
    // mov %r1, %ntid.x
    issue(1, NTID, 0, 5'b00011, a, b, dd);  chk(dd == 1, "r1 duplicate"); writeback(R(1), dd, a);
    // mul.lo %r2, %r0, %r1
    issue(2, R(0), R(1), 5'b00111, a, b, dd); chk(dd == 1, "r2 duplicate");
    for (int t = 0; t < WARP_SIZE; t++) r[t] = a[t] * b[t];
    writeback(R(2), dd, r);
    // mov %r3, %tid.x
    issue(1, TID, 0, 5'b00000, a, b, dd); chk(dd == 0, "r3 divergent"); writeback(R(3), dd, a);
    // add %r4, %r3, %r2
    issue(2, R(3), R(2), 5'b00001, a, b, dd); chk(dd == 0, "r4 divergent");
    for (int t = 0; t < WARP_SIZE; t++) r[t] = a[t] + b[t];
    writeback(R(4), dd, r);
    // read r4 back and check the kernel's result
    issue(1, R(4), 0, 5'b00000, a, b, dd);
    for (int t = 0; t < WARP_SIZE; t++) chk(a[t] == 32'(64 + t + ctaid * ntid), "r4 = tid + ctaid * ntid");
    // encodings: r0, r1, r2 duplicate (1 each), r3, r4 divergent (32 each)
    chk(gens - g0 == 3 + 2 * 32, "encodings");
    // verifications: ctaid, ntid, r0, r1, r2 duplicate (1 each); tid, r3, r4 divergent (32 each)
    chk(chks - c0 == 5 + 3 * 32, "verifications");
    $display("kernel: %0d encodings (per-thread scheme: %0d), %0d verifications (per-thread: %0d)",
             gens - g0, 5 * 32, chks - c0, 9 * 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
