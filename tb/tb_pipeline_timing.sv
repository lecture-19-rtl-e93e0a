// tb_pipeline_timing: cycle-exact checks of three short programs on
// mips_pipeline, against stage-by-stage schedules worked out by hand.
//
// After reset, rising edge k loads instruction k-1 into IF/DE, so with no
// branch or stall instruction j is in DE after edge j+1, EX after j+2, ME
// after j+3 and WB after j+4, and the PC after edge k is 4k.
//  1. Branch walk-through: lw, addi, sub, beq (taken), ori (delay slot), two
//     skipped adds, and the target andi. After edge 4: lw in WB, addi in ME,
//     sub in EX, beq in DE (taken), ori being fetched (pc 16). After edge 5 the
//     fetch is at the target (pc 28).
//  2. Load-use: lw r8; sub/and/or reading r8. The sub is held in DE for one
//     cycle (stall during the cycle after edge 2+S), the PC holds, and a bubble
//     appears in WB between the lw and the sub.
//  3. Forwarding chain: add r8; sub, and, or, xor reading r8. The sub takes
//     r8 from EX, the and from ME, the or from the register-file write-through,
//     the xor from the register file; five instructions retire back to back.
// Sampling is at the falling edge, i.e. the state after the preceding rising
// edge. Final register values are checked too.
module tb_pipeline_timing;
  import mips_pkg::*;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [7:0] imem_waddr = '0;
  word_t imem_wdata = '0;
  reg_idx_t dbg_reg_addr = '0;
  word_t dbg_reg_data;
  logic [7:0] dbg_mem_addr = '0;
  word_t dbg_mem_data;
  word_t pc;
  logic retire, ev_stall, ev_fwd_ex, ev_fwd_me, ev_store_bypass, ev_branch_taken;
  logic ev_branch_not_taken, ev_rf_through;

  mips_pipeline dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NCYC = 24;
  word_t pc_at [NCYC];
  logic  ret_at [NCYC], stall_at [NCYC], fex_at [NCYC], fme_at [NCYC];
  logic  thr_at [NCYC], brt_at [NCYC];

  function automatic word_t r_type(int rd, int rs, int rt, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic word_t i_type(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  word_t prog [32];
  int plen;
  function automatic void emit(word_t w); prog[plen] = w; plen++; endfunction

  task automatic load_and_run();
    rst_n = 0;
    for (int i = 0; i < plen; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    @(negedge clk); rst_n = 1;
    // index k: state after rising edge k (k = 0 is before the first edge)
    for (int k = 0; k < NCYC; k++) begin
      pc_at[k] = pc; ret_at[k] = retire; stall_at[k] = ev_stall;
      fex_at[k] = ev_fwd_ex; fme_at[k] = ev_fwd_me; thr_at[k] = ev_rf_through;
      brt_at[k] = ev_branch_taken;
      @(negedge clk);
    end
  endtask

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic expect_reg(string what, int r, word_t exp);
    dbg_reg_addr = 5'(r);
    #1;
    expect_eq(what, dbg_reg_data, exp);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t m9;
    // ---------------------------------------------------------- 1. branch
    plen = 0;
    emit(i_type(6'h23, 1, 2, 36));          // 0  lw   r1, 36(r2)
    emit(i_type(6'h08, 2, 2, 3));           // 1  addi r2, r2, 3
    emit(r_type(3, 4, 5, 6'h22));           // 2  sub  r3, r4, r5
    emit(i_type(6'h04, 7, 6, 3));           // 3  beq  r6, r7, target (r6 = r7 = 0)
    emit(i_type(6'h0d, 8, 9, 17));          // 4  ori  r8, r9, 17 (delay slot)
    emit(r_type(10, 2, 2, 6'h20));          // 5  add  r10, r2, r2 (skipped)
    emit(r_type(10, 10, 2, 6'h20));         // 6  skipped
    emit(i_type(6'h0c, 13, 8, 15));         // 7  andi r13, r8, 15 (target)
    emit(i_type(6'h04, 0, 0, -1));          // 8  halt loop
    emit(32'h0);                            // 9
    dbg_mem_addr = 8'd9; #1; m9 = dbg_mem_data;
    load_and_run();
    for (int k = 1; k <= 4; k++) expect_eq($sformatf("branch: pc after edge %0d", k), pc_at[k], 4 * k);
    expect_eq("branch: beq taken while in DE (after edge 4)", brt_at[4], 1);
    expect_eq("branch: lw in WB after edge 4", ret_at[4], 1);
    expect_eq("branch: fetch at target after edge 5", pc_at[5], 28);
    expect_eq("branch: fetch after target", pc_at[6], 32);
    // retired: lw addi sub beq ori andi, then halt loop; no bubble between
    for (int k = 4; k <= 9; k++) expect_eq($sformatf("branch: retire after edge %0d", k), ret_at[k], 1);
    expect_reg("branch: r1", 1, m9);
    expect_reg("branch: r2", 2, 3);
    expect_reg("branch: r8", 8, 17);
    expect_reg("branch: r10 (skipped)", 10, 0);
    expect_reg("branch: r13", 13, 1);

    // ---------------------------------------------------------- 2. load-use
    plen = 0;
    emit(i_type(6'h0d, 10, 0, 5));          // 0  ori r10, r0, 5
    emit(i_type(6'h0d, 12, 0, 16'h0f0));    // 1  ori r12, r0, 0xf0
    emit(i_type(6'h0d, 14, 0, 16'h300));    // 2  ori r14, r0, 0x300
    emit(i_type(6'h0d, 9, 0, 40));          // 3  ori r9,  r0, 40
    emit(i_type(6'h2b, 12, 9, 0));          // 4  sw  r12, 0(r9)
    emit(i_type(6'h23, 8, 9, 0));           // 5  lw  r8, 0(r9)
    emit(r_type(11, 8, 10, 6'h22));         // 6  sub r11, r8, r10
    emit(r_type(13, 8, 12, 6'h24));         // 7  and r13, r8, r12
    emit(r_type(15, 8, 14, 6'h25));         // 8  or  r15, r8, r14
    emit(i_type(6'h04, 0, 0, -1));          // 9  halt loop
    emit(32'h0);
    load_and_run();
    // lw (5) in EX and sub (6) in DE after edge 7: stall in that cycle
    for (int k = 1; k <= 6; k++) expect_eq($sformatf("load: no stall after edge %0d", k), stall_at[k], 0);
    expect_eq("load: stall after edge 7", stall_at[7], 1);
    expect_eq("load: no second stall", stall_at[8], 0);
    expect_eq("load: pc after edge 7", pc_at[7], 28);
    expect_eq("load: pc held after edge 8", pc_at[8], 28);
    expect_eq("load: pc after edge 9", pc_at[9], 32);
    expect_eq("load: sub takes r8 from ME after the stall", fme_at[8], 1);
    expect_eq("load: lw retires after edge 9", ret_at[9], 1);
    expect_eq("load: bubble in WB after edge 10", ret_at[10], 0);
    for (int k = 11; k <= 13; k++) expect_eq($sformatf("load: retire after edge %0d", k), ret_at[k], 1);
    expect_reg("load: r8", 8, 32'h0f0);
    expect_reg("load: r11", 11, 32'h0f0 - 5);
    expect_reg("load: r13", 13, 32'h0f0);
    expect_reg("load: r15", 15, 32'h3f0);

    // ---------------------------------------------------------- 3. forwarding
    plen = 0;
    emit(i_type(6'h0d, 9, 0, 100));         // 0  ori r9,  r0, 100
    emit(i_type(6'h0d, 10, 0, 23));         // 1  ori r10, r0, 23
    emit(i_type(6'h0d, 11, 0, 7));          // 2  ori r11, r0, 7
    emit(r_type(8, 9, 10, 6'h20));          // 3  add r8,  r9, r10   (123)
    emit(r_type(12, 8, 11, 6'h22));         // 4  sub r12, r8, r11   (116)
    emit(r_type(13, 8, 9, 6'h24));          // 5  and r13, r8, r9
    emit(r_type(15, 8, 10, 6'h25));         // 6  or  r15, r8, r10
    emit(r_type(16, 8, 11, 6'h26));         // 7  xor r16, r8, r11
    emit(i_type(6'h04, 0, 0, -1));          // 8  halt loop
    emit(32'h0);
    load_and_run();
    // instruction j is in DE after edge j+1
    expect_eq("fwd: sub gets r8 from EX (after edge 5)", fex_at[5], 1);
    expect_eq("fwd: and gets r8 from ME (after edge 6)", fme_at[6], 1);
    expect_eq("fwd: or gets r8 by write-through (after edge 7)", thr_at[7], 1);
    expect_eq("fwd: xor needs no forwarding (after edge 8)", fex_at[8] | fme_at[8] | thr_at[8], 0);
    for (int k = 4; k <= 11; k++) expect_eq($sformatf("fwd: retire after edge %0d", k), ret_at[k], 1);
    for (int k = 1; k <= 11; k++) expect_eq($sformatf("fwd: no stall after edge %0d", k), stall_at[k], 0);
    expect_reg("fwd: r12", 12, 116);
    expect_reg("fwd: r13", 13, 123 & 100);
    expect_reg("fwd: r15", 15, 123 | 23);
    expect_reg("fwd: r16", 16, 123 ^ 7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
