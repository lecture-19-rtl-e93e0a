// tb_mips_pipeline: end-to-end testbench of the pipelined processor, at the
// default memory sizes.
//
// Each test program is assembled in the testbench, loaded through the
// instruction-memory port while reset is held, and run until the fetch stage
// sits in the final halt loop. The result is compared with an
// instruction-at-a-time reference interpreter written here (MIPS semantics
// with one branch delay slot): every register and every data-memory word.
// Programs: the five-instruction forwarding chain (add/sub/and/or/xor), the
// load-use sequence (lw followed by sub/and/or), a load feeding a store,
// the lecture's walk-through program with a taken beq and its delay slot,
// and random programs.
// Timing checks: with no load-use pair, N instructions retire in N
// consecutive cycles; each load-use pair costs exactly one cycle.
// Mechanism counts: load interlock stalls, forwarding from execute,
// forwarding from the memory stage, store-data bypass, taken and not-taken
// branches, write-through of the register file. A mechanism that never
// happened counts as a failure.
module tb_mips_pipeline;
  import mips_pkg::*;

  localparam int IMEM_WORDS = 256;
  localparam int DMEM_WORDS = 256;

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
  int n_stall = 0, n_fwd_ex = 0, n_fwd_me = 0, n_store_byp = 0, n_br_taken = 0;
  int n_br_not_taken = 0, n_wr_through = 0;

  // ------------------------------------------------------------ assembler
  function automatic word_t r_type(int rd, int rs, int rt, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic word_t i_type(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic word_t add_ (int d, int s, int t); return r_type(d, s, t, 6'h20); endfunction
  function automatic word_t sub_ (int d, int s, int t); return r_type(d, s, t, 6'h22); endfunction
  function automatic word_t and_ (int d, int s, int t); return r_type(d, s, t, 6'h24); endfunction
  function automatic word_t or_  (int d, int s, int t); return r_type(d, s, t, 6'h25); endfunction
  function automatic word_t xor_ (int d, int s, int t); return r_type(d, s, t, 6'h26); endfunction
  function automatic word_t slt_ (int d, int s, int t); return r_type(d, s, t, 6'h2a); endfunction
  function automatic word_t addi_(int t, int s, int i); return i_type(6'h08, t, s, i); endfunction
  function automatic word_t andi_(int t, int s, int i); return i_type(6'h0c, t, s, i); endfunction
  function automatic word_t ori_ (int t, int s, int i); return i_type(6'h0d, t, s, i); endfunction
  function automatic word_t lw_  (int t, int i, int s); return i_type(6'h23, t, s, i); endfunction
  function automatic word_t sw_  (int t, int i, int s); return i_type(6'h2b, t, s, i); endfunction
  // beq with offset in instructions relative to the delay slot
  function automatic word_t beq_ (int s, int t, int off); return i_type(6'h04, t, s, off); endfunction
  localparam word_t NOP = 32'h0;

  word_t prog [IMEM_WORDS];
  int    plen;
  int    halt_idx;

  function automatic void emit(word_t w);
    prog[plen] = w;
    plen++;
  endfunction
  function automatic void emit_halt();
    halt_idx = plen;
    emit(beq_(0, 0, -1));
    emit(NOP);
  endfunction

  // ------------------------------------------------------------ reference
  word_t ref_r [32];
  word_t ref_m [DMEM_WORDS];
  int    ref_count;  // instructions executed before reaching the halt loop
  int    ref_ldu;    // load-use pairs executed (each costs one stall cycle)

  function automatic void ref_run();
    int unsigned p, np, nnp;
    int last_load_rt;
    p = 0; np = 4; ref_count = 0; ref_ldu = 0; last_load_rt = -1;
    while (p / 4 != halt_idx && ref_count < 10000) begin
      word_t w;
      logic [5:0] op, fn;
      int rs, rt, rd;
      word_t a, b, si, zi;
      int this_load;
      w = prog[p / 4];
      op = w[31:26]; fn = w[5:0];
      rs = w[25:21]; rt = w[20:16]; rd = w[15:11];
      a = ref_r[rs]; b = ref_r[rt];
      si = {{16{w[15]}}, w[15:0]}; zi = {16'h0, w[15:0]};
      nnp = np + 4;
      this_load = -1;
      // load-use: previous instruction was lw writing a register this one
      // needs in execute or decode (rs always; rt for R-type and beq)
      if (last_load_rt > 0) begin
        if (rs == last_load_rt && (op == 6'h00 && fn inside {6'h20,6'h21,6'h22,6'h23,6'h24,6'h25,6'h26,6'h2a}
                                   || op inside {6'h04, 6'h08, 6'h09, 6'h0c, 6'h0d, 6'h23, 6'h2b}))
          ref_ldu++;
        else if (rt == last_load_rt && (op == 6'h00 && fn inside {6'h20,6'h21,6'h22,6'h23,6'h24,6'h25,6'h26,6'h2a}
                                        || op == 6'h04))
          ref_ldu++;
      end
      case (op)
        6'h00: case (fn)
          6'h20, 6'h21: if (rd != 0) ref_r[rd] = a + b;
          6'h22, 6'h23: if (rd != 0) ref_r[rd] = a - b;
          6'h24: if (rd != 0) ref_r[rd] = a & b;
          6'h25: if (rd != 0) ref_r[rd] = a | b;
          6'h26: if (rd != 0) ref_r[rd] = a ^ b;
          6'h2a: if (rd != 0) ref_r[rd] = ($signed(a) < $signed(b)) ? 1 : 0;
          default: ;
        endcase
        6'h08, 6'h09: if (rt != 0) ref_r[rt] = a + si;
        6'h0c: if (rt != 0) ref_r[rt] = a & zi;
        6'h0d: if (rt != 0) ref_r[rt] = a | zi;
        6'h23: begin
          if (rt != 0) ref_r[rt] = ref_m[((a + si) / 4) % DMEM_WORDS];
          this_load = rt;
        end
        6'h2b: ref_m[((a + si) / 4) % DMEM_WORDS] = b;
        6'h04: if (a == b) nnp = np + (si << 2);
        default: ;
      endcase
      last_load_rt = this_load;
      p = np; np = nnp;
      ref_count++;
    end
  endfunction

  // ------------------------------------------------------------ event counters
  int cyc = 0;
  int retired = 0;
  int first_retire_cyc, last_retire_cyc;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (ev_stall) n_stall++;
      if (ev_fwd_ex) n_fwd_ex++;
      if (ev_fwd_me) n_fwd_me++;
      if (ev_store_bypass) n_store_byp++;
      if (ev_branch_taken) n_br_taken++;
      if (ev_branch_not_taken) n_br_not_taken++;
      if (ev_rf_through) n_wr_through++;
      if (retire) begin
        if (retired == 0) first_retire_cyc = cyc;
        retired++;
        if (retired == ref_count) last_retire_cyc = cyc;
      end
    end
  end

  // ------------------------------------------------------------ one run
  task automatic run_program(string name, int check_timing);
    int errs;
    errs = 0;
    rst_n = 0;
    // load program
    for (int i = 0; i < plen; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    // reference starts from the reset register state and the memory contents
    for (int i = 0; i < 32; i++) ref_r[i] = '0;
    for (int i = 0; i < DMEM_WORDS; i++) begin
      dbg_mem_addr = 8'(i); #1; ref_m[i] = dbg_mem_data;
    end
    ref_run();
    retired = 0; cyc = 0; last_retire_cyc = -1;
    @(negedge clk); rst_n = 1;
    // run: enough cycles for every instruction plus stalls and drain
    repeat (2 * ref_count + 20) @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      dbg_reg_addr = 5'(i); #1;
      checks++;
      if (dbg_reg_data !== ref_r[i]) begin
        failures++; errs++;
        $display("%s: r%0d = %h expected %h", name, i, dbg_reg_data, ref_r[i]);
      end
    end
    for (int i = 0; i < DMEM_WORDS; i++) begin
      dbg_mem_addr = 8'(i); #1;
      checks++;
      if (dbg_mem_data !== ref_m[i]) begin
        failures++; errs++;
        $display("%s: mem[%0d] = %h expected %h", name, i, dbg_mem_data, ref_m[i]);
      end
    end
    // the fetch must have reached the halt loop
    checks++;
    if (pc / 4 != halt_idx && pc / 4 != halt_idx + 1) begin
      failures++; errs++; $display("%s: pc %h not in halt loop", name, pc);
    end
    if (check_timing) begin
      // instructions retired back to back except one cycle per load-use pair
      checks++;
      if (last_retire_cyc - first_retire_cyc != ref_count - 1 + ref_ldu) begin
        failures++; errs++;
        $display("%s: %0d instructions retired over %0d cycles, expected %0d (load-use %0d)",
                 name, ref_count, last_retire_cyc - first_retire_cyc + 1,
                 ref_count + ref_ldu, ref_ldu);
      end
    end
    $display("%s: %0d instructions, %0d load-use stalls, %0d errors", name, ref_count, ref_ldu, errs);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ tests
  initial begin
    // 1. forwarding chain: register values set first, then the dependent chain
    plen = 0;
    for (int i = 1; i < 16; i++) emit(ori_(i, 0, 16'h1000 + 17 * i));
    emit(add_(8, 9, 10));      // add $t0,$t1,$t2
    emit(sub_(12, 8, 11));     // sub $t4,$t0,$t3
    emit(and_(13, 8, 14));     // and $t5,$t0,$t6
    emit(or_(15, 8, 24));      // or  $t7,$t0,$t8
    emit(xor_(25, 8, 2));      // xor $t9,$t0,$t10 ($t10 = $2 here)
    emit_halt();
    run_program("forwarding chain", 1);

    // 2. load followed by dependent instructions: one interlock cycle
    plen = 0;
    emit(ori_(9, 0, 16));                 // $t1 = 16
    emit(ori_(10, 0, 16'h55));
    emit(ori_(12, 0, 16'h0f0));
    emit(ori_(14, 0, 16'h303));
    emit(sw_(10, 0, 9));                  // mem[16] = 0x55
    emit(lw_(8, 0, 9));                   // lw  $t0,0($t1)
    emit(sub_(11, 8, 10));                // sub $t3,$t0,$t2
    emit(and_(13, 8, 12));                // and $t5,$t0,$t4
    emit(or_(15, 8, 14));                 // or  $t7,$t0,$t6
    emit_halt();
    run_program("load interlock", 1);

    // 3. load feeding a store (memory-stage bypass), and a load feeding a branch
    plen = 0;
    emit(ori_(2, 0, 40)); emit(ori_(3, 0, 80)); emit(ori_(4, 0, 16'h1234));
    emit(sw_(4, 0, 2));
    emit(lw_(1, 0, 2));                   // r1 <- Mem[r2]
    emit(sw_(1, 34, 3));                  // Mem[r3+34] <- r1 (34 is word-aligned? no: base 80+34)
    emit(lw_(5, 0, 2));
    emit(beq_(5, 4, 2));                  // taken, depends on the load
    emit(addi_(6, 0, 1));                 // delay slot, always executed
    emit(addi_(7, 0, 1));                 // skipped
    emit(addi_(7, 0, 2));                 // skipped
    emit(addi_(8, 0, 3));                 // target
    emit(beq_(8, 0, 3));                  // not taken
    emit(NOP);
    emit(addi_(9, 0, 4));
    emit_halt();
    run_program("load-store bypass and branches", 0);

    // 4. the lecture's walk-through program (addresses there are labels)
    plen = 0;
    emit(ori_(2, 0, 64)); emit(ori_(4, 0, 9)); emit(ori_(5, 0, 4));
    emit(ori_(6, 0, 7)); emit(ori_(7, 0, 7)); emit(ori_(9, 0, 16'h100));
    emit(ori_(11, 0, 5)); emit(ori_(12, 0, 6)); emit(ori_(14, 0, 16'hff));
    emit(ori_(20, 0, 16'h77)); emit(sw_(20, 36, 2));
    emit(lw_(1, 36, 2));       // lw   r1, 36(r2)
    emit(addi_(2, 2, 3));      // addi r2, r2, 3
    emit(sub_(3, 4, 5));       // sub  r3, r4, r5
    emit(beq_(6, 7, 2));       // beq  r6, r7, target
    emit(ori_(8, 9, 17));      // ori  r8, r9, 17   (delay slot)
    emit(add_(10, 11, 12));    // add  r10, r11, r12 (skipped)
    emit(add_(10, 10, 10));    // skipped
    emit(andi_(13, 14, 15));   // target: and r13, r14, 15
    emit_halt();
    run_program("walk-through", 1);

    // 5. random programs
    for (int t = 0; t < 20; t++) begin
      int n;
      plen = 0;
      for (int i = 1; i < 8; i++) emit(ori_(i, 0, $urandom_range(16'hffff)));
      n = 150;
      while (plen < n) begin
        int k, d, s, r;
        k = $urandom_range(11);
        d = $urandom_range(7); s = $urandom_range(7); r = $urandom_range(7);
        case (k)
          0: emit(add_(d, s, r));
          1: emit(sub_(d, s, r));
          2: emit(and_(d, s, r));
          3: emit(or_(d, s, r));
          4: emit(xor_(d, s, r));
          5: emit(slt_(d, s, r));
          6: emit(addi_(d, s, $urandom_range(16'hffff)));
          7: emit(ori_(d, s, $urandom_range(16'hffff)));
          8: emit(andi_(d, s, $urandom_range(16'hffff)));
          9, 10: begin
            // base $0: address is the word-aligned offset
            if (k == 9) emit(lw_(d, 4 * $urandom_range(31), 0));
            else        emit(sw_(r, 4 * $urandom_range(31), 0));
          end
          default: begin
            // forward branch, not into the halt loop, delay slot not a branch
            int off;
            off = $urandom_range(4);
            if (plen + 2 + off <= n) begin
              emit(beq_(s, ($urandom_range(2) == 0) ? s : r, off));
              emit(addi_(d, s, 1));
            end
          end
        endcase
      end
      emit_halt();
      run_program($sformatf("random %0d", t), 1);
    end

    // every mechanism must have happened
    $display("stalls %0d, forward from EX %0d, forward from ME %0d, store bypass %0d, branches taken %0d / not taken %0d, write-through %0d",
             n_stall, n_fwd_ex, n_fwd_me, n_store_byp, n_br_taken, n_br_not_taken, n_wr_through);
    checks++; if (n_stall == 0)        begin failures++; $display("no stall seen"); end
    checks++; if (n_fwd_ex == 0)       begin failures++; $display("no EX forward seen"); end
    checks++; if (n_fwd_me == 0)       begin failures++; $display("no ME forward seen"); end
    checks++; if (n_store_byp == 0)    begin failures++; $display("no store bypass seen"); end
    checks++; if (n_br_taken == 0)     begin failures++; $display("no taken branch seen"); end
    checks++; if (n_br_not_taken == 0) begin failures++; $display("no untaken branch seen"); end
    checks++; if (n_wr_through == 0)   begin failures++; $display("no write-through seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
