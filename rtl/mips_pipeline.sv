// mips_pipeline: five-stage pipelined MIPS-subset processor.
//
// Stages: instruction fetch (IF), decode and register read (DE), execute
// (EX), memory (ME), write back (WB), separated by the pipeline registers
// IF/DE (IR), DE/EX (A, B, immediate), EX/ME (S = ALU result, D = store data)
// and ME/WB (S pass-through, M = load result). Each register carries a valid
// bit; a cleared bit is a bubble.
//
// Control is data stationary: the main control decodes the instruction once,
// in DE, and the control bundle travels with it; each stage uses its part
// (ExtOp/ALUSrc/ALUOp/RegDst in EX, MemWr in ME, MemtoReg/RegWr in WB).
//
// Branches (beq) are compared and resolved in decode using the forwarded
// operands; the target is PC+4 + (sign-extended offset << 2). The instruction
// after the branch is always executed (one delay slot, no squash).
//
// Data hazards: operands are forwarded into the DE/EX latches from the
// instruction in EX (ALU result) and in ME (ALU result or loaded word); the
// register file passes a WB write through to a same-cycle read. A load
// followed immediately by an instruction that uses the loaded register as an
// ALU operand or branch comparand is interlocked for one cycle: PC and IF/DE
// hold, a bubble enters EX. A store whose data register comes from the load in
// WB takes the value through the memory-stage bypass, without stalling.
//
// Ports:
//   imem_we/imem_waddr/imem_wdata : program load (word address)
//   dbg_reg_addr/dbg_reg_data     : register inspection
//   dbg_mem_addr/dbg_mem_data     : data memory inspection (word address)
//   pc                            : fetch address
//   retire                        : a valid instruction is in write back
//   ev_*                          : one-cycle event flags: load interlock
//                                   stall, operand forwarded from EX / ME,
//                                   store-data bypass, branch taken / not
//                                   taken, operand taken from a register-file
//                                   write-through
// Reset (active low, asynchronous) empties the pipeline and starts at
// address 0. Memory sizes are this design's choice (IMEM_DEPTH, DMEM_DEPTH).
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_waddr,
  input  word_t                         imem_wdata,
  input  reg_idx_t                      dbg_reg_addr,
  output word_t                         dbg_reg_data,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dbg_mem_addr,
  output word_t                         dbg_mem_data,
  output word_t                         pc,
  output logic                          retire,
  output logic                          ev_stall,
  output logic                          ev_fwd_ex,
  output logic                          ev_fwd_me,
  output logic                          ev_store_bypass,
  output logic                          ev_branch_taken,
  output logic                          ev_branch_not_taken,
  output logic                          ev_rf_through
);

  // ---------------------------------------------------------------- IF
  logic  stall, br_taken;
  word_t br_target, pc_plus4, instr;

  next_pc u_next_pc (
    .clk, .rst_n, .stall, .br_taken, .br_target, .pc, .pc_plus4
  );

  inst_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .addr(pc), .instr,
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  if_de_t if_de_d, if_de_q;
  logic   de_valid;
  assign if_de_d = '{ir: instr, pc4: pc_plus4};

  pipe_reg #(.T(if_de_t)) u_if_de (
    .clk, .rst_n, .en(!stall), .bubble(1'b0),
    .d(if_de_d), .d_valid(1'b1), .q(if_de_q), .q_valid(de_valid)
  );

  // ---------------------------------------------------------------- DE
  ctrl_t    dec_ctrl, de_ctrl;
  reg_idx_t rs, rt, rd;
  word_t    rf_rs, rf_rt, a_val, b_val;
  logic [1:0] a_sel, b_sel;

  assign rs = if_de_q.ir[25:21];
  assign rt = if_de_q.ir[20:16];
  assign rd = if_de_q.ir[15:11];

  main_control u_ctrl (.instr(if_de_q.ir), .ctrl(dec_ctrl));
  assign de_ctrl = de_valid ? dec_ctrl : CTRL_NOP;

  // forward declarations of later-stage state
  de_ex_t de_ex_d, de_ex_q;
  logic   ex_valid;
  ex_me_t ex_me_d, ex_me_q;
  logic   me_valid;
  me_wb_t me_wb_d, me_wb_q;
  logic   wb_valid;
  word_t  ex_s, me_result, wb_result, store_data, dmem_rdata;
  reg_idx_t ex_rw;
  logic   store_bypass, wb_we;

  regfile u_rf (
    .clk, .rst_n,
    .ra1(rs), .rd1(rf_rs), .ra2(rt), .rd2(rf_rt),
    .we(wb_we), .wa(me_wb_q.rw), .wd(wb_result),
    .dbg_ra(dbg_reg_addr), .dbg_rd(dbg_reg_data)
  );

  forward_unit u_fwd (
    .rs, .rt, .rf_rs, .rf_rt,
    .ex_valid, .ex_reg_wr(de_ex_q.ctrl.reg_wr),
    .ex_mem_to_reg(de_ex_q.ctrl.mem_to_reg), .ex_rw, .ex_result(ex_s),
    .me_valid, .me_reg_wr(ex_me_q.reg_wr), .me_rw(ex_me_q.rw),
    .me_result, .me_mem_wr(ex_me_q.mem_wr), .me_rt(ex_me_q.rt), .me_d(ex_me_q.d),
    .wb_valid, .wb_reg_wr(me_wb_q.reg_wr), .wb_rw(me_wb_q.rw), .wb_result,
    .a_val, .b_val, .a_sel, .b_sel, .store_data, .store_bypass
  );

  hazard_unit u_haz (
    .de_valid, .de_ctrl, .rs, .rt,
    .ex_valid, .ex_reg_wr(de_ex_q.ctrl.reg_wr),
    .ex_mem_to_reg(de_ex_q.ctrl.mem_to_reg), .ex_rw, .stall
  );

  // branch resolved in decode ("=" comparator next to the register file)
  word_t br_offset;
  assign br_offset = {{14{if_de_q.ir[15]}}, if_de_q.ir[15:0], 2'b00};
  assign br_target = if_de_q.pc4 + br_offset;
  assign br_taken  = de_ctrl.branch && !stall && (a_val == b_val);

  assign de_ex_d = '{ctrl: de_ctrl, a: a_val, b: b_val, imm16: if_de_q.ir[15:0],
                     rt: rt, rd: rd};

  pipe_reg #(.T(de_ex_t)) u_de_ex (
    .clk, .rst_n, .en(1'b1), .bubble(stall),
    .d(de_ex_d), .d_valid(de_valid), .q(de_ex_q), .q_valid(ex_valid)
  );

  // ---------------------------------------------------------------- EX
  exec_unit u_exec (
    .ctrl(de_ex_q.ctrl), .a(de_ex_q.a), .b(de_ex_q.b), .imm16(de_ex_q.imm16),
    .rt(de_ex_q.rt), .rd(de_ex_q.rd), .s(ex_s), .rw(ex_rw)
  );

  assign ex_me_d = '{mem_wr: de_ex_q.ctrl.mem_wr, mem_to_reg: de_ex_q.ctrl.mem_to_reg,
                     reg_wr: de_ex_q.ctrl.reg_wr, s: ex_s, d: de_ex_q.b,
                     rt: de_ex_q.rt, rw: ex_rw};

  pipe_reg #(.T(ex_me_t)) u_ex_me (
    .clk, .rst_n, .en(1'b1), .bubble(1'b0),
    .d(ex_me_d), .d_valid(ex_valid), .q(ex_me_q), .q_valid(me_valid)
  );

  // ---------------------------------------------------------------- ME
  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(ex_me_q.s), .we(me_valid && ex_me_q.mem_wr), .wdata(store_data),
    .rdata(dmem_rdata), .dbg_addr(dbg_mem_addr), .dbg_rdata(dbg_mem_data)
  );

  assign me_result = ex_me_q.mem_to_reg ? dmem_rdata : ex_me_q.s;

  assign me_wb_d = '{mem_to_reg: ex_me_q.mem_to_reg, reg_wr: ex_me_q.reg_wr,
                     s: ex_me_q.s, m: dmem_rdata, rw: ex_me_q.rw};

  pipe_reg #(.T(me_wb_t)) u_me_wb (
    .clk, .rst_n, .en(1'b1), .bubble(1'b0),
    .d(me_wb_d), .d_valid(me_valid), .q(me_wb_q), .q_valid(wb_valid)
  );

  // ---------------------------------------------------------------- WB
  assign wb_result = me_wb_q.mem_to_reg ? me_wb_q.m : me_wb_q.s;
  assign wb_we     = wb_valid && me_wb_q.reg_wr;

  // ---------------------------------------------------------------- events
  assign retire          = wb_valid;
  assign ev_stall        = stall;
  assign ev_fwd_ex       = de_valid && !stall && (a_sel == 2'd1 || b_sel == 2'd1);
  assign ev_fwd_me       = de_valid && !stall && (a_sel == 2'd2 || b_sel == 2'd2);
  assign ev_store_bypass = store_bypass;
  assign ev_branch_taken = br_taken;
  assign ev_branch_not_taken = de_ctrl.branch && !stall && !br_taken;
  // an operand read in decode that the write-back stage is writing this cycle
  // and that no newer stage supplies
  assign ev_rf_through   = wb_we && (me_wb_q.rw != '0) && !stall &&
                           ((a_sel == 2'd0 && rs == me_wb_q.rw &&
                             (de_ctrl.reg_wr || de_ctrl.mem_wr || de_ctrl.branch)) ||
                            (b_sel == 2'd0 && rt == me_wb_q.rw &&
                             ((de_ctrl.reg_wr && !de_ctrl.alu_src) || de_ctrl.branch)));

  // A stall only ever comes from a load in execute.
  assert property (@(posedge clk) disable iff (!rst_n)
                   stall |-> (ex_valid && de_ex_q.ctrl.mem_to_reg));

endmodule
