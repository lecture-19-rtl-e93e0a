// mips_pkg: shared types and constants of the five-stage pipelined MIPS-subset
// processor (fetch, decode/register read, execute, memory, write back).
//
// The instruction formats and opcode numbers are the standard MIPS encodings.
// The control bundle ctrl_t carries the eight control signals generated by the
// main control in decode (ExtOp, ALUSrc, ALUOp, RegDst, MemWr, Branch, MemtoReg,
// RegWr) so they can travel down the pipeline with their instruction ("data
// stationary control"). The pipeline-register structs hold what each stage
// boundary latches, each with a valid bit that marks a bubble when cleared.
// The exact ALU operation set and the struct layout are this design's choices.
package mips_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Primary opcodes (instr[31:26])
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // R-type function codes (instr[5:0])
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_SLT  = 6'h2a;

  // ALU operation selected in decode and used one cycle later in execute
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4,
    ALU_SLT = 3'd5
  } alu_op_e;

  // Control signals of one instruction (generated in Reg/Dec)
  typedef struct packed {
    logic    ext_op;      // 1: sign-extend imm16, 0: zero-extend       (Exec)
    logic    alu_src;     // 1: ALU B operand is the immediate           (Exec)
    alu_op_e alu_op;      //                                             (Exec)
    logic    reg_dst;     // 1: destination is rd, 0: rt                 (Exec)
    logic    mem_wr;      // store                                       (Mem)
    logic    branch;      // beq                                         (decode)
    logic    mem_to_reg;  // write-back value comes from data memory     (Wr)
    logic    reg_wr;      // instruction writes a register               (Wr)
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{ext_op: 1'b0, alu_src: 1'b0, alu_op: ALU_ADD,
                                 reg_dst: 1'b0, mem_wr: 1'b0, branch: 1'b0,
                                 mem_to_reg: 1'b0, reg_wr: 1'b0};

  // IF/DE: IR and the address of the next sequential instruction
  typedef struct packed {
    word_t ir;
    word_t pc4;
  } if_de_t;

  // DE/EX: A and B bus values (after forwarding), immediate, destination
  typedef struct packed {
    ctrl_t    ctrl;
    word_t    a;
    word_t    b;
    logic [15:0] imm16;
    reg_idx_t rt;
    reg_idx_t rd;
  } de_ex_t;

  // EX/ME: S = ALU result, D = store data (bus B pass-through)
  typedef struct packed {
    logic     mem_wr;
    logic     mem_to_reg;
    logic     reg_wr;
    word_t    s;
    word_t    d;
    reg_idx_t rt;
    reg_idx_t rw;
  } ex_me_t;

  // ME/WB: S = ALU result pass-through, M = memory result of lw
  typedef struct packed {
    logic     mem_to_reg;
    logic     reg_wr;
    word_t    s;
    word_t    m;
    reg_idx_t rw;
  } me_wb_t;

endpackage
