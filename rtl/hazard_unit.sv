// hazard_unit: load interlock, detected at issue (in decode).
//
// With forwarding in place, the one hazard left is a load followed directly by
// an instruction that needs the loaded value in execute or in decode: the
// word comes out of data memory a cycle too late. When the instruction in
// decode reads, as an ALU operand or a branch comparand, the register that a
// valid load in execute will write, stall is raised for one cycle:
//   - the PC and IF/DE are held (the same instruction is refetched and
//     re-decoded),
//   - a bubble (nop) is issued into DE/EX.
// One cycle later the load is in the memory stage and forwarding supplies the
// value. The store-data operand (rt of sw) is not a reason to stall: the
// memory-stage bypass supplies it. Register 0 never causes a stall.
// Purely combinational and stateless.
module hazard_unit
  import mips_pkg::*;
(
  input  logic     de_valid,
  input  ctrl_t    de_ctrl,
  input  reg_idx_t rs,
  input  reg_idx_t rt,
  input  logic     ex_valid,
  input  logic     ex_reg_wr,
  input  logic     ex_mem_to_reg,
  input  reg_idx_t ex_rw,
  output logic     stall
);

  logic uses_rs, uses_rt, ex_load;

  // Every supported instruction reads rs; rt is an ALU/branch operand for
  // R-type (ALUSrc clear) and beq.
  assign uses_rs = de_ctrl.reg_wr || de_ctrl.mem_wr || de_ctrl.branch;
  assign uses_rt = (de_ctrl.reg_wr && !de_ctrl.alu_src) || de_ctrl.branch;
  assign ex_load = ex_valid && ex_reg_wr && ex_mem_to_reg && (ex_rw != '0);

  assign stall = de_valid && ex_load &&
                 ((uses_rs && rs == ex_rw) || (uses_rt && rt == ex_rw));

endmodule
