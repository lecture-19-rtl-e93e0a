// forward_unit: forwarding (bypass) control.
//
// Decode-stage operand forwarding: for each source register of the
// instruction in decode (rs, rt), pick the value of the nearest valid pending
// write to that register and load it into the DE/EX operand latches A and B,
// bypassing the rest of the pipe. Priority, newest first:
//   1. the instruction in execute (ALU result, combinational from the ALU),
//      unless it is a load, whose value does not exist yet;
//   2. the instruction in the memory stage (its ALU result, or for a load the
//      word just read from data memory);
//   3. the register file, which already passes through the write-back value.
// Register 0 is never forwarded. Invalid slots (bubbles) are ignored.
//
// Memory-stage store-data bypass: a store in the memory stage whose data
// register rt is written by the instruction in write back takes the
// write-back value instead of EX/ME.D. This lets "lw rX; sw rX" run back to
// back without a stall.
//
// Purely combinational. The *_sel outputs tell which source was used.
// The forwarding rule and both bypass paths follow the lecture; placing the
// forward muxes in decode (in front of the DE/EX latches) follows its
// "Forwarding Muxes" diagram.
module forward_unit
  import mips_pkg::*;
(
  // decode stage
  input  reg_idx_t rs,
  input  reg_idx_t rt,
  input  word_t    rf_rs,
  input  word_t    rf_rt,
  // execute stage
  input  logic     ex_valid,
  input  logic     ex_reg_wr,
  input  logic     ex_mem_to_reg,
  input  reg_idx_t ex_rw,
  input  word_t    ex_result,
  // memory stage
  input  logic     me_valid,
  input  logic     me_reg_wr,
  input  reg_idx_t me_rw,
  input  word_t    me_result,
  input  logic     me_mem_wr,
  input  reg_idx_t me_rt,
  input  word_t    me_d,
  // write-back stage
  input  logic     wb_valid,
  input  logic     wb_reg_wr,
  input  reg_idx_t wb_rw,
  input  word_t    wb_result,
  // outputs
  output word_t    a_val,
  output word_t    b_val,
  output logic [1:0] a_sel,    // 0 regfile, 1 execute, 2 memory stage
  output logic [1:0] b_sel,
  output word_t    store_data,
  output logic     store_bypass
);

  logic ex_fwd_ok, me_fwd_ok;
  assign ex_fwd_ok = ex_valid && ex_reg_wr && !ex_mem_to_reg && (ex_rw != '0);
  assign me_fwd_ok = me_valid && me_reg_wr && (me_rw != '0);

  function automatic logic [1:0] pick(reg_idx_t r);
    if (r == '0)                      return 2'd0;
    else if (ex_fwd_ok && ex_rw == r) return 2'd1;
    else if (me_fwd_ok && me_rw == r) return 2'd2;
    else                              return 2'd0;
  endfunction

  // A load in execute that matches shadows the older memory-stage write: the
  // value is not available, and the hazard unit stalls in that case, so the
  // memory-stage value must not be taken for an operand the ALU needs.
  assign a_sel = (ex_valid && ex_reg_wr && ex_mem_to_reg && ex_rw == rs && rs != '0)
                 ? 2'd0 : pick(rs);
  assign b_sel = (ex_valid && ex_reg_wr && ex_mem_to_reg && ex_rw == rt && rt != '0)
                 ? 2'd0 : pick(rt);

  always_comb begin
    unique case (a_sel)
      2'd1:    a_val = ex_result;
      2'd2:    a_val = me_result;
      default: a_val = rf_rs;
    endcase
    unique case (b_sel)
      2'd1:    b_val = ex_result;
      2'd2:    b_val = me_result;
      default: b_val = rf_rt;
    endcase
  end

  assign store_bypass = me_valid && me_mem_wr && wb_valid && wb_reg_wr &&
                        (wb_rw != '0) && (wb_rw == me_rt);
  assign store_data   = store_bypass ? wb_result : me_d;

endmodule
