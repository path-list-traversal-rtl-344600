// branch_mem_unit: splits the active path of a warp into the (up to) two
// paths that follow the instruction it has just executed.
//
// Inputs are the active path, the class of the executed instruction, its
// target (branch target, jump/call target, or the target selected for an
// indirect jump or return) and a per-thread condition mask whose meaning
// depends on the class:
//
//   OP_SEQ       a = pc+4, all threads
//   OP_BRANCH    a = target for cond threads,   b = pc+4 for the others
//   OP_JUMP      a = target, all threads
//   OP_CALL      a = target at call depth + 1, all threads
//   OP_INDIRECT  a = target for cond threads,   b = pc (replay) for the others
//   OP_RET       a = target at call depth - 1 for cond threads, b = pc (replay)
//   OP_MEM       a = pc+4 for served (cond) threads, b = pc (replay)
//   OP_EXIT      no path: the threads terminate
//
// A path whose mask is empty is invalid, so a uniform branch yields a single
// path. The original description names this unit and says it makes up to two paths from
// the active one; the instruction classes, the replay of the threads that
// do not follow an indirect target or whose memory access is not served,
// and the depth update on calls and returns are this design's choices.
// Purely combinational.
module branch_mem_unit
  import path_pkg::*;
(
  input  path_t active,
  input  op_e   op,
  input  pc_t   target,
  input  mask_t cond,
  output path_t a,
  output path_t b
);

  pc_t   pc_next;
  mask_t m_in, m_out;

  always_comb begin
    pc_next = active.pc + pc_t'(4);
    m_in    = active.mask & cond;
    m_out   = active.mask & ~cond;

    a = active;
    b = active;
    unique case (op)
      OP_SEQ: begin
        a.pc = pc_next;
        b    = PATH_NONE;
      end
      OP_BRANCH: begin
        a.pc   = target;
        a.mask = m_in;
        b.pc   = pc_next;
        b.mask = m_out;
      end
      OP_JUMP: begin
        a.pc = target;
        b    = PATH_NONE;
      end
      OP_CALL: begin
        a.pc    = target;
        a.depth = active.depth + 1'b1;
        b       = PATH_NONE;
      end
      OP_INDIRECT: begin
        a.pc   = target;
        a.mask = m_in;
        b.mask = m_out;
      end
      OP_RET: begin
        a.pc    = target;
        a.depth = active.depth - 1'b1;
        a.mask  = m_in;
        b.mask  = m_out;
      end
      OP_MEM: begin
        a.pc   = pc_next;
        a.mask = m_in;
        b.mask = m_out;
      end
      OP_EXIT: begin
        a = PATH_NONE;
        b = PATH_NONE;
      end
      default: begin
        a = PATH_NONE;
        b = PATH_NONE;
      end
    endcase

    a.valid = active.valid && (a.mask != '0) && (op != OP_EXIT);
    b.valid = active.valid && (b.mask != '0) && !(op inside {OP_SEQ, OP_JUMP, OP_CALL, OP_EXIT});
    if (!a.valid) a = PATH_NONE;
    if (!b.valid) b = PATH_NONE;
  end

endmodule
