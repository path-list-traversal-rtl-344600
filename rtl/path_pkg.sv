// path_pkg: types and helpers shared by the SIMT path-list flow tracking units.
//
// A path is a program counter, a function call depth and the mask of the
// threads of one warp that are at that PC. The path list of a warp is kept
// sorted by priority: the deepest call depth first, then the smallest PC.
// Keeping the list sorted means that two paths that can merge (same PC and
// same call depth) are always neighbours in the list. An invalid path sorts
// after every valid one.
//
// The sizes below are the defaults of the whole design: 8 warps (the
// configuration the synthesis comparison uses), 64 threads per warp (the
// largest of the 2..64 range that comparison sweeps; smaller warps use the
// low mask bits), 32-bit RISC-V PCs. The call depth width is this design's
// choice.
package path_pkg;

  parameter int unsigned WARPS    = 8;
  parameter int unsigned THREADS  = 64;
  parameter int unsigned PC_W     = 32;
  parameter int unsigned DEPTH_W  = 4;

  // Executed-instruction classes seen by the branch/memory unit.
  typedef enum logic [2:0] {
    OP_SEQ      = 3'd0,  // no control transfer: all threads go to pc+4
    OP_BRANCH   = 3'd1,  // conditional branch: cond threads to target, others to pc+4
    OP_JUMP     = 3'd2,  // uniform direct jump
    OP_CALL     = 3'd3,  // uniform direct call: call depth + 1
    OP_INDIRECT = 3'd4,  // indirect jump: matching threads to target, others replay
    OP_RET      = 3'd5,  // return: matching threads to target at depth - 1, others replay
    OP_MEM      = 3'd6,  // memory access: served threads to pc+4, others replay
    OP_EXIT     = 3'd7   // all threads of the path terminate
  } op_e;

  // Worst case of one thread per path: THREADS paths in all, two of them in
  // the hot tables, the rest in the cold table.
  localparam int unsigned CCT_DEPTH = (THREADS > 2) ? THREADS - 2 : 1;

  typedef logic [THREADS-1:0] mask_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [DEPTH_W-1:0] depth_t;

  typedef struct packed {
    logic   valid;
    depth_t depth;   // function call depth
    pc_t    pc;
    mask_t  mask;    // bit i set: thread i of the warp is on this path
  } path_t;

  localparam path_t PATH_NONE = '0;

  // Priority order: p comes strictly before q.
  function automatic logic path_lt(path_t p, path_t q);
    if (!p.valid) return 1'b0;
    if (!q.valid) return 1'b1;
    if (p.depth != q.depth) return p.depth > q.depth;
    return p.pc < q.pc;
  endfunction

  // Two valid paths that would merge: same PC and same call depth.
  function automatic logic path_eq(path_t p, path_t q);
    return p.valid && q.valid && (p.depth == q.depth) && (p.pc == q.pc);
  endfunction

endpackage
