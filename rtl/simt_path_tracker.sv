// simt_path_tracker: SIMT divergence and convergence tracking for a
// multi-warp core, using a sorted list of paths per warp.
//
// A warp's threads are grouped into paths (PC, call depth, thread mask);
// the warp always runs its highest-priority path: the deepest call depth,
// then the smallest PC. Running the smallest PC first lets lagging threads
// catch up, and because the list is kept sorted the only paths that can
// ever merge are the active one and the next one, so reconvergence needs
// only a comparison, not a search.
//
// This module joins the branch/memory unit, which splits the active path of
// the executing warp according to the instruction it ran, with the 3-stage
// path tracking unit (two hot context tables, the compact-sort unit and the
// sorted cold context table). The surrounding pipeline drives:
//
//   ex_*     the instruction a warp has just executed: its class, target and
//            per-thread condition mask; ex_path returns that warp's active
//            path in the same cycle (the threads that executed it)
//   start_*  loads a warp with a single path (pc, all its threads) when no
//            instruction is presented that cycle (start_ready)
//   fe_*     read port for fetch: the active path of a warp
//
// and receives rsp_*, the new active path of the warp two cycles after
// ex_valid: fetch is resteered to rsp_path.pc, and an invalid rsp_path
// means all threads of the warp have exited. A warp may present a new
// instruction once warp_inflight shows it has left the tracking pipeline.
// The ev_* outputs pulse on each divergence push, cold-table pop, merge,
// sorting swap and cancelled swap.
module simt_path_tracker
  import path_pkg::*;
#(
  parameter int unsigned NWARPS = WARPS,
  parameter int unsigned DEPTH  = CCT_DEPTH,
  localparam int unsigned WW    = (NWARPS > 1) ? $clog2(NWARPS) : 1
)(
  input  logic              clk,
  input  logic              rst,
  // executed instruction
  input  logic              ex_valid,
  input  logic [WW-1:0]     ex_warp,
  input  op_e               ex_op,
  input  pc_t               ex_target,
  input  mask_t             ex_cond,
  output path_t             ex_path,
  output logic [NWARPS-1:0] warp_inflight,
  // warp start
  input  logic              start_valid,
  input  logic [WW-1:0]     start_warp,
  input  pc_t               start_pc,
  input  mask_t             start_mask,
  output logic              start_ready,
  // fetch
  input  logic [WW-1:0]     fe_warp,
  output path_t             fe_path,
  output logic              rsp_valid,
  output logic [WW-1:0]     rsp_warp,
  output path_t             rsp_path,
  // events
  output logic              ev_push,
  output logic              ev_pop,
  output logic [1:0]        ev_merge,
  output logic              ev_swap,
  output logic              ev_swap_cancel
);

  path_t bu_a, bu_b;

  branch_mem_unit u_bru (
    .active(ex_path), .op(ex_op), .target(ex_target), .cond(ex_cond),
    .a(bu_a), .b(bu_b)
  );

  logic          req_valid, req_start;
  logic [WW-1:0] req_warp;
  path_t         req_a, req_b, start_path;

  always_comb begin
    start_path       = PATH_NONE;
    start_path.valid = (start_mask != '0);
    start_path.pc    = start_pc;
    start_path.mask  = start_mask;

    start_ready = !ex_valid && !warp_inflight[start_warp];
    req_valid   = ex_valid || (start_valid && start_ready);
    req_start   = !ex_valid;
    req_warp    = ex_valid ? ex_warp : start_warp;
    req_a       = ex_valid ? bu_a : start_path;
    req_b       = ex_valid ? bu_b : PATH_NONE;
  end

  path_tracking_unit #(.NWARPS(NWARPS), .DEPTH(DEPTH)) u_ptu (
    .clk, .rst,
    .req_valid, .req_warp, .req_start, .req_a, .req_b,
    .warp_inflight,
    .rsp_valid, .rsp_warp, .rsp_path,
    .fe_warp, .fe_path,
    .ex_warp, .ex_path,
    .ev_push, .ev_pop, .ev_merge, .ev_swap, .ev_swap_cancel
  );

endmodule
