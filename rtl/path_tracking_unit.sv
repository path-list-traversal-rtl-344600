// path_tracking_unit: the sorted path list of every warp, updated by a
// 3-stage pipeline.
//
// Each warp's paths are kept in priority order (deepest call depth, then
// smallest PC) across three tables: the first hot context table (HCT1)
// holds the active path x, the second (HCT2) the next path y, and the cold
// context table (CCT) all the others. Every instruction a warp executes
// turns its active path into up to two new paths a and b (made by the
// branch/memory unit outside this module) and sends them here:
//
//   stage 1  read c = HCT2[warp]
//   stage 2  CCS merges paths of equal PC and depth and sorts a, b, c
//            into x < y < z; if only x is left, read the CCT head
//   stage 3  write x to HCT1 and resteer fetch to x.pc; if z is valid push
//            it to the CCT; if only x is valid pop the CCT head and use it
//            as y; write y to HCT2
//
// Because the list is sorted, the paths that can merge are always the
// active one and the next one, so convergence needs no associative search.
// The CCT's sorting state machine runs in the cycles where the CCT is not
// in use and keeps HCT2 equal to the best of the warp's waiting paths.
//
// Interface: one request per cycle (req_*), for a warp that has no request
// in stages 2 or 3 (see warp_inflight); req_start instead loads req_a as the
// only path of the warp and empties its list. The response (rsp_*) comes two
// cycles after the request: rsp_path is the new active path, invalid once
// every thread of the warp has exited. fe_* and ex_* read HCT1 for the fetch
// stage and for the executing instruction. The stage split follows the
// original description; the request/start/response interface is this design's choice.
module path_tracking_unit
  import path_pkg::*;
#(
  parameter int unsigned NWARPS = WARPS,
  parameter int unsigned DEPTH  = CCT_DEPTH,
  localparam int unsigned WW    = (NWARPS > 1) ? $clog2(NWARPS) : 1
)(
  input  logic              clk,
  input  logic              rst,
  // update request
  input  logic              req_valid,
  input  logic [WW-1:0]     req_warp,
  input  logic              req_start,
  input  path_t             req_a,
  input  path_t             req_b,
  output logic [NWARPS-1:0] warp_inflight,
  // fetch resteer
  output logic              rsp_valid,
  output logic [WW-1:0]     rsp_warp,
  output path_t             rsp_path,
  // active-path reads
  input  logic [WW-1:0]     fe_warp,
  output path_t             fe_path,
  input  logic [WW-1:0]     ex_warp,
  output path_t             ex_path,
  // events, one pulse per occurrence
  output logic              ev_push,
  output logic              ev_pop,
  output logic [1:0]        ev_merge,
  output logic              ev_swap,
  output logic              ev_swap_cancel
);

  // ------------------------------------------------------------ stage regs
  typedef struct packed {
    logic          valid;
    logic [WW-1:0] warp;
    logic          start;
    path_t         a, b, c;
  } s2_t;

  typedef struct packed {
    logic          valid;
    logic [WW-1:0] warp;
    logic          start;
    path_t         x, y, z, head;
  } s3_t;

  s2_t s2;
  s3_t s3;

  // ---------------------------------------------------------------- tables
  path_t         hct2_rd_req, hct2_rd_srt;
  logic          hct1_we, hct2_we;
  path_t         hct1_wdata, hct2_wdata;

  logic [WW-1:0] srt_warp;
  logic          swap_en;
  path_t         swap_path;
  path_t         cct_head;
  logic          push_en, pop_en, clr_en;
  logic [NWARPS-1:0] warp_busy;
  logic          hd_rd_en;

  hot_context_table #(.NWARPS(NWARPS)) u_hct1 (
    .clk, .rst,
    .rd0_warp(fe_warp), .rd0_path(fe_path),
    .rd1_warp(ex_warp), .rd1_path(ex_path),
    .wr_en(hct1_we), .wr_warp(s3.warp), .wr_path(hct1_wdata),
    .wr1_en(1'b0), .wr1_warp('0), .wr1_path(PATH_NONE)
  );

  hot_context_table #(.NWARPS(NWARPS)) u_hct2 (
    .clk, .rst,
    .rd0_warp(req_warp), .rd0_path(hct2_rd_req),
    .rd1_warp(srt_warp), .rd1_path(hct2_rd_srt),
    .wr_en(hct2_we), .wr_warp(s3.warp), .wr_path(hct2_wdata),
    .wr1_en(swap_en), .wr1_warp(srt_warp), .wr1_path(swap_path)
  );

  cold_context_table #(.NWARPS(NWARPS), .DEPTH(DEPTH)) u_cct (
    .clk, .rst,
    .hd_rd_en, .hd_warp(s2.warp), .hd_path(cct_head),
    .push_en, .push_warp(s3.warp), .push_path(s3.z),
    .pop_en,  .pop_warp(s3.warp),
    .clr_en,  .clr_warp(s3.warp),
    .warp_busy,
    .srt_warp, .srt_y(hct2_rd_srt),
    .swap_en, .swap_path, .swap_cancel(ev_swap_cancel)
  );

  always_comb begin
    warp_inflight = '0;
    if (s2.valid) warp_inflight[s2.warp] = 1'b1;
    if (s3.valid) warp_inflight[s3.warp] = 1'b1;
  end

  always_comb begin
    warp_busy = warp_inflight;
    if (req_valid) warp_busy[req_warp] = 1'b1;
  end

  // --------------------------------------------------------------- stage 1
  always_ff @(posedge clk) begin
    if (rst) begin
      s2 <= '0;
    end else begin
      s2.valid <= req_valid;
      s2.warp  <= req_warp;
      s2.start <= req_start;
      s2.a     <= req_a;
      s2.b     <= req_start ? PATH_NONE : req_b;
      s2.c     <= req_start ? PATH_NONE : hct2_rd_req;
    end
  end

  // --------------------------------------------------------------- stage 2
  path_t      ccs_x, ccs_y, ccs_z;
  logic [1:0] ccs_merges;

  context_compact_sort u_ccs (
    .a(s2.a), .b(s2.b), .c(s2.c),
    .x(ccs_x), .y(ccs_y), .z(ccs_z), .merges(ccs_merges)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      s3 <= '0;
    end else begin
      s3.valid <= s2.valid;
      s3.warp  <= s2.warp;
      s3.start <= s2.start;
      s3.x     <= ccs_x;
      s3.y     <= ccs_y;
      s3.z     <= ccs_z;
      s3.head  <= hd_rd_en ? cct_head : PATH_NONE;
    end
  end

  // The cold head is read only when it will be popped: when the compact
  // sort leaves a single path. Other cycles leave the port to the sorter.
  assign hd_rd_en = s2.valid && !s2.start && !ccs_y.valid;

  assign ev_merge = s2.valid ? ccs_merges : 2'd0;

  // --------------------------------------------------------------- stage 3
  always_comb begin
    push_en = s3.valid && s3.z.valid;
    pop_en  = s3.valid && !s3.y.valid && s3.head.valid;
    clr_en  = s3.valid && s3.start;

    hct1_we    = s3.valid;
    hct1_wdata = s3.x;

    hct2_we    = s3.valid;
    hct2_wdata = s3.y.valid ? s3.y : s3.head;
  end

  assign rsp_valid = s3.valid;
  assign rsp_warp  = s3.warp;
  assign rsp_path  = s3.x;
  assign ev_push   = push_en;
  assign ev_pop    = pop_en;
  assign ev_swap   = swap_en;

  // A warp has at most one instruction in the tracking pipeline.
  a_one_per_warp: assert property (@(posedge clk) disable iff (rst)
                    req_valid |-> !warp_inflight[req_warp]);
  // The sorter never writes the HCT2 entry that stage 3 writes.
  a_hct2_port:    assert property (@(posedge clk) disable iff (rst)
                    !(swap_en && s3.valid && srt_warp == s3.warp));
  // The active path is valid whenever any path of the warp is.
  a_x_valid:      assert property (@(posedge clk) disable iff (rst)
                    s3.valid |-> (s3.x.valid || (!s3.y.valid && !s3.head.valid)));

endmodule
