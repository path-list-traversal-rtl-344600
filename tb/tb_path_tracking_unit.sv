// tb_path_tracking_unit: self-checking random test of the 3-stage sorted
// path list.
//
// Eight warps run concurrently. Whenever a warp has left the pipeline, the
// test may send it a new pair of paths a, b made from its current active
// path: a move to another PC, a split of its threads between two PCs, a
// change of call depth, or the exit of some or all of its threads. PCs are
// drawn from a small set so that paths meet and merge often.
//
// Checks, for every request:
//   * the response comes exactly two cycles later, for the same warp;
//   * the new active path equals a reference merge-and-sort of a, b and the
//     warp's second hot path at request time (read from the table);
//   * afterwards the warp's paths (both hot tables and its cold entries)
//     are valid, pairwise disjoint, and together hold exactly the warp's
//     live threads; and the fetch and execute read ports return the active
//     path;
//   * a warp whose threads have all exited reports an invalid active path,
//     and is then restarted.
// At the end, after the pipeline drains and the sorter has had time to run,
// each warp's second hot path must come before every cold entry. Each
// mechanism (push, pop, merge, sorting swap, cancelled swap, warp exit)
// must have happened at least once.
module tb_path_tracking_unit;
  import path_pkg::*;

  localparam int unsigned NW = WARPS;
  localparam int unsigned D  = CCT_DEPTH;
  localparam int unsigned WW = $clog2(NW);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic          req_valid, req_start, rsp_valid;
  logic [WW-1:0] req_warp, rsp_warp, fe_warp, ex_warp;
  path_t         req_a, req_b, rsp_path, fe_path, ex_path;
  logic [NW-1:0] warp_inflight;
  logic          ev_push, ev_pop, ev_swap, ev_swap_cancel;
  logic [1:0]    ev_merge;

  path_tracking_unit #(.NWARPS(NW), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  int n_push = 0, n_pop = 0, n_merge = 0, n_swap = 0, n_cancel = 0, n_exit = 0, n_req = 0;
  int max_paths = 0;

  path_t act  [NW];        // last active path reported
  mask_t live [NW];        // threads not yet exited
  bit    started [NW];

  // expected responses, in issue order
  typedef struct { int cyc; int warp; path_t x; } exp_t;
  exp_t expq [$];
  int cycle = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (ev_push) n_push++;
      if (ev_pop) n_pop++;
      n_merge += int'(ev_merge);
      if (ev_swap) n_swap++;
      if (ev_swap_cancel) n_cancel++;
    end
  end

  function automatic mask_t rnd_mask();
    mask_t m = '0;
    for (int i = 0; i < THREADS; i += 32) m = (m << 32) | mask_t'($urandom);
    return m;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- reference
  function automatic path_t ref_min(path_t a, path_t b, path_t c);
    path_t in [3];
    path_t best;
    in[0] = a; in[1] = b; in[2] = c;
    best = PATH_NONE;
    foreach (in[i]) if (path_lt(in[i], best)) best = in[i];
    if (!best.valid) return PATH_NONE;
    best.mask = '0;
    foreach (in[i])
      if (in[i].valid && in[i].pc == best.pc && in[i].depth == best.depth)
        best.mask |= in[i].mask;
    return best;
  endfunction

  function automatic path_t cct_entry(int w, int i);
    path_t p;
    p.valid = 1'b1;
    p.depth = dut.u_cct.mem[w * D + i].depth;
    p.pc    = dut.u_cct.mem[w * D + i].pc;
    p.mask  = dut.u_cct.mem[w * D + i].mask;
    return p;
  endfunction

  task automatic check_list(int w);
    mask_t acc;
    int    n, cnt;
    path_t p;
    acc = '0; n = 0;
    cnt = int'(dut.u_cct.count[w]);
    for (int i = -2; i < cnt; i++) begin
      p = (i == -2) ? dut.u_hct1.tbl[w] : (i == -1) ? dut.u_hct2.tbl[w] : cct_entry(w, i);
      if (!p.valid) begin
        if (i >= 0) begin failures++; $display("warp %0d: invalid cold entry", w); end
        continue;
      end
      n++;
      checks++;
      if (p.mask == '0 || (p.mask & acc) != '0) begin
        failures++;
        if (failures < 10) $display("warp %0d: empty or overlapping path %h", w, p);
      end
      acc |= p.mask;
    end
    checks++;
    if (acc != live[w]) begin
      failures++;
      if (failures < 10) $display("warp %0d: paths hold %h, live threads %h", w, acc, live[w]);
    end
    if (n > max_paths) max_paths = n;
  endtask

  // ---------------------------------------------------------- stimulus
  function automatic pc_t rnd_pc();
    return pc_t'(32'h100 + 4 * $urandom_range(0, 7));
  endfunction

  task automatic make_req(int w, output path_t a, output path_t b);
    path_t x;
    mask_t split;
    int r;
    x = act[w];
    a = x; b = PATH_NONE;
    r = $urandom_range(0, 99);
    if (r < 40) begin
      a.pc = rnd_pc();
    end else if (r < 80) begin
      split = x.mask & rnd_mask();
      a.pc = rnd_pc(); a.mask = split;
      b = x; b.pc = rnd_pc(); b.mask = x.mask & ~split;
    end else if (r < 88) begin
      a.pc = rnd_pc();
      if (x.depth == 0 || ($urandom_range(0, 1) == 0 && x.depth < 3)) a.depth = x.depth + 1;
      else a.depth = x.depth - 1;
    end else if (r < 97) begin
      a.mask = x.mask & rnd_mask();   // the others exit
    end else begin
      a = PATH_NONE;                          // the whole path exits
    end
    if (a.valid && a.mask == '0) a = PATH_NONE;
    if (b.valid && b.mask == '0) b = PATH_NONE;
    live[w] &= ~(x.mask & ~(a.mask | b.mask));
  endtask

  initial begin
    req_valid = 1'b0; req_start = 1'b0; req_warp = '0; req_a = PATH_NONE; req_b = PATH_NONE;
    fe_warp = '0; ex_warp = '0;
    foreach (started[w]) begin started[w] = 0; live[w] = '0; act[w] = PATH_NONE; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 60000; t++) begin
      int w;
      @(negedge clk);
      for (int i = 0; i < NW; i++) if (!warp_inflight[i] && started[i]) check_list(i);
      req_valid = 1'b0; req_start = 1'b0; req_a = PATH_NONE; req_b = PATH_NONE;
      // the fetch port shows the active path of any warp
      fe_warp = WW'($urandom);
      #1;
      if (!warp_inflight[fe_warp]) begin
        checks++;
        if (fe_path !== act[fe_warp]) begin
          failures++;
          if (failures < 10) $display("fetch port warp %0d: %h, expected %h", fe_warp, fe_path, act[fe_warp]);
        end
      end
      w = $urandom_range(0, NW - 1);
      if (!warp_inflight[w] && $urandom_range(0, 3) != 0 && t < 59000) begin
        path_t a, b, c;
        req_valid = 1'b1;
        req_warp  = WW'(w);
        ex_warp   = WW'(w);
        if (!started[w] || !act[w].valid) begin
          a.valid = 1'b1; a.depth = '0; a.pc = 32'h100;
          a.mask  = (t < 20) ? '1 : (rnd_mask() | 1);
          b = PATH_NONE; c = PATH_NONE;
          req_start = 1'b1;
          started[w] = 1;
          live[w] = a.mask;
        end else begin
          #1;
          checks++;
          if (ex_path !== act[w]) begin
            failures++;
            if (failures < 10) $display("execute port warp %0d: %h, expected %h", w, ex_path, act[w]);
          end
          make_req(w, a, b);
          c = dut.u_hct2.tbl[w];
        end
        req_a = a; req_b = b;
        expq.push_back('{cyc: cycle + 2, warp: w, x: ref_min(a, b, c)});
        n_req++;
      end
      @(posedge clk);
      #1;
      if (rsp_valid) begin
        exp_t e;
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("unexpected response");
        end else begin
          e = expq.pop_front();
          if (e.cyc != cycle || e.warp != int'(rsp_warp) || rsp_path !== e.x) begin
            failures++;
            if (failures < 10)
              $display("response warp %0d at %0d: %h, expected warp %0d at %0d: %h",
                       rsp_warp, cycle, rsp_path, e.warp, e.cyc, e.x);
          end
          act[rsp_warp] = rsp_path;
          if (!rsp_path.valid) n_exit++;
        end
      end
    end
    // drain and let the sorter finish
    @(negedge clk); req_valid = 1'b0;
    repeat (4 * NW * (D + 2) + 20) @(posedge clk);
    for (int w = 0; w < NW; w++) begin
      path_t y;
      y = dut.u_hct2.tbl[w];
      for (int i = 0; i < int'(dut.u_cct.count[w]); i++) begin
        checks++;
        if (path_lt(cct_entry(w, i), y)) begin
          failures++;
          $display("warp %0d: cold entry %0d before second hot path after sorting", w, i);
        end
      end
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d responses missing", expq.size()); end
    $display("requests=%0d pushes=%0d pops=%0d merges=%0d swaps=%0d cancelled=%0d exits=%0d max paths/warp=%0d",
             n_req, n_push, n_pop, n_merge, n_swap, n_cancel, n_exit, max_paths);
    checks++;
    if (n_push == 0 || n_pop == 0 || n_merge == 0 || n_swap == 0 || n_cancel == 0 || n_exit == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
