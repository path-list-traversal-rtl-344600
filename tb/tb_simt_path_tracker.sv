// tb_simt_path_tracker: end-to-end test of the flow tracking subsystem at
// its default size (8 warps of 32 threads).
//
// The test plays the part of the rest of the core. It holds a small program
// in its own toy instruction set (the instruction classes of the
// branch/memory unit), starts every warp at PC 0 (warps 0 to 5 with 2, 4,
// 8, 16, 32 and 64 threads, the others with all their threads), and
// each cycle issues the instruction at the active PC of one warp that is
// not in the tracking pipeline. It evaluates branch conditions, indirect
// and return targets and memory service per thread, from per-thread state
// (thread id, loop counter, link register) and a random memory service
// pattern. The program has an if (A && B) C; else D; E; nest, a memory
// access with replays, a call to a function with an internal branch, a
// data-dependent backward loop and an indirect jump.
//
// The same program is also run thread by thread, with no SIMT grouping at
// all. Checks:
//   * every thread completes exactly the same sequence of instructions in
//     both runs (SIMT tracking changes the schedule, never the result);
//   * each response arrives two cycles after its instruction, and the
//     execute and fetch read ports show the active path;
//   * threads stay grouped: on average at least four threads per issued
//     instruction (the count of warps whose threads all reached the
//     exit together is printed);
//   * each mechanism occurred: divergence with a push to the cold table, a
//     pop, merges, a sorting swap, a cancelled swap, memory and indirect
//     replays, call and return, warp start and warp completion.
// The number of warp instructions issued is printed next to the number of
// per-thread instructions, as a measure of how well threads stay grouped.
module tb_simt_path_tracker;
  import path_pkg::*;

  localparam int unsigned NW = WARPS;
  localparam int unsigned NT = THREADS;
  localparam int unsigned WW = $clog2(NW);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic          ex_valid, start_valid, start_ready, rsp_valid;
  logic [WW-1:0] ex_warp, start_warp, fe_warp, rsp_warp;
  op_e           ex_op;
  pc_t           ex_target, start_pc;
  mask_t         ex_cond, start_mask;
  path_t         ex_path, fe_path, rsp_path;
  logic [NW-1:0] warp_inflight;
  logic          ev_push, ev_pop, ev_swap, ev_swap_cancel;
  logic [1:0]    ev_merge;

  simt_path_tracker dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ program
  // condition kinds
  typedef enum int {C_NONE, C_NOT_A, C_NOT_B, C_LOOP, C_F, C_P, C_Q, C_R, C_MEM, C_IND, C_RET} cond_e;
  typedef struct { op_e op; int tgt; cond_e c; } instr_t;

  localparam int PLEN = 32;
  instr_t prog [PLEN];

  function automatic mask_t rnd_mask();
    mask_t m = '0;
    for (int i = 0; i < THREADS; i += 32) m = (m << 32) | mask_t'($urandom);
    return m;
  endfunction

  initial begin
    foreach (prog[i]) prog[i] = '{OP_SEQ, 0, C_NONE};
    prog[0]  = '{OP_SEQ,      0,  C_NONE};   // A
    prog[1]  = '{OP_BRANCH,   5,  C_NOT_A};  // if !A goto D
    prog[2]  = '{OP_BRANCH,   5,  C_NOT_B};  // if !B goto D
    prog[3]  = '{OP_SEQ,      0,  C_NONE};   // C
    prog[4]  = '{OP_JUMP,     6,  C_NONE};   //   goto E
    prog[5]  = '{OP_SEQ,      0,  C_NONE};   // D
    prog[6]  = '{OP_MEM,      0,  C_MEM};    // E: memory access, may replay
    prog[7]  = '{OP_CALL,     24, C_NONE};   // call f
    prog[8]  = '{OP_BRANCH,   0,  C_LOOP};   // loop back while iter < limit
    prog[9]  = '{OP_BRANCH,   12, C_P};      // three-way split that leaves
    prog[10] = '{OP_BRANCH,   14, C_Q};      // the cold list out of order
    prog[11] = '{OP_BRANCH,   16, C_R};
    prog[12] = '{OP_SEQ,      0,  C_NONE};
    prog[13] = '{OP_JUMP,     17, C_NONE};
    prog[14] = '{OP_SEQ,      0,  C_NONE};
    prog[15] = '{OP_JUMP,     17, C_NONE};
    prog[16] = '{OP_SEQ,      0,  C_NONE};
    prog[17] = '{OP_INDIRECT, 0,  C_IND};    // jump to 19 or 20
    prog[18] = '{OP_SEQ,      0,  C_NONE};
    prog[19] = '{OP_JUMP,     21, C_NONE};
    prog[20] = '{OP_SEQ,      0,  C_NONE};
    prog[21] = '{OP_EXIT,     0,  C_NONE};
    prog[24] = '{OP_SEQ,      0,  C_NONE};   // f:
    prog[25] = '{OP_BRANCH,   27, C_F};
    prog[26] = '{OP_SEQ,      0,  C_NONE};
    prog[27] = '{OP_RET,      0,  C_RET};
  end

  localparam int EXIT_IDX = 21;

  // per-thread architectural state
  typedef struct { int iter; int link; } tstate_t;

  function automatic int gid(int w, int t); return w * NT + t; endfunction

  // Warp widths: warps 0..5 run 2, 4, 8, 16, 32 and 64 threads (the warp
  // sizes of the reference configurations, on the low mask bits), the
  // others all NT threads.
  function automatic mask_t warp_mask(int w);
    int n;
    n = (w < 6) ? (2 << w) : int'(NT);
    if (n >= int'(NT)) return '1;
    return (mask_t'(1) << n) - 1;
  endfunction

  function automatic bit cond_of(cond_e c, int g, tstate_t s);
    unique case (c)
      C_NOT_A: return ((g + s.iter) % 3) == 0;
      C_NOT_B: return ((g * 7 + s.iter) % 4) >= 2;
      C_LOOP:  return s.iter < (g % 4);
      C_F:     return ((g + 2 * s.iter) % 5) < 2;
      C_P:     return (g % 3) == 0;
      C_Q:     return (g % 5) < 2;
      C_R:     return ((g / 3) % 2) == 0;
      default: return 1'b0;
    endcase
  endfunction

  function automatic int ind_target(int g, tstate_t s);
    return (((g / 2) + s.iter) % 2 == 0) ? 19 : 20;
  endfunction

  // Effect of instruction i on one thread that completes it; returns the
  // next instruction index (-1 on exit).
  function automatic int step(instr_t in, int i, int g, ref tstate_t s);
    int nxt;
    nxt = i + 1;
    unique case (in.op)
      OP_SEQ, OP_MEM: ;
      OP_BRANCH:   if (cond_of(in.c, g, s)) nxt = in.tgt;
      OP_JUMP:     nxt = in.tgt;
      OP_CALL:     begin s.link = i + 1; nxt = in.tgt; end
      OP_INDIRECT: nxt = ind_target(g, s);
      OP_RET:      nxt = s.link;
      OP_EXIT:     nxt = -1;
    endcase
    if (in.op == OP_BRANCH && in.c == C_LOOP) s.iter++;
    return nxt;
  endfunction

  // reference: each thread alone
  int ref_trace [NW*NT][$];
  int sim_trace [NW*NT][$];
  tstate_t st [NW*NT];

  task automatic run_reference();
    for (int g = 0; g < NW * NT; g++) begin
      tstate_t s;
      int i, guard;
      s = '{iter: 0, link: 0};
      i = 0; guard = 0;
      ref_trace[g].delete();
      if (!warp_mask(g / int'(NT))[g % int'(NT)]) i = -1;   // thread not started
      while (i >= 0 && guard < 1000) begin
        ref_trace[g].push_back(i);
        i = step(prog[i], i, g, s);
        guard++;
      end
    end
  endtask

  // ------------------------------------------------------------ counters
  int n_push = 0, n_pop = 0, n_merge = 0, n_swap = 0, n_cancel = 0;
  int n_mem_replay = 0, n_ind_replay = 0, n_call = 0, n_ret = 0, n_start = 0, n_done = 0;
  int n_diverge = 0, n_issue = 0, n_thread_instr = 0;
  int exit_count [NW];
  int n_exit_joined = 0;

  always @(posedge clk) if (!rst) begin
    if (ev_push) n_push++;
    if (ev_pop) n_pop++;
    n_merge += int'(ev_merge);
    if (ev_swap) n_swap++;
    if (ev_swap_cancel) n_cancel++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ SIMT run
  // Cycles between a warp's resteer and its next instruction reaching the
  // branch/memory unit: the rest of a 10-stage pipeline around the 3
  // tracking stages.
  localparam int REFILL = 7;

  path_t act [NW];
  int    ready_at [NW];
  bit    started [NW], done [NW];
  typedef struct { int cyc; int warp; } pend_t;
  pend_t pend [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic bit all_done();
    foreach (done[w]) if (!done[w]) return 0;
    return 1;
  endfunction

  initial begin
    int rr;
    ex_valid = 0; ex_warp = '0; ex_op = OP_SEQ; ex_target = '0; ex_cond = '0;
    start_valid = 0; start_warp = '0; start_pc = '0; start_mask = '0; fe_warp = '0;
    foreach (act[w]) begin act[w] = PATH_NONE; ready_at[w] = 0; started[w] = 0; done[w] = 0; exit_count[w] = 0; end
    foreach (st[g]) st[g] = '{iter: 0, link: 0};
    run_reference();
    rr = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (!all_done()) begin
      int w;
      @(negedge clk);
      ex_valid = 0; start_valid = 0;
      // pick a ready warp, round robin
      w = -1;
      // warps are started first, one per cycle
      for (int k = 0; k < NW; k++) begin
        if (!started[k]) begin w = -2; break; end
      end
      if (w == -1) for (int k = 0; k < NW; k++) begin
        int c;
        c = (rr + k) % NW;
        if (started[c] && !done[c] && act[c].valid && !warp_inflight[c] && cycle >= ready_at[c]) begin w = c; break; end
      end
      if (w >= 0) begin
        instr_t in;
        int idx, first, tgt;
        mask_t m, cm;
        rr = w + 1;
        ex_warp = WW'(w);
        fe_warp = WW'(w);
        #1;
        checks++;
        if (ex_path !== act[w] || fe_path !== act[w]) begin
          failures++;
          if (failures < 10) $display("warp %0d: active path %h / %h, expected %h", w, ex_path, fe_path, act[w]);
        end
        idx = int'(act[w].pc) / 4;
        in  = prog[idx];
        m   = act[w].mask;
        cm  = '0;
        tgt = 0;
        first = -1;
        for (int t = 0; t < NT; t++) if (m[t] && first < 0) first = t;
        unique case (in.op)
          OP_BRANCH: begin
            for (int t = 0; t < NT; t++) if (m[t]) cm[t] = cond_of(in.c, gid(w, t), st[gid(w, t)]);
            tgt = in.tgt;
            if (cm != '0 && cm != m) n_diverge++;
          end
          OP_JUMP, OP_CALL: tgt = in.tgt;
          OP_MEM: begin
            cm = m & (rnd_mask() | rnd_mask());   // about 3 in 4 accesses served
            if (cm != m) n_mem_replay++;
          end
          OP_INDIRECT: begin
            tgt = ind_target(gid(w, first), st[gid(w, first)]);
            for (int t = 0; t < NT; t++)
              if (m[t] && ind_target(gid(w, t), st[gid(w, t)]) == tgt) cm[t] = 1'b1;
            if (cm != m) n_ind_replay++;
          end
          OP_RET: begin
            tgt = st[gid(w, first)].link;
            for (int t = 0; t < NT; t++)
              if (m[t] && st[gid(w, t)].link == tgt) cm[t] = 1'b1;
            n_ret++;
          end
          default: ;
        endcase
        if (in.op == OP_CALL) n_call++;
        if (idx == EXIT_IDX) begin
          exit_count[w]++;
          if (m == warp_mask(w)) n_exit_joined++;
        end
        // threads that complete the instruction advance their own state
        for (int t = 0; t < NT; t++) begin
          bit completes;
          completes = m[t] && !((in.op inside {OP_MEM, OP_INDIRECT, OP_RET}) && !cm[t]);
          if (completes) begin
            void'(step(in, idx, gid(w, t), st[gid(w, t)]));
            sim_trace[gid(w, t)].push_back(idx);
            n_thread_instr++;
          end
        end
        ex_valid  = 1;
        ex_op     = in.op;
        ex_target = pc_t'(4 * tgt);
        ex_cond   = cm;
        pend.push_back('{cyc: cycle + 2, warp: w});
        n_issue++;
      end else if (w == -2) begin
        for (int c = 0; c < NW; c++) if (!started[c]) begin
          start_valid = 1; start_warp = WW'(c); start_pc = '0; start_mask = warp_mask(c);
          #1;
          if (start_ready) begin
            started[c] = 1;
            n_start++;
            pend.push_back('{cyc: cycle + 2, warp: c});
          end
          break;
        end
      end
      @(posedge clk);
      #1;
      if (rsp_valid) begin
        pend_t p;
        checks++;
        if (pend.size() == 0) begin failures++; $display("unexpected response"); end
        else begin
          p = pend.pop_front();
          if (p.cyc != cycle || p.warp != int'(rsp_warp)) begin
            failures++;
            $display("response for warp %0d at %0d, expected warp %0d at %0d", rsp_warp, cycle, p.warp, p.cyc);
          end
        end
        act[rsp_warp] = rsp_path;
        ready_at[rsp_warp] = cycle + REFILL;
        if (!rsp_path.valid) begin done[rsp_warp] = 1; n_done++; end
      end
    end
    @(negedge clk); ex_valid = 0; start_valid = 0;

    // compare traces
    for (int g = 0; g < NW * NT; g++) begin
      checks++;
      if (sim_trace[g] != ref_trace[g]) begin
        failures++;
        if (failures < 10) $display("thread %0d: trace differs (%0d vs %0d instructions)",
                                    g, sim_trace[g].size(), ref_trace[g].size());
      end
    end
    // Grouping: with all threads of a warp kept apart, every per-thread
    // instruction would be one issue. Require at least four threads per
    // issue on average.
    checks++;
    if (n_thread_instr < n_issue * 4) begin
      failures++;
      $display("threads stay apart: %0d issues for %0d thread instructions", n_issue, n_thread_instr);
    end
    $display("warp instructions=%0d thread instructions=%0d (%0.1f threads per issue)",
             n_issue, n_thread_instr, real'(n_thread_instr) / real'(n_issue));
    $display("divergent branches=%0d pushes=%0d pops=%0d merges=%0d swaps=%0d cancelled swaps=%0d",
             n_diverge, n_push, n_pop, n_merge, n_swap, n_cancel);
    $display("warps exiting in one group=%0d of %0d", n_exit_joined, NW);
    $display("memory replays=%0d indirect replays=%0d calls=%0d returns=%0d starts=%0d completions=%0d",
             n_mem_replay, n_ind_replay, n_call, n_ret, n_start, n_done);
    begin
      int ev [string];
      ev["divergence"] = n_diverge; ev["push"] = n_push; ev["pop"] = n_pop; ev["merge"] = n_merge;
      ev["swap"] = n_swap; ev["cancelled swap"] = n_cancel; ev["memory replay"] = n_mem_replay;
      ev["indirect replay"] = n_ind_replay; ev["call"] = n_call; ev["return"] = n_ret;
      ev["start"] = n_start; ev["completion"] = n_done;
      foreach (ev[k]) begin
        checks++;
        if (ev[k] == 0) begin failures++; $display("mechanism never happened: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
