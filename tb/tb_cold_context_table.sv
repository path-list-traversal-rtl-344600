// tb_cold_context_table: self-checking test of the cold path table and its
// sorting state machine.
//
// The second hot table is modelled here as one path per warp, read through
// srt_warp/srt_y and updated on swap_en.
//
// Phase 1 keeps every warp busy, so the sorter must stay idle, and checks
// push, pop, head read and clear against a reference stack per warp.
// Phase 2 fills every warp with random paths and a random second hot path,
// then lets the sorter run while warp 0 is kept busy with pushes and pops
// (which must cancel pending swaps) and the read port is sometimes taken.
// It then checks, for every other warp, that the second hot path comes
// before or equals every cold entry in priority order and that no path was
// lost or duplicated. It also checks that a full pass over a warp takes no
// more cycles than expected.
module tb_cold_context_table;
  import path_pkg::*;

  localparam int unsigned NW = WARPS;
  localparam int unsigned D  = CCT_DEPTH;
  localparam int unsigned WW = $clog2(NW);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic          hd_rd_en, push_en, pop_en, clr_en, swap_en, swap_cancel;
  logic [WW-1:0] hd_warp, push_warp, pop_warp, clr_warp, srt_warp;
  path_t         hd_path, push_path, srt_y, swap_path;
  logic [NW-1:0] warp_busy;

  path_t y [NW];
  path_t stk [NW][$];
  path_t all [NW][$];   // every path of a warp before sorting
  int checks = 0, failures = 0;
  int n_swap = 0, n_cancel = 0;

  cold_context_table #(.NWARPS(NW), .DEPTH(D)) dut (.*);

  assign srt_y = y[srt_warp];
  always @(posedge clk) begin
    if (swap_en) begin y[srt_warp] <= swap_path; n_swap++; end
    if (swap_cancel) n_cancel++;
  end

  function automatic mask_t rnd_mask();
    mask_t m = '0;
    for (int i = 0; i < THREADS; i += 32) m = (m << 32) | mask_t'($urandom);
    return m;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic path_t rnd_path();
    path_t p;
    p.valid = 1'b1;
    p.depth = depth_t'($urandom_range(0, 2));
    p.pc    = pc_t'(32'h1000 + 4 * $urandom_range(0, 40));
    p.mask  = rnd_mask() | 1;
    return p;
  endfunction

  task automatic idle_inputs();
    hd_rd_en = 1'b0; push_en = 1'b0; pop_en = 1'b0; clr_en = 1'b0;
    hd_warp = '0; push_warp = '0; pop_warp = '0; clr_warp = '0; push_path = PATH_NONE;
  endtask

  task automatic check_head(int w);
    path_t e;
    hd_warp = WW'(w); hd_rd_en = 1'b1;
    #1;
    e = (stk[w].size() == 0) ? PATH_NONE : stk[w][$];
    checks++;
    if (hd_path !== e) begin
      failures++;
      if (failures < 10) $display("warp %0d head %h expected %h", w, hd_path, e);
    end
  endtask

  task automatic pop_one(int w);
    @(negedge clk);
    idle_inputs();
    check_head(w);
    pop_en = 1'b1; pop_warp = WW'(w);
    void'(stk[w].pop_back());
    @(posedge clk);
  endtask

  initial begin
    idle_inputs();
    warp_busy = '1;
    foreach (y[w]) y[w] = PATH_NONE;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // ---------------- phase 1: stack behaviour, sorter held off
    for (int t = 0; t < 6000; t++) begin
      int w, r;
      @(negedge clk);
      idle_inputs();
      w = $urandom_range(0, NW - 1);
      check_head(w);
      r = $urandom_range(0, 99);
      if (r < 3) begin
        clr_en = 1'b1; clr_warp = WW'(w);
        stk[w].delete();
      end else if (r < 55 && stk[w].size() < D) begin
        push_en = 1'b1; push_warp = WW'(w); push_path = rnd_path();
        stk[w].push_back(push_path);
      end else if (stk[w].size() > 0) begin
        pop_en = 1'b1; pop_warp = WW'(w);
        void'(stk[w].pop_back());
      end
      @(posedge clk);
    end
    checks++;
    if (n_swap != 0) begin failures++; $display("sorter swapped while all warps busy"); end

    // ---------------- phase 2: sorting
    for (int w = 0; w < NW; w++) begin
      int n;
      @(negedge clk); idle_inputs();
      clr_en = 1'b1; clr_warp = WW'(w); stk[w].delete();
      @(posedge clk);
      n = (w == 1) ? D : $urandom_range(0, D);
      for (int i = 0; i < n; i++) begin
        @(negedge clk); idle_inputs();
        push_en = 1'b1; push_warp = WW'(w); push_path = rnd_path();
        stk[w].push_back(push_path);
        all[w].push_back(push_path);
        @(posedge clk);
      end
      y[w] = rnd_path();
      if (w == 1) y[w].pc = 32'h2000;   // worst placed: every entry must move up past it
      all[w].push_back(y[w]);
    end
    begin
      @(negedge clk); idle_inputs();
      warp_busy = '0; warp_busy[0] = 1'b1;
      // let it sort, with traffic on warp 0
      for (int t = 0; t < 40 * NW * D; t++) begin
        @(negedge clk); idle_inputs();
        if ($urandom_range(0, 3) == 0) begin
          if (stk[0].size() < D && $urandom_range(0, 1) == 0) begin
            push_en = 1'b1; push_warp = '0; push_path = rnd_path();
            stk[0].push_back(push_path);
          end else if (stk[0].size() > 0) begin
            pop_en = 1'b1; pop_warp = '0;
            void'(stk[0].pop_back());
          end
        end
        if ($urandom_range(0, 7) == 0) begin hd_rd_en = 1'b1; hd_warp = WW'($urandom); end
      end
      @(negedge clk); idle_inputs();
      warp_busy = '1;
      repeat (3) @(posedge clk);
      for (int w = 1; w < NW; w++) begin
        path_t got [$], exp [$];
        path_t hot;
        got.delete();
        hot = y[w];
        got.push_back(hot);
        while (stk[w].size() > 0) begin
          path_t e;
          @(negedge clk); idle_inputs();
          hd_warp = WW'(w); hd_rd_en = 1'b1; #1;
          e = hd_path;
          checks++;
          if (!e.valid || path_lt(e, hot)) begin
            failures++;
            if (failures < 10) $display("warp %0d: cold entry %h before hot %h", w, e, hot);
          end
          got.push_back(e);
          pop_en = 1'b1; pop_warp = WW'(w);
          void'(stk[w].pop_back());
          @(posedge clk);
        end
        exp = all[w];
        got.sort() with (item);
        exp.sort() with (item);
        checks++;
        if (got != exp) begin
          failures++;
          $display("warp %0d: path multiset changed", w);
        end
      end
    end
    checks++;
    if (n_swap == 0 || n_cancel == 0) begin
      failures++;
      $display("coverage hole: swaps=%0d cancels=%0d", n_swap, n_cancel);
    end

    // ---------------- phase 3: timing of one pass on an in-order list
    begin
      int cyc;
      for (int w = 0; w < NW; w++) begin
        @(negedge clk); idle_inputs();
        clr_en = 1'b1; clr_warp = WW'(w); stk[w].delete();
        @(posedge clk);
      end
      // warp 2 holds D entries in order, with y the smallest: no swap needed
      for (int i = 0; i < D; i++) begin
        path_t p;
        @(negedge clk); idle_inputs();
        p = rnd_path(); p.depth = '0; p.pc = 32'h3000 + 32'(4 * i);
        push_en = 1'b1; push_warp = 2'd2; push_path = p;
        @(posedge clk);
      end
      y[2] = rnd_path(); y[2].depth = '0; y[2].pc = 32'h2FFC;
      // warp 3 holds one entry that must move up
      @(negedge clk); idle_inputs();
      push_en = 1'b1; push_warp = 2'd3; push_path = rnd_path();
      push_path.depth = '0; push_path.pc = 32'h100;
      @(posedge clk);
      y[3] = rnd_path(); y[3].depth = '0; y[3].pc = 32'h200;
      @(negedge clk); idle_inputs();
      n_swap = 0;
      warp_busy = '0;
      cyc = 0;
      while (n_swap == 0 && cyc < 10 * NW * D) begin @(posedge clk); cyc++; end
      // at most: one step per empty warp plus D steps for warp 2 plus one
      // compare and one swap for warp 3, from wherever the scan stood
      checks++;
      if (n_swap != 1 || cyc > 2 * (NW + D + 2)) begin
        failures++;
        $display("swap took %0d cycles (swaps=%0d)", cyc, n_swap);
      end
      checks++;
      if (y[3].pc !== 32'h100 || y[2].pc !== 32'h2FFC) begin
        failures++;
        $display("wrong swap result: y2=%h y3=%h", y[2].pc, y[3].pc);
      end
      $display("pass over %0d warps with %0d entries: first swap after %0d cycles", NW, D, cyc);
    end

    $display("swaps=%0d cancels=%0d", n_swap, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
