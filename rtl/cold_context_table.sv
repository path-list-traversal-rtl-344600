// cold_context_table (CCT): the per-warp list of paths that are neither the
// active path nor the next one, with its insertion, extraction and
// background sorting logic.
//
// Storage is one narrow memory of NWARPS x DEPTH path entries (PC, call
// depth, mask), with one read port and one write port, plus a per-warp entry
// count. DEPTH defaults to THREADS-2, the worst case of one thread per path
// once the two hot tables hold two paths. The list of each warp is accessed
// at its head only, like a stack: a push writes entry count and increments
// count, a pop decrements count; the head entry (index count-1) is read
// combinationally through hd_warp/hd_path so that the pipeline can take it
// one or two cycles before it pops it.
//
// Sorting: whenever the memory is idle, a state machine, time-multiplexed
// between warps, walks the entries of one warp at a time and compares each
// in turn with the path y held in the second hot table for that warp. When
// an entry comes before y in priority order the two are swapped on the next
// cycle (entry written to the second hot table, y written into the entry).
// After one full pass the second hot table holds the highest-priority path
// of the warp's cold paths. A swap is cancelled when, in its cycle, an
// insertion, an extraction or a clear happens, or when the warp has an
// instruction in the tracking pipeline; the comparison is then retried. Cancelling on insertion and
// extraction follows the original description; the other conditions, the stack
// organisation and the scan order are this design's choices.
//
// Timing: push, pop and clear take effect at the next clock edge. A scan
// step takes one cycle, a swap one more.
module cold_context_table
  import path_pkg::*;
#(
  parameter int unsigned NWARPS = WARPS,
  parameter int unsigned DEPTH  = CCT_DEPTH,
  localparam int unsigned WW    = (NWARPS > 1) ? $clog2(NWARPS) : 1,
  localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
)(
  input  logic              clk,
  input  logic              rst,
  // head read (uses the read port when hd_rd_en is set)
  input  logic              hd_rd_en,
  input  logic [WW-1:0]     hd_warp,
  output path_t             hd_path,     // invalid when the list is empty
  // insertion, extraction, clear
  input  logic              push_en,
  input  logic [WW-1:0]     push_warp,
  input  path_t             push_path,
  input  logic              pop_en,
  input  logic [WW-1:0]     pop_warp,
  input  logic              clr_en,
  input  logic [WW-1:0]     clr_warp,
  // sorting against the second hot table
  input  logic [NWARPS-1:0] warp_busy,   // warp has an instruction in flight
  output logic [WW-1:0]     srt_warp,    // warp whose second hot path is needed
  input  path_t             srt_y,       // second hot path of srt_warp
  output logic              swap_en,     // write swap_path to HCT2[srt_warp]
  output path_t             swap_path,
  output logic              swap_cancel  // a pending swap was cancelled
);

  typedef struct packed {
    depth_t depth;
    pc_t    pc;
    mask_t  mask;
  } entry_t;

  entry_t        mem   [NWARPS*DEPTH];
  logic [CW-1:0] count [NWARPS];

  function automatic int unsigned addr(logic [WW-1:0] w, int unsigned i);
    return int'(w) * DEPTH + i;
  endfunction

  function automatic path_t to_path(entry_t e);
    path_t p;
    p.valid = 1'b1;
    p.depth = e.depth;
    p.pc    = e.pc;
    p.mask  = e.mask;
    return p;
  endfunction

  function automatic entry_t to_entry(path_t p);
    entry_t e;
    e.depth = p.depth;
    e.pc    = p.pc;
    e.mask  = p.mask;
    return e;
  endfunction

  // ---------------------------------------------------------------- sorter
  typedef enum logic {S_SCAN, S_SWAP} srt_state_e;

  srt_state_e    state;
  logic [WW-1:0] sw;          // warp being sorted
  logic [IW-1:0] k;           // entry being compared
  path_t         sv_entry;    // entry that must move up
  path_t         sv_y;        // path that must move down

  // Read port: the pipeline's head read has priority over the sorter.
  logic [IW-1:0] rd_idx;
  logic [WW-1:0] rd_warp;
  entry_t        rd_data;

  always_comb begin
    rd_warp = hd_rd_en ? hd_warp : sw;
    rd_idx  = hd_rd_en ? IW'(count[hd_warp] - 1'b1) : k;
    rd_data = mem[addr(rd_warp, int'(rd_idx))];
  end

  always_comb begin
    hd_path = to_path(mem[addr(hd_warp, int'(IW'(count[hd_warp] - 1'b1)))]);
    if (count[hd_warp] == '0) hd_path = PATH_NONE;
  end

  logic in_range, can_scan, out_of_order, mem_busy, do_swap;

  always_comb begin
    in_range     = (CW'(k) < count[sw]);
    can_scan     = (state == S_SCAN) && !hd_rd_en && !warp_busy[sw] && in_range && srt_y.valid;
    out_of_order = path_lt(to_path(rd_data), srt_y);
    mem_busy     = push_en || pop_en || clr_en;
    do_swap      = (state == S_SWAP) && !mem_busy && !warp_busy[sw];
  end

  assign srt_warp    = sw;
  assign swap_en     = do_swap;
  assign swap_path   = sv_entry;
  assign swap_cancel = (state == S_SWAP) && !do_swap;

  // Next warp to sort: the first one after sw, in rotating order, that has
  // cold entries and no instruction in flight (sw + 1 if there is none).
  // Searching instead of stepping keeps the scan from locking onto the
  // warps that are busy when the pipeline issues warps in rotation too.
  logic [WW-1:0] nxt_warp;

  always_comb begin
    nxt_warp = (int'(sw) == NWARPS - 1) ? '0 : sw + 1'b1;
    for (int d = NWARPS - 1; d >= 1; d--) begin
      int unsigned cand;
      cand = (int'(sw) + d) % NWARPS;
      if (count[cand] != '0 && !warp_busy[cand]) nxt_warp = WW'(cand);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_SCAN;
      sw       <= '0;
      k        <= '0;
      sv_entry <= PATH_NONE;
      sv_y     <= PATH_NONE;
    end else begin
      unique case (state)
        S_SCAN: begin
          if (can_scan) begin
            if (out_of_order) begin
              sv_entry <= to_path(rd_data);
              sv_y     <= srt_y;
              state    <= S_SWAP;
            end else if (CW'(k) + 1'b1 >= count[sw]) begin
              k  <= '0;
              sw <= nxt_warp;
            end else begin
              k <= k + 1'b1;
            end
          end else if (!hd_rd_en || !in_range || warp_busy[sw]) begin
            // nothing to do for this warp now: move on
            k  <= '0;
            sw <= nxt_warp;
          end
        end
        S_SWAP: begin
          // on cancel, return to S_SCAN and compare the same entry again
          state <= S_SCAN;
          if (do_swap) begin
            if (CW'(k) + 1'b1 >= count[sw]) begin
              k  <= '0;
              sw <= nxt_warp;
            end else begin
              k <= k + 1'b1;
            end
          end
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  // ------------------------------------------------- memory and counters
  always_ff @(posedge clk) begin
    if (push_en) begin
      mem[addr(push_warp, int'(count[push_warp]))] <= to_entry(push_path);
    end else if (do_swap) begin
      mem[addr(sw, int'(k))] <= to_entry(sv_y);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int w = 0; w < NWARPS; w++) count[w] <= '0;
    end else begin
      if (clr_en)  count[clr_warp] <= '0;
      if (pop_en)  count[pop_warp] <= count[pop_warp] - 1'b1;
      if (push_en) count[push_warp] <= count[push_warp] + 1'b1;
    end
  end

  // Handshake rules.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst)
                    push_en |-> (count[push_warp] < CW'(DEPTH)));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
                    pop_en |-> (count[pop_warp] != '0));
  a_one_op:       assert property (@(posedge clk) disable iff (rst)
                    !(push_en && pop_en) && !(clr_en && (push_en || pop_en)));

endmodule
