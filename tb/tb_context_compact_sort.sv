// tb_context_compact_sort: self-checking test of the compact-sort unit.
//
// Drives random triples of paths drawn from a small set of PCs and call
// depths (so that equal keys, and therefore merges, are frequent) plus
// directed cases, and compares x, y, z and the merge count with a reference
// that merges by key and selection-sorts the survivors. Masks of a and b are
// disjoint with c, as in the core. The unit is combinational; the clock only
// paces the test and the watchdog.
module tb_context_compact_sort;
  import path_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  path_t a, b, c, x, y, z;
  logic [1:0] merges;
  int checks = 0, failures = 0;
  int n_merge = 0, n_three = 0;

  context_compact_sort dut (.*);

  function automatic mask_t rnd_mask();
    mask_t m = '0;
    for (int i = 0; i < THREADS; i += 32) m = (m << 32) | mask_t'($urandom);
    return m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic path_t rnd_path(mask_t allowed);
    path_t p;
    p.valid = ($urandom_range(0, 5) != 0);
    p.depth = depth_t'($urandom_range(0, 2));
    p.pc    = pc_t'(32'h100 + 4 * $urandom_range(0, 3));
    p.mask  = rnd_mask() & allowed;
    if (p.mask == '0) p.mask = allowed & ~(allowed - 1);  // lowest allowed bit
    if (!p.valid) p = PATH_NONE;
    return p;
  endfunction

  task automatic check_one();
    path_t in [3];
    path_t rep [3];
    int    nrep, nmerged;
    path_t exp [3];
    in[0] = a; in[1] = b; in[2] = c;
    nrep = 0; nmerged = 0;
    foreach (in[i]) begin
      if (in[i].valid) begin
        int j;
        for (j = 0; j < nrep; j++)
          if (rep[j].pc == in[i].pc && rep[j].depth == in[i].depth) break;
        if (j < nrep) begin
          rep[j].mask |= in[i].mask;
          nmerged++;
        end else begin
          rep[nrep] = in[i];
          nrep++;
        end
      end
    end
    // selection sort: deeper first, then lower PC
    for (int i = 0; i < 3; i++) begin
      int best = -1;
      for (int j = 0; j < nrep; j++) begin
        if (rep[j].valid) begin
          if (best < 0) best = j;
          else if (rep[j].depth > rep[best].depth ||
                   (rep[j].depth == rep[best].depth && rep[j].pc < rep[best].pc)) best = j;
        end
      end
      if (best < 0) exp[i] = PATH_NONE;
      else begin
        exp[i] = rep[best];
        rep[best].valid = 1'b0;
      end
    end
    #1;
    checks++;
    if (x !== exp[0] || y !== exp[1] || z !== exp[2] || merges !== 2'(nmerged)) begin
      failures++;
      if (failures < 10)
        $display("mismatch a=%h b=%h c=%h: got x=%h y=%h z=%h m=%0d exp x=%h y=%h z=%h m=%0d",
                 a, b, c, x, y, z, merges, exp[0], exp[1], exp[2], nmerged);
    end
    if (nmerged > 0) n_merge++;
    if (nrep == 3) n_three++;
  endtask

  initial begin
    // directed: a=C at 0x110, b=D at 0x120, c=E at 0x130 -> sorted, no merge
    a = '{valid:1'b1, depth:'0, pc:32'h110, mask:32'h1};
    b = '{valid:1'b1, depth:'0, pc:32'h120, mask:32'h2};
    c = '{valid:1'b1, depth:'0, pc:32'h130, mask:32'hC};
    @(posedge clk); check_one();
    // reversed order
    a = '{valid:1'b1, depth:'0, pc:32'h130, mask:32'h1};
    c = '{valid:1'b1, depth:'0, pc:32'h110, mask:32'hC};
    @(posedge clk); check_one();
    // convergence: a meets c
    a = '{valid:1'b1, depth:'0, pc:32'h130, mask:32'h3};
    b = PATH_NONE;
    c = '{valid:1'b1, depth:'0, pc:32'h130, mask:32'hC};
    @(posedge clk); check_one();
    // call depth beats PC
    a = '{valid:1'b1, depth:4'd1, pc:32'h900, mask:32'h1};
    b = '{valid:1'b1, depth:4'd0, pc:32'h100, mask:32'h2};
    c = PATH_NONE;
    @(posedge clk); check_one();
    // all invalid
    a = PATH_NONE; b = PATH_NONE; c = PATH_NONE;
    @(posedge clk); check_one();
    for (int t = 0; t < 20000; t++) begin
      mask_t split;
      split = rnd_mask();
      c = rnd_path(~split);
      a = rnd_path(split & mask_t'({(THREADS/2){2'b01}}));
      b = rnd_path(split & mask_t'({(THREADS/2){2'b10}}));
      @(posedge clk); check_one();
    end
    if (n_merge == 0 || n_three == 0) begin
      failures++;
      $display("coverage hole: merges=%0d three-way=%0d", n_merge, n_three);
    end
    $display("merge cases=%0d three-path cases=%0d", n_merge, n_three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
