// tb_traversal_example: the if (A && B) C; else D; E; example, traced
// instruction by instruction through the flow tracking subsystem.
//
// One warp runs with threads 0..3 active. Thread 0 goes through blocks
// A B C E, thread 1 through A D E, threads 2 and 3 through A B D E. With
// the deepest-call-then-smallest-PC order the warp must run
//   A {0,1,2,3}, B {0,2,3}, C {0}, D {1,2,3}, E {0,1,2,3}
// so D is run once, by the three threads that reach it by two different
// edges, and all four threads meet again at E. The test checks that exact
// sequence of PCs and masks, the number of merges (two: D's two groups,
// then E), that no path goes to the cold table, and that each resteer
// comes two cycles after its instruction.
module tb_traversal_example;
  import path_pkg::*;

  localparam int unsigned NW = WARPS;
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

  int checks = 0, failures = 0, n_merge = 0, n_push = 0;
  always @(posedge clk) if (!rst) begin
    n_merge += int'(ev_merge);
    if (ev_push) n_push++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program: 0 A, 1 if !A goto 6, 2 B, 3 if !B goto 6, 4 C, 5 goto 7, 6 D, 7 E
  function automatic void instr(int idx, output op_e op, output int tgt, output mask_t cond);
    op = OP_SEQ; tgt = 0; cond = '0;
    unique case (idx)
      1: begin op = OP_BRANCH; tgt = 6; cond = mask_t'(4'b0010); end  // A false: thread 1
      3: begin op = OP_BRANCH; tgt = 6; cond = mask_t'(4'b1100); end  // B false: threads 2, 3
      5: begin op = OP_JUMP;   tgt = 7; end
      7: op = OP_EXIT;
      default: ;
    endcase
  endfunction

  int    exp_pc   [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
  mask_t exp_mask [8] = '{32'hF, 32'hF, 32'hD, 32'hD, 32'h1, 32'h1, 32'hE, 32'hF};

  initial begin
    int n;
    ex_valid = 0; ex_warp = '0; ex_op = OP_SEQ; ex_target = '0; ex_cond = '0;
    start_valid = 0; start_warp = '0; start_pc = '0; start_mask = '0; fe_warp = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    start_valid = 1; start_warp = '0; start_pc = '0; start_mask = mask_t'(4'hF);
    @(negedge clk); start_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (!rsp_valid || rsp_path.pc != 0 || rsp_path.mask != mask_t'(4'hF)) begin
      failures++; $display("start: no resteer to A");
    end
    @(posedge clk);
    n = 0;
    while (n < 8) begin
      op_e op; int tgt; mask_t cond;
      int idx, lat;
      @(negedge clk);
      ex_warp = '0; fe_warp = '0;
      #1;
      idx = int'(ex_path.pc) / 4;
      checks++;
      if (idx != exp_pc[n] || ex_path.mask != exp_mask[n] || fe_path !== ex_path) begin
        failures++;
        $display("step %0d: runs pc %0d mask %h, expected pc %0d mask %h", n, idx, ex_path.mask, exp_pc[n], exp_mask[n]);
      end
      instr(idx, op, tgt, cond);
      ex_valid = 1; ex_op = op; ex_target = pc_t'(4 * tgt); ex_cond = cond;
      @(negedge clk); ex_valid = 0;
      lat = 1;
      while (!rsp_valid && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("step %0d: resteer after %0d cycles", n, lat); end
      n++;
    end
    @(negedge clk);
    checks++;
    if (ex_path.valid) begin failures++; $display("warp still has a path after exit"); end
    checks++;
    if (n_merge != 2 || n_push != 0) begin
      failures++; $display("merges=%0d pushes=%0d, expected 2 and 0", n_merge, n_push);
    end
    $display("merges=%0d pushes=%0d", n_merge, n_push);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
