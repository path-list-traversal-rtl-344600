// tb_branch_mem_unit: self-checking test of the path-splitting unit.
//
// For every instruction class, drives random active paths, targets and
// condition masks and compares a and b with expected paths built here from
// the class's rule (which threads go where, at which PC and call depth,
// and which resulting paths are empty and so invalid).
module tb_branch_mem_unit;
  import path_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  path_t active, a, b;
  op_e   op;
  pc_t   target;
  mask_t cond;
  int checks = 0, failures = 0;
  int n_split = 0;

  branch_mem_unit dut (.*);

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

  function automatic path_t mk(pc_t pc, depth_t d, mask_t m);
    path_t p;
    if (m == '0) return PATH_NONE;
    p.valid = 1'b1; p.pc = pc; p.depth = d; p.mask = m;
    return p;
  endfunction

  initial begin
    for (int t = 0; t < 16000; t++) begin
      path_t ea, eb;
      mask_t mi, mo;
      pc_t   pn;
      op = op_e'(t % 8);
      active.valid = ($urandom_range(0, 15) != 0);
      active.depth = depth_t'($urandom_range(1, 14));
      active.pc    = pc_t'({$urandom} & 32'hFFFF_FFFC);
      active.mask  = rnd_mask();
      if ($urandom_range(0, 3) == 0) active.mask = '1;
      if (!active.valid) active = PATH_NONE;
      target = pc_t'({$urandom} & 32'hFFFF_FFFC);
      case ($urandom_range(0, 3))
        0: cond = '0;
        1: cond = '1;
        default: cond = rnd_mask();
      endcase
      mi = active.mask & cond;
      mo = active.mask & ~cond;
      pn = active.pc + 4;
      ea = PATH_NONE; eb = PATH_NONE;
      if (active.valid) begin
        unique case (op)
          OP_SEQ:      ea = mk(pn, active.depth, active.mask);
          OP_BRANCH:   begin ea = mk(target, active.depth, mi); eb = mk(pn, active.depth, mo); end
          OP_JUMP:     ea = mk(target, active.depth, active.mask);
          OP_CALL:     ea = mk(target, active.depth + 1, active.mask);
          OP_INDIRECT: begin ea = mk(target, active.depth, mi); eb = mk(active.pc, active.depth, mo); end
          OP_RET:      begin ea = mk(target, active.depth - 1, mi); eb = mk(active.pc, active.depth, mo); end
          OP_MEM:      begin ea = mk(pn, active.depth, mi); eb = mk(active.pc, active.depth, mo); end
          OP_EXIT:     ;
        endcase
      end
      @(posedge clk);
      checks++;
      if (a !== ea || b !== eb) begin
        failures++;
        if (failures < 10) $display("op %s active=%h cond=%h: got a=%h b=%h exp a=%h b=%h",
                                    op.name(), active, cond, a, b, ea, eb);
      end
      if (a.valid && b.valid) n_split++;
    end
    if (n_split == 0) begin failures++; $display("no divergent split seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
