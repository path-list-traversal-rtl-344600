// tb_hot_context_table: self-checking test of the per-warp hot path table.
//
// Writes random paths to random warps through both write ports while
// reading both read ports at random warps, and compares every read with a
// reference array updated one clock after each write (port 0 last, so it
// wins when both ports write one warp). Also checks that reset clears every
// entry.
module tb_hot_context_table;
  import path_pkg::*;

  localparam int unsigned NW = WARPS;
  localparam int unsigned WW = $clog2(NW);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [WW-1:0] rd0_warp, rd1_warp, wr_warp, wr1_warp;
  path_t         rd0_path, rd1_path, wr_path, wr1_path;
  logic          wr_en, wr1_en;
  path_t         ref_tbl [NW];
  int checks = 0, failures = 0;

  hot_context_table #(.NWARPS(NW)) dut (.*);

  function automatic mask_t rnd_mask();
    mask_t m = '0;
    for (int i = 0; i < THREADS; i += 32) m = (m << 32) | mask_t'($urandom);
    return m;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic path_t rnd_path();
    path_t p;
    p.valid = 1'b1;
    p.depth = depth_t'($urandom);
    p.pc    = pc_t'($urandom);
    p.mask  = rnd_mask();
    return p;
  endfunction

  initial begin
    wr_en = 1'b0; wr_warp = '0; wr_path = PATH_NONE; rd0_warp = '0; rd1_warp = '0;
    wr1_en = 1'b0; wr1_warp = '0; wr1_path = PATH_NONE;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    foreach (ref_tbl[w]) ref_tbl[w] = PATH_NONE;
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      rd0_warp = WW'(w); rd1_warp = WW'(NW - 1 - w);
      #1;
      checks++;
      if (rd0_path !== PATH_NONE || rd1_path !== PATH_NONE) begin
        failures++; $display("entry %0d not cleared by reset", w);
      end
    end
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      wr_en    = ($urandom_range(0, 1) == 1);
      wr_warp  = WW'($urandom);
      wr_path  = rnd_path();
      wr1_en   = ($urandom_range(0, 2) == 0);
      wr1_warp = WW'($urandom);
      wr1_path = rnd_path();
      rd0_warp = WW'($urandom);
      rd1_warp = WW'($urandom);
      #1;
      checks++;
      if (rd0_path !== ref_tbl[rd0_warp] || rd1_path !== ref_tbl[rd1_warp]) begin
        failures++;
        if (failures < 10) $display("t=%0d read mismatch warp %0d/%0d", t, rd0_warp, rd1_warp);
      end
      @(posedge clk);
      if (wr1_en) ref_tbl[wr1_warp] = wr1_path;
      if (wr_en)  ref_tbl[wr_warp]  = wr_path;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
