// hot_context_table (HCT): one path per warp, held close to the pipeline.
//
// The path tracking unit uses two instances: the first holds the active
// path of each warp (its PC is where fetch goes, its mask gates execution),
// the second holds the next path in priority order, ready to take over the
// active path as soon as the active one converges, exits or falls behind.
//
// The table is a small memory indexed by warp number with two asynchronous
// read ports and two synchronous write ports (writes visible the next
// cycle): the pipeline's write-back and the cold table sorter's swap, which
// never target the same warp. The first table does not use the second
// write port.
// A synchronous reset clears every entry to the invalid path. Port count,
// read timing and reset are this design's choices; the original description gives only
// the tables' role.
module hot_context_table
  import path_pkg::*;
#(
  parameter int unsigned NWARPS = WARPS,
  localparam int unsigned WW    = (NWARPS > 1) ? $clog2(NWARPS) : 1
)(
  input  logic          clk,
  input  logic          rst,
  // read port 0
  input  logic [WW-1:0] rd0_warp,
  output path_t         rd0_path,
  // read port 1
  input  logic [WW-1:0] rd1_warp,
  output path_t         rd1_path,
  // write port 0 (path tracking pipeline)
  input  logic          wr_en,
  input  logic [WW-1:0] wr_warp,
  input  path_t         wr_path,
  // write port 1 (cold table sorter); port 0 wins if both hit one warp
  input  logic          wr1_en,
  input  logic [WW-1:0] wr1_warp,
  input  path_t         wr1_path
);

  path_t tbl [NWARPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int w = 0; w < NWARPS; w++) tbl[w] <= PATH_NONE;
    end else begin
      if (wr1_en) tbl[wr1_warp] <= wr1_path;
      if (wr_en)  tbl[wr_warp]  <= wr_path;
    end
  end

  assign rd0_path = tbl[rd0_warp];
  assign rd1_path = tbl[rd1_warp];

endmodule
