// End-to-end testbench of sfmu_top at a short line length (256 pixels,
// 16 cell columns per grid) and four rows of cells. The stimulus and
// checks are in sfmu_top_tb_body.svh: template, configuration and shape
// loads under host override, then one frame under CAD data bus control
// with feature and shape errors counted against a spot map.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_sfmu_top;
  localparam int LL   = 256;
  localparam int ROWS = 4;

`include "sfmu_top_tb_body.svh"

  sfmu_top #(.LINE_LEN(LL)) dut (.*);
endmodule
