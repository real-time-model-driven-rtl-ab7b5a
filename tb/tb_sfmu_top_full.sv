// End-to-end testbench of sfmu_top with every parameter at its default
// (32768-pixel lines, 16x16 cells, 8-pixel grid offset). One frame of one
// row of cells (24 lines) is streamed after the same loads as in the short
// test; the stimulus and checks are in sfmu_top_tb_body.svh.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_sfmu_top_full;
  localparam int LL   = 32768;
  localparam int ROWS = 1;

`include "sfmu_top_tb_body.svh"

  sfmu_top dut (.*);
endmodule
