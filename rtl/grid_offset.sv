// grid_offset: enables for the four shifted 16x16 recognition grids.
//
// All four grids see the same image; they differ only in where their cells
// start. LIE0/PIE0 are the incoming line and picture enables. LIE1 is LIE0
// delayed by OFFSET_PIX pixel clocks and PIE1 is PIE0 delayed by OFFSET_LINES
// lines, so a grid clocked only while its enables are high starts its first
// cell that many pixels to the right or lines lower:
//   Grid0 = LIE0 & PIE0, Grid1 = LIE1 & PIE0, Grid2 = LIE0 & PIE1, Grid3 = LIE1 & PIE1.
// The equations and the 8-pixel / 8-line offsets follow the specification.
// The line delay of PIE is made by sampling PIE at the end of every delayed
// line (falling edge of LIE1) into a shift register, this design's choice.
// PIE1 then rises after the delayed copy of line OFFSET_LINES-1 has ended and
// before line OFFSET_LINES starts, provided the line blanking is longer than
// OFFSET_PIX clocks.
//
// Several lie_g/pie_g bits repeat an input unchanged (grid 0 and 2 use LIE0,
// grids 0 and 1 use PIE0); they are kept per grid so each grid has its own
// pair of enables as in the grid equations.
//
// Interface: lie, pie in; per grid line enable (lie_g), picture enable
// (pie_g) and grid enable (grid_en = lie_g & pie_g).
// Timing: lie_g/pie_g of grid 0 equal the inputs (combinational); the
// delayed enables are registered.
module grid_offset
  import sfmu_pkg::*;
#(
  parameter int unsigned OFFSET_PIX   = 8,
  parameter int unsigned OFFSET_LINES = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 lie,
  input  logic                 pie,
  output logic [NUM_GRIDS-1:0] lie_g,
  output logic [NUM_GRIDS-1:0] pie_g,
  output logic [NUM_GRIDS-1:0] grid_en
);

  logic [OFFSET_PIX-1:0]   lie_sr;
  logic [OFFSET_LINES-1:0] pie_sr;
  logic                    lie_q;
  logic                    lie1, pie1;

  always_ff @(posedge clk) begin
    if (rst) begin
      lie_sr <= '0;
      pie_sr <= '0;
      lie_q  <= 1'b0;
    end else begin
      lie_q  <= lie1;
      lie_sr <= {lie_sr[OFFSET_PIX-2:0], lie};
      if (!pie)
        pie_sr <= '0;                       // frame ended: restart the offset
      else if (lie_q && !lie1)              // end of a delayed line
        pie_sr <= {pie_sr[OFFSET_LINES-2:0], 1'b1};
    end
  end

  assign lie1 = lie_sr[OFFSET_PIX-1];
  assign pie1 = pie_sr[OFFSET_LINES-1];

  assign lie_g   = {lie1, lie,  lie1, lie};
  assign pie_g   = {pie1, pie1, pie,  pie};
  assign grid_en = lie_g & pie_g;

endmodule
