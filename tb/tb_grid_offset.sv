// tb_grid_offset: one frame of 30 lines of 40 pixels with 12-clock line
// blanking. The testbench keeps its own history of LIE and of the line count
// and derives the expected enables: LIE1 = LIE 8 clocks earlier, PIE1 = PIE
// and at least 8 delayed lines finished; Grid0..3 = LIE0.PIE0, LIE1.PIE0, LIE0.PIE1,
// LIE1.PIE1. It also checks where each grid starts: grid 0 at pixel 0 of line
// 0, grid 1 at pixel 8 of line 0, grid 2 at pixel 0 of line 8, grid 3 at
// pixel 8 of line 8.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_grid_offset;
  import sfmu_pkg::*;
  logic clk = 0, rst = 1, lie = 0, pie = 0;
  logic [3:0] lie_g, pie_g, grid_en;
  int checks = 0, failures = 0;
  logic lie_hist [$];
  int lines_done = 0, line = -1, pix = 0;
  int first_line [4], first_pix [4];

  grid_offset #(.OFFSET_PIX(8), .OFFSET_LINES(8)) dut (.clk, .rst, .lie, .pie, .lie_g, .pie_g, .grid_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 4; g++) begin first_line[g] = -1; first_pix[g] = -1; end
    for (int i = 0; i < 8; i++) lie_hist.push_back(1'b0);
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk); pie = 1;
    for (int l = 0; l < 30; l++) begin
      for (int c = 0; c < 40 + 12; c++) begin
        logic exp_lie1, exp_pie1;
        logic [3:0] exp;
        lie = (c < 40);
        line = l; pix = c;
        exp_lie1 = lie_hist[0];
        exp_pie1 = (lines_done >= 8);
        exp = {exp_lie1 & exp_pie1, lie & exp_pie1, exp_lie1 & pie, lie & pie};
        #1;
        checks++;
        if (grid_en != exp) begin
          failures++;
          if (failures < 10) $display("line %0d pix %0d: grid_en %b expected %b", l, c, grid_en, exp);
        end
        for (int g = 0; g < 4; g++)
          if (grid_en[g] && first_line[g] < 0) begin first_line[g] = l; first_pix[g] = c; end
        @(posedge clk);
        void'(lie_hist.pop_front());
        lie_hist.push_back(lie);
        if (c == 48) lines_done++;   // LIE1 fell at the previous edge
        @(negedge clk);
      end
    end
    checks += 4;
    if (first_line[0] != 0 || first_pix[0] != 0) failures++;
    if (first_line[1] != 0 || first_pix[1] != 8) failures++;
    if (first_line[2] != 8 || first_pix[2] != 0) failures++;
    if (first_line[3] != 8 || first_pix[3] != 8) failures++;
    for (int g = 0; g < 4; g++) $display("grid %0d starts at line %0d pixel %0d", g, first_line[g], first_pix[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
