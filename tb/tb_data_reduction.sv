// tb_data_reduction: a 64-pixel line, 4x4-pixel cells, 14 lines (3 complete
// cell rows and a partial one) with random recognitions, denser in some cells
// and absent in others. The testbench works out for every cell the OR of its
// recognitions and expects, at the last pixel of each cell, exactly one
// result with the right column, row and bit, one clock later. Three frames
// are run so that cells are reused with different contents.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_data_reduction;
  localparam int unsigned LEN = 64, CELL = 4, COLS = LEN / CELL;
  logic clk = 0, rst = 1, lie_g = 0, pie_g = 0, rec = 0;
  logic cell_valid, cell_bit;
  logic [3:0] cell_col;
  logic [7:0] cell_row;
  int checks = 0, failures = 0, results = 0, ones = 0, zeros = 0;
  logic recs [14][LEN];
  logic exp_q [$];
  int   col_q [$], row_q [$];

  data_reduction #(.LINE_LEN(LEN), .CELL(CELL)) dut (.clk, .rst, .lie_g, .pie_g, .rec,
                                                     .cell_valid, .cell_bit, .cell_col, .cell_row);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst && cell_valid) begin
      logic e; int c, r;
      results++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = exp_q.pop_front(); c = col_q.pop_front(); r = row_q.pop_front();
        if (cell_bit != e || cell_col != 4'(c) || cell_row != 8'(r)) begin
          failures++;
          if (failures < 10) $display("cell r%0d c%0d: got bit %0d col %0d row %0d, expected %0d", r, c, cell_bit, cell_col, cell_row, e);
        end
        if (e) ones++; else zeros++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int fr = 0; fr < 3; fr++) begin
      for (int l = 0; l < 14; l++)
        for (int x = 0; x < LEN; x++) begin
          int dens;
          dens = ((x / CELL + l / CELL + fr) % 3 == 0) ? 0 : 12;
          recs[l][x] = ($urandom_range(0, 99) < dens);
        end
      @(negedge clk); pie_g = 1;
      for (int l = 0; l < 14; l++) begin
        for (int x = 0; x < LEN; x++) begin
          lie_g = 1; rec = recs[l][x];
          if ((l % CELL == CELL - 1) && (x % CELL == CELL - 1)) begin
            logic e;
            e = 0;
            for (int yy = l - CELL + 1; yy <= l; yy++)
              for (int xx = x - CELL + 1; xx <= x; xx++) e |= recs[yy][xx];
            exp_q.push_back(e); col_q.push_back(x / CELL); row_q.push_back(l / CELL);
          end
          @(negedge clk);
        end
        lie_g = 0; rec = $urandom_range(0, 1);       // recognitions outside the grid are ignored
        repeat (5) @(negedge clk);
      end
      pie_g = 0;
      repeat (10) @(negedge clk);
    end
    checks += 3;
    if (exp_q.size() != 0) failures++;
    if (results != 3 * 3 * COLS) failures++;
    if (ones == 0 || zeros == 0) failures++;
    $display("cell results %0d (ones %0d zeros %0d)", results, ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
