// tb_bin_line_buffer: 8 columns, 6 lines. Random bits are pushed row by row
// (columns in order, with random gaps). After the buffer has seen 5 earlier
// rows, every output column must hold the bits of that column from the 5
// earlier rows (oldest in bit 0) and the new bit in bit 5, one clock later.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_bin_line_buffer;
  localparam int unsigned COLS = 8, LINES = 6;
  logic clk = 0, rst = 1, in_valid = 0, in_bit = 0;
  logic [2:0] in_col = '0;
  logic out_valid;
  logic [LINES-1:0] out_bits;
  logic img [20][COLS];
  int checks = 0, failures = 0;

  bin_line_buffer #(.COLS(COLS), .LINES(LINES)) dut (.clk, .rst, .in_valid, .in_bit, .in_col,
                                                     .out_valid, .out_bits);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int r = 0; r < 20; r++)
      for (int c = 0; c < COLS; c++) begin
        img[r][c] = 1'($urandom);
        in_valid = 1; in_bit = img[r][c]; in_col = 3'(c);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid) failures++;
        if (r >= LINES - 1) begin
          logic [LINES-1:0] e;
          for (int k = 0; k < LINES; k++) e[k] = img[r - (LINES - 1) + k][c];
          checks++;
          if (out_bits != e) begin
            failures++;
            if (failures < 10) $display("row %0d col %0d: %b expected %b", r, c, out_bits, e);
          end
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
