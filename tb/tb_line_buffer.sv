// tb_line_buffer: streams 14 lines of 16 pixels (with blanking gaps of random
// length) through a 16-pixel, 8-tap line buffer. Pixel value = f(line, col).
// Each output column must hold the pixel of the same column from the present
// line (tap 7) and from the 7 lines above it (tap 0 = 7 lines up), one clock
// after the edge that sampled the pixel (two register stages).
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_line_buffer;
  import sfmu_pkg::*;
  localparam int unsigned LEN = 16;
  logic   clk = 0, rst = 1, lie = 0, din_valid = 0;
  pixel_t din = '0;
  pixel_t dout [8];
  logic   dout_valid;
  int checks = 0, failures = 0;
  int q_line[$], q_col[$], q_time[$];
  int cyc = 0;

  line_buffer #(.LINE_LEN(LEN), .TAPS(8)) dut (.clk, .rst, .lie, .din, .din_valid, .dout, .dout_valid);

  function automatic pixel_t f(int line, int col);
    return pixel_t'(line * 37 + col * 5 + 3);
  endfunction

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    #1;
    if (!rst && dout_valid) begin
      int l, c, t;
      l = q_line.pop_front(); c = q_col.pop_front(); t = q_time.pop_front();
      checks++;
      if (cyc - t != 1) begin failures++; $display("latency %0d", cyc - t); end
      for (int k = 0; k < 8; k++) begin
        if (l - k >= 0) begin
          checks++;
          if (dout[7-k] != f(l - k, c)) begin
            failures++;
            if (failures < 10) $display("line %0d col %0d tap %0d: %0d expected %0d", l, c, 7-k, dout[7-k], f(l-k, c));
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int l = 0; l < 14; l++) begin
      repeat ($urandom_range(1, 4)) @(negedge clk);
      for (int c = 0; c < LEN; c++) begin
        lie = 1; din_valid = 1; din = f(l, c);
        q_line.push_back(l); q_col.push_back(c); q_time.push_back(cyc + 1);
        @(negedge clk);
      end
      lie = 0; din_valid = 0; din = 8'hEE;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (q_line.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
