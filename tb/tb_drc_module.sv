// tb_drc_module: a 32-pixel-line DRC module with two rank value filter
// models. The white filter takes the newest pixel of the present line and of
// the line above, rank 0 (their minimum); the black filter takes the pixel
// left of each, rank 1 (their maximum). So for pixel (x, y):
//   A = min(p[y][x], p[y-1][x]) - max(p[y][x-1], p[y-1][x-1]),
//   rec = A >= range threshold.
// Ten lines of random pixels (with bright runs so that both outcomes occur)
// are streamed with random blanking; every result is matched, in order, with
// the pixel that produced it, and the delay is checked: from the edge that
// samples the pixel, line buffer (1) + filters (RVF_LATENCY) + compare (1)
// further edges.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_drc_module;
  import sfmu_pkg::*;
  localparam int LL  = 32;
  localparam int NL  = 10;
  localparam int LAT = 3;

  logic clk = 1'b0, rst = 1'b1;
  pixel_t pix;
  logic lie;
  pixel_t rvf_di [8];
  pixel_t rvf_white, rvf_black;
  logic [7:0] range_thr;
  logic rec_valid, rec;
  logic [7:0] range_val;
  int checks = 0, failures = 0, n_rec = 0, n_norec = 0;
  longint cyc = 0;
  pixel_t img [NL][LL];
  int qx[$], qy[$];
  longint qt[$];

  drc_module #(.LINE_LEN(LL), .RVF_LATENCY(LAT)) dut (.*);

  localparam logic [63:0] WHITE = (64'd1 << 63) | (64'd1 << 55);
  localparam logic [63:0] BLACK = (64'd1 << 62) | (64'd1 << 54);
  rvf_model #(.LATENCY(LAT)) u_white (.clk(clk), .di(rvf_di), .mask(WHITE), .rank(6'd0), .dout(rvf_white));
  rvf_model #(.LATENCY(LAT)) u_black (.clk(clk), .di(rvf_di), .mask(BLACK), .rank(6'd1), .dout(rvf_black));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results, matched in order with the pixels sent
  always @(negedge clk) begin
    if (!rst && rec_valid) begin
      int x, y, a, mn, mx;
      longint t;
      x = qx.pop_front(); y = qy.pop_front(); t = qt.pop_front();
      checks++;
      if (cyc - t != LAT + 3) begin   // sampled at the next edge, then 1 + LAT + 1
        failures++;
        $display("FAIL latency %0d for pixel (%0d,%0d)", cyc - t, x, y);
      end
      if (x >= 1 && y >= 1) begin
        mn = (img[y][x] < img[y-1][x]) ? img[y][x] : img[y-1][x];
        mx = (img[y][x-1] > img[y-1][x-1]) ? img[y][x-1] : img[y-1][x-1];
        a  = mn - mx;
        checks++;
        if (rec !== (a >= int'(range_thr))) begin
          failures++;
          $display("FAIL pixel (%0d,%0d) A=%0d rec=%0d", x, y, a, rec);
        end
        if (a >= 0) begin
          checks++;
          if (range_val !== 8'(a)) begin
            failures++;
            $display("FAIL pixel (%0d,%0d) range %0d expected %0d", x, y, range_val, a);
          end
        end
        if (rec) n_rec++; else n_norec++;
      end
    end
  end

  initial begin
    pix = '0; lie = 1'b0; range_thr = 8'd20;
    for (int y = 0; y < NL; y++)
      for (int x = 0; x < LL; x++)
        img[y][x] = (((x / 4) % 3) == 1) ? 8'(150 + $urandom_range(50)) : 8'($urandom_range(60));
    repeat (4) @(negedge clk);
    rst = 1'b0;
    for (int y = 0; y < NL; y++) begin
      for (int x = 0; x < LL; x++) begin
        @(negedge clk);
        lie = 1'b1; pix = img[y][x];
        qx.push_back(x); qy.push_back(y); qt.push_back(cyc);
      end
      @(negedge clk);
      lie = 1'b0;
      repeat ($urandom_range(2, 12)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (qx.size() != 0 || n_rec == 0 || n_norec == 0) begin
      failures++;
      $display("FAIL %0d results missing, rec=%0d norec=%0d", qx.size(), n_rec, n_norec);
    end
    $display("recognitions %0d, none %0d", n_rec, n_norec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
