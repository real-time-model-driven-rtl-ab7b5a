// Shared body of the end-to-end testbenches of sfmu_top (tb_sfmu_top at a
// short line length, tb_sfmu_top_full at the default sizes).
//
// The including module declares LL (pixels per line), ROWS (rows of cells
// in the test frame) and instantiates sfmu_top as `dut` with .* ports.
// This body drives everything else:
//   1. The host fills the template RAM, the input look-up table, the
//      configuration word and the output look-up table, then takes the CAD
//      control bus through the override register and issues four loads:
//      an OPTIC template into OPTIC 0 section 1, the same template into
//      OPTIC 2 section 1, the configuration word into all OPTICs, and a
//      shape template into IRIS 0 section 2. The load times (144, 144, 22
//      and 66 clocks) and the stored-template codes are checked.
//   2. Control goes back to the CAD data bus, which switches grid 0 on as
//      a single (feature-only) grid and grid 1 on as a composed grid with
//      IRIS 0 section 2 active.
//   3. After one grey line outside the picture (it fills the OPTIC
//      windows, as a running camera would), one frame of a flat grey picture with scattered bright spots is
//      streamed. The OPTIC template fires on the left edge of a spot. A
//      grid-0 cell without a spot must give a feature error (source 0,
//      output code 8'hE1); a grid-1 cell without a spot must give a shape
//      error (source 4'b0101, output code 8'hE2). The errors are counted
//      and compared with a count made from the spot map.
// The Dynamic Range Correlator module beside the unit gets the same video
// and two rank value filter models; its recognitions are counted against
// the spot map as well.
// Each mechanism is counted and a mechanism that never happened is a
// failure. The OPTIC and IRIS chips are behavioural models.

  import sfmu_pkg::*;

  localparam int GAP = 40;                   // blanking between lines
  localparam int NL  = 16 * ROWS + 8;        // lines in the frame
  localparam int NC  = LL / 16;              // cells per grid row

  logic                  clk = 1'b0;
  logic                  rst;
  pixel_t                pix;
  logic                  lie, pie;
  cad_bus_t              cdcx2_bus;
  logic [15:0]           host_addr;
  logic [7:0]            host_wdata;
  logic                  host_we;
  logic [7:0]            host_rdata;
  logic                  bio_store;
  logic [1:0]            bio_sel;
  logic [15:0]           bio_data;
  logic                  pic_store;
  logic [2:0]            pic_sel;
  logic [7:0]            pic_data;
  pixel_t                optic_di   [8];
  logic                  optic_cin;
  logic [2:0]            optic_cadr [NUM_OPTICS];
  logic [NUM_OPTICS-1:0] optic_wen_n, optic_load, optic_cs_n, optic_oe_n, optic_th0;
  logic [31:0]           iris_din   [NUM_IRIS];
  logic [1:0]            iris_shift [NUM_IRIS];
  logic [NUM_IRIS-1:0]   iris_we;
  logic [8:0]            iris_addr;
  logic [7:0]            iris_wdata;
  logic [3:0]            iris_ocl   [NUM_IRIS];
  logic [3:0]            iris_och   [NUM_IRIS];
  logic                  load_busy, load_done;
  logic [NUM_GRIDS-1:0]  grid_en;
  logic                  err_valid;
  logic [7:0]            err_code;
  logic [3:0]            err_src;
  logic                  err_lost;
  pixel_t                drc_pix;
  logic                  drc_lie;
  pixel_t                drc_rvf_di [8];
  pixel_t                drc_rvf_white, drc_rvf_black;
  logic [7:0]            drc_range_thr;
  logic                  drc_rec_valid, drc_rec;
  logic [7:0]            drc_range_val;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- chips
  for (genvar n = 0; n < NUM_OPTICS; n++) begin : g_optic
    optic_model u_optic (
      .clk(clk), .di(optic_di), .cin(optic_cin), .cadr(optic_cadr[n]),
      .wen_n(optic_wen_n[n]), .load(optic_load[n]), .cs_n(optic_cs_n[n]),
      .oe_n(optic_oe_n[n]), .th0(optic_th0[n])
    );
  end
  for (genvar i = 0; i < NUM_IRIS; i++) begin : g_iris
    iris_model u_iris (
      .clk(clk), .din(iris_din[i]), .shift(iris_shift[i]), .we(iris_we[i]),
      .addr(iris_addr), .wdata(iris_wdata), .ocl(iris_ocl[i]), .och(iris_och[i])
    );
  end

  // DRC module: fed with the same video; the white filter takes the newest
  // pixel, the black filter the pixel left of it, both rank 0, threshold 1,
  // so it fires exactly where the OPTIC template does
  assign drc_pix = pix;
  assign drc_lie = lie;
  assign drc_range_thr = 8'd1;
  rvf_model u_rvf_white (.clk(clk), .di(drc_rvf_di), .mask(64'd1 << 63), .rank(6'd0), .dout(drc_rvf_white));
  rvf_model u_rvf_black (.clk(clk), .di(drc_rvf_di), .mask(64'd1 << 62), .rank(6'd0), .dout(drc_rvf_black));

  // ------------------------------------------------------------ watchdog
  localparam longint WATCHDOG = 64'(NL) * 64'(LL + GAP) + 200000;
  initial begin
    wait (cyc > WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------- host access
  task automatic hw(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk);
    host_addr = a; host_wdata = d; host_we = 1'b1;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic hr(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk);
    host_addr = a; host_we = 1'b0;
    #1 d = host_rdata;
  endtask

  // write the override register (byte 5, which holds the load bit, last)
  task automatic ovr_write(input cad_bus_t w);
    logic [47:0] b;
    b = 48'(w);
    for (int k = 0; k < 6; k++) hw(HA_OVR + 16'(k), b[8*k +: 8]);
  endtask

  // issue one load through the override register and time it
  int load_clks;
  task automatic do_load(input dest_t dest, input tcode_t code, input int expect_clks,
                         input string what);
    cad_bus_t w;
    w = '0;
    w.ld.load = 1'b1; w.ld.dest = dest; w.ld.code = code;
    ovr_write(w);
    load_clks = 0;
    if (dut.ovr_host) n_override++;
    @(negedge clk);
    while (!load_busy) @(negedge clk);
    while (load_busy) begin
      load_clks++;
      @(negedge clk);
    end
    check(load_clks == expect_clks, $sformatf("%s load took %0d clocks, expected %0d",
                                              what, load_clks, expect_clks));
    repeat (3) @(posedge clk);
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_optic_load = 0, n_cfg_load = 0, n_iris_load = 0;
  int n_override = 0, n_cdcx2 = 0;
  int n_feat_err = 0, n_shape_err = 0, n_other_err = 0, n_lost = 0;
  int n_cell_hit = 0;
  int n_drc_rec = 0, n_drc_valid = 0, exp_drc = 0;
  int n_grid_en [NUM_GRIDS] = '{default: 0};

  always @(posedge clk) begin
    if (!rst) begin
      for (int g = 0; g < NUM_GRIDS; g++) if (grid_en[g]) n_grid_en[g]++;
      if (err_lost) n_lost++;
      if (drc_rec_valid) n_drc_valid++;
      if (drc_rec && pie) n_drc_rec++;   // the grey lead-in line starts from empty filter windows
      // every reduced cell of grids 0 and 1 against the spot map
      if (dut.cell_valid[0] && dut.cell_row[0] < ROWS)
        check(dut.cell_bit[0] == hit0[dut.cell_row[0]][dut.cell_col[0]],
              $sformatf("grid 0 cell r%0d c%0d", dut.cell_row[0], dut.cell_col[0]));
      if (dut.cell_valid[1] && dut.cell_row[1] < ROWS)
        check(dut.cell_bit[1] == hit1[dut.cell_row[1]][dut.cell_col[1]],
              $sformatf("grid 1 cell r%0d c%0d", dut.cell_row[1], dut.cell_col[1]));
      if (err_valid) begin
        if (!dut.ovr_host) n_cdcx2++;
        if (err_src == 4'b0000 && err_code == 8'hE1)      n_feat_err++;
        else if (err_src == 4'b0101 && err_code == 8'hE2) n_shape_err++;
        else begin
          n_other_err++;
          $display("unexpected error src=%b code=%h at %0d", err_src, err_code, cyc);
        end
      end
    end
  end

  // ------------------------------------------------------------ picture
  bit spot [NL][LL];
  bit hit0 [ROWS][NC];
  bit hit1 [ROWS][NC];
  int exp_feat, exp_shape;

  function automatic bit rec_at(int x, int y);
    return spot[y][x] && (x == 0 || !spot[y][x-1]);
  endfunction

  task automatic make_picture();

    for (int y = 0; y < NL; y++)
      for (int x = 0; x < LL; x++)
        spot[y][x] = (x >= 16) && (x < LL - 16) && (y < 16 * ROWS) && ($urandom_range(399) == 0);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < NC; c++) begin hit0[r][c] = 1'b0; hit1[r][c] = 1'b0; end
    for (int y = 0; y < 16 * ROWS; y++)
      for (int x = 0; x < LL; x++)
        if (rec_at(x, y)) begin
          exp_drc++;
          hit0[y/16][x/16] = 1'b1;
          if (x >= 8) hit1[y/16][(x-8)/16] = 1'b1;
        end
    exp_feat = 0; exp_shape = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < NC; c++) begin
        if (!hit0[r][c]) exp_feat++; else n_cell_hit++;
        if (!hit1[r][c]) exp_shape++;
      end
  endtask

  task automatic stream_frame();
    // one grey line outside the picture fills the OPTIC windows
    @(negedge clk);
    lie = 1'b1;
    repeat (LL) @(negedge clk);
    lie = 1'b0;
    repeat (GAP) @(negedge clk);
    pie = 1'b1;
    repeat (GAP) @(negedge clk);
    for (int y = 0; y < NL; y++) begin
      for (int x = 0; x < LL; x++) begin
        lie = 1'b1;
        pix = spot[y][x] ? 8'd200 : 8'd50;
        @(negedge clk);
      end
      lie = 1'b0;
      pix = 8'd50;
      repeat (GAP) @(negedge clk);
    end
    pie = 1'b0;
    repeat (200) @(negedge clk);
  endtask

  // ------------------------------------------------------------ main
  initial begin
    logic [7:0] d;
    cad_bus_t   run;

    rst = 1'b1; pix = 8'd50; lie = 1'b0; pie = 1'b0;
    cdcx2_bus = '0;
    host_addr = '0; host_wdata = '0; host_we = 1'b0;
    bio_store = 1'b0; bio_sel = '0; bio_data = '0;
    pic_store = 1'b0; pic_sel = '0; pic_data = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;

    // OPTIC template at 0x0010: MIN at the newest pixel of the present line,
    // MAX at the pixel left of it, don't care elsewhere
    hw(16'h0010, 8'h4A);
    for (int k = 1; k < 16; k++) hw(16'h0010 + 16'(k), 8'hAA);
    // IRIS template at 0x0020: only the newest cell must be 1
    for (int k = 0; k < 32; k++) hw(16'h0020 + 16'(k), (k == 31) ? 8'h80 : 8'h00);
    for (int k = 0; k < 32; k++) hw(16'h0040 + 16'(k), (k == 31) ? 8'h7F : 8'hFF);
    hw(16'h0060, 8'h00);   // low threshold: more than 0 matches
    hw(16'h0061, 8'h00);
    // input look-up table: code 5 -> 0x0010, code 9 -> 0x0020
    hw(HA_ILUT + 16'd10, 8'h10); hw(HA_ILUT + 16'd11, 8'h00);
    hw(HA_ILUT + 16'd18, 8'h20); hw(HA_ILUT + 16'd19, 8'h00);
    // configuration: mode 011 (MIN - MAX), threshold 1
    hw(HA_CFG + 16'd0, 8'h2F); hw(HA_CFG + 16'd1, 8'h60); hw(HA_CFG + 16'd2, 8'h3C);
    // output look-up table
    hw(HA_OLUT + 16'h0005, 8'hE1);
    hw(HA_OLUT + 16'h0A09, 8'hE2);

    hr(16'h0010, d); check(d == 8'h4A, "template RAM read back");
    hr(HA_ILUT + 16'd18, d); check(d == 8'h20, "input LUT read back");
    hr(HA_OLUT + 16'h0A09, d); check(d == 8'hE2, "output LUT read back");

    // host takes the CAD control bus
    ovr_write('0);
    hw(HA_OVR_SEL, 8'h01);
    do_load(6'b000001, 8'd5, OPTIC_LOAD_CLKS, "OPTIC 0 section 1"); n_optic_load++;
    do_load(6'b001001, 8'd5, OPTIC_LOAD_CLKS, "OPTIC 2 section 1"); n_optic_load++;
    do_load(DEST_CFG_ALL, 8'd0, CFG_LOAD_CLKS, "configuration");    n_cfg_load++;
    do_load(6'b100010, 8'd9, 66, "IRIS 0 section 2");               n_iris_load++;

    hr(HA_STO + 16'd1, d); check(d == 8'd5, "stored code OPTIC 0 section 1");
    hr(HA_STO + 16'd9, d); check(d == 8'd5, "stored code OPTIC 2 section 1");
    hr(HA_STI + 16'd2, d); check(d == 8'd9, "stored code IRIS 0 section 2");
    check(g_optic[0].u_optic.cfg == 22'h3C602F, "configuration reached OPTIC 0");
    check(g_optic[7].u_optic.cfg == 22'h3C602F, "configuration reached OPTIC 7");
    check(g_optic[2].u_optic.tmpl[1][127:120] == 8'h4A, "template reached OPTIC 2");
    check(g_iris[0].u_iris.dc_bits[2][255:248] == 8'h7F, "template reached IRIS 0");

    // CAD data bus takes over: grid 0 single, grid 1 composed
    run = '0;
    run.optic[0].on = 1'b1; run.optic[0].addr = 2'd1;
    run.optic[1].on = 1'b1; run.optic[1].addr = 2'd1; run.optic[1].composed = 1'b1;
    run.iris = 8'b0000_0100;
    cdcx2_bus = run;
    hw(HA_OVR_SEL, 8'h00);

    make_picture();
    stream_frame();

    $display("feature errors %0d (expected %0d), shape errors %0d (expected %0d)",
             n_feat_err, exp_feat, n_shape_err, exp_shape);
    check(n_feat_err == exp_feat, "feature error count");
    check(n_shape_err == exp_shape, "shape error count");
    check(n_other_err == 0, "no unexpected errors");
    check(n_lost == 0, "no lost errors");
    $display("DRC module recognitions %0d (expected %0d)", n_drc_rec, exp_drc);
    check(n_drc_rec == exp_drc, "DRC module recognition count");
    check(n_drc_valid == (NL + 1) * LL, "DRC module result per pixel");

    // every mechanism must have happened
    check(n_optic_load > 0, "OPTIC template load happened");
    check(n_cfg_load > 0,   "configuration load happened");
    check(n_iris_load > 0,  "IRIS template load happened");
    check(n_override > 0,   "loads under host override happened");
    check(n_cdcx2 > 0,      "errors under CAD data bus control");
    check(n_feat_err > 0,   "feature (single grid) error happened");
    check(n_shape_err > 0,  "shape (composed grid) error happened");
    check(n_cell_hit > 0,   "a cell with a recognised feature happened");
    check(n_drc_rec > 0,    "DRC module recognition happened");
    for (int g = 0; g < NUM_GRIDS; g++)
      check(n_grid_en[g] > 0, $sformatf("grid %0d enable happened", g));
    $display("mechanisms: optic loads %0d, config loads %0d, iris loads %0d, override loads %0d, cad bus errors %0d",
             n_optic_load, n_cfg_load, n_iris_load, n_override, n_cdcx2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
