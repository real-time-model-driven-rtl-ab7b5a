// sfmu_top: Shape Feature Measurement Unit for printed circuit board inspection.
//
// The unit checks, in real time, that the pads and vias the CAD data expects
// are present in a scanned grey-level image. It works in two layers:
//  1. First layer: the image passes an eight-line line buffer into eight
//     OPTIC max/min filter chips, two per grid, each holding four 8x8
//     multi-level (dynamic range correlation) templates. Four grids of 16x16
//     pixel cells, offset by 8 pixels/lines from each other, each use one
//     OPTIC template at a time, chosen by the CAD control bus. Per grid the
//     recognitions of a cell are reduced to one bit (data reduction).
//  2. Second layer: each grid's reduced binary image passes a 16-line binary
//     line buffer into an IRIS binary template matcher (one IRIS serves two
//     grids) that checks 16x16-cell shape templates.
// Results that the CAD data expects but that are missing are turned into an
// error code by the output look-up table. Templates are kept in a template
// RAM and copied into the filters by the load controller on request of the
// CAD control bus, which comes from the CAD data unit or, for tests, from a
// host-written override register.
//
// The OPTIC and IRIS chips are external: their pins are ports of this module.
//
// Side by side with the unit, with ports of its own (drc_*), sits the
// Dynamic Range Correlator module: the first-layer prototype built from two
// rank value filter chips, a line buffer and a subtract/compare stage
// (drc_module). It does not connect to the rest of the unit.
// rec for grid g is the TH0 output of whichever of its two OPTICs has its
// output enabled (the board ties the two outputs together).
//
// Host interface: 16-bit byte address, 8-bit data, write strobe, asynchronous
// read (map in sfmu_pkg). Clocking: one pixel clock; the board's three
// phase-shifted clocks are replaced by single-edge synchronous logic.
// Latencies: line buffer 2 clocks, OPTIC OPTIC_LATENCY clocks (6 in the
// specification), IRIS IRIS_LATENCY (this design's assumption). The grid
// enables are delayed by the first two so that each recognition meets the
// enables of the pixel whose window produced it.
module sfmu_top
  import sfmu_pkg::*;
#(
  parameter int unsigned LINE_LEN      = 32768,
  parameter int unsigned CELL          = 16,
  parameter int unsigned GRID_OFFSET   = 8,
  parameter int unsigned OPTIC_LATENCY = 6,
  parameter int unsigned IRIS_LATENCY  = 1,
  parameter int unsigned DRC_RVF_LATENCY = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  // picture bus
  input  pixel_t                pix,
  input  logic                  lie,
  input  logic                  pie,
  // CAD control bus from the CAD data unit
  input  cad_bus_t              cdcx2_bus,
  // host
  input  logic [15:0]           host_addr,
  input  logic [7:0]            host_wdata,
  input  logic                  host_we,
  output logic [7:0]            host_rdata,
  // override store paths
  input  logic                  bio_store,
  input  logic [1:0]            bio_sel,
  input  logic [15:0]           bio_data,
  input  logic                  pic_store,
  input  logic [2:0]            pic_sel,
  input  logic [7:0]            pic_data,
  // OPTIC chips
  output pixel_t                optic_di   [8],
  output logic                  optic_cin,
  output logic [2:0]            optic_cadr [NUM_OPTICS],
  output logic [NUM_OPTICS-1:0] optic_wen_n,
  output logic [NUM_OPTICS-1:0] optic_load,
  output logic [NUM_OPTICS-1:0] optic_cs_n,
  output logic [NUM_OPTICS-1:0] optic_oe_n,
  input  logic [NUM_OPTICS-1:0] optic_th0,
  // IRIS chips: system s of IRIS i serves grid 2i+s
  output logic [31:0]           iris_din   [NUM_IRIS],
  output logic [1:0]            iris_shift [NUM_IRIS],
  output logic [NUM_IRIS-1:0]   iris_we,
  output logic [8:0]            iris_addr,
  output logic [7:0]            iris_wdata,
  input  logic [3:0]            iris_ocl   [NUM_IRIS],   // bit 2s+t: system s, template t
  // status and errors
  output logic                  load_busy,
  output logic                  load_done,
  output logic [NUM_GRIDS-1:0]  grid_en,
  output logic                  err_valid,
  output logic [7:0]            err_code,
  output logic [3:0]            err_src,
  output logic                  err_lost,
  // Dynamic Range Correlator module (separate board)
  input  pixel_t                drc_pix,
  input  logic                  drc_lie,
  output pixel_t                drc_rvf_di [8],
  input  pixel_t                drc_rvf_white,
  input  pixel_t                drc_rvf_black,
  input  logic [7:0]            drc_range_thr,
  output logic                  drc_rec_valid,
  output logic                  drc_rec,
  output logic [7:0]            drc_range_val
);

  localparam int unsigned COLS = LINE_LEN / CELL;
  localparam int unsigned CW   = $clog2(COLS);
  localparam int unsigned ALIGN = 2 + OPTIC_LATENCY;

  // ------------------------------------------------------ host decoding
  logic sel_tram, sel_olut, sel_ilut, sel_sto, sel_sti, sel_cfg, sel_ovr, sel_ovr_sel;
  assign sel_tram    = (host_addr[15:13] == 3'b000);
  assign sel_olut    = (host_addr[15:13] == 3'b001);
  assign sel_ilut    = (host_addr[15:9]  == HA_ILUT[15:9]);
  assign sel_sto     = (host_addr[15:5]  == HA_STO[15:5]);
  assign sel_sti     = (host_addr[15:3]  == HA_STI[15:3]);
  assign sel_cfg     = (host_addr[15:2]  == HA_CFG[15:2]) && (host_addr[1:0] != 2'b11);
  assign sel_ovr     = (host_addr[15:3]  == HA_OVR[15:3]) && (host_addr[2:0] < 3'd6);
  assign sel_ovr_sel = (host_addr == HA_OVR_SEL);

  logic ovr_host;   // OVERRIDE bit: 1 = host control
  always_ff @(posedge clk) begin
    if (rst)                          ovr_host <= 1'b0;
    else if (host_we && sel_ovr_sel)  ovr_host <= host_wdata[0];
  end

  // ------------------------------------------------- CAD bus and override
  cad_bus_t cad_bus, ovr_word;
  logic     ld_accept;

  override_unit u_override (
    .clk(clk), .rst(rst),
    .bio_store(bio_store), .bio_sel(bio_sel), .bio_data(bio_data),
    .pic_store(pic_store || (host_we && sel_ovr)),
    .pic_sel  (pic_store ? pic_sel  : host_addr[2:0]),
    .pic_data (pic_store ? pic_data : host_wdata),
    .host_ctrl(ovr_host), .ld_accept(ld_accept),
    .cdcx2_bus(cdcx2_bus), .ovr_word(ovr_word), .cad_bus(cad_bus)
  );

  // ------------------------------------------------------- CAD control
  tcode_t             lut_code;
  logic [TRAM_AW-1:0] lut_base;
  logic               ld_start;
  dest_t              ld_dest;
  logic [TRAM_AW-1:0] ld_base;
  logic [2:0]         ld_cadr;
  logic [NUM_OPTICS-1:0] ld_optic_load;
  logic               sto_we, sti_we;
  logic [4:0]         sto_waddr;
  logic [2:0]         sti_waddr;
  tcode_t             st_wdata;
  logic [NUM_GRIDS-1:0] grid_on, grid_composed;
  logic [4:0]         grid_optic_idx [NUM_GRIDS];
  logic [1:0]         grid_iris_act  [NUM_GRIDS];

  cad_control u_cad (
    .clk(clk), .rst(rst), .cad_bus(cad_bus),
    .lut_code(lut_code), .lut_base(lut_base),
    .ld_busy(load_busy), .ld_start(ld_start), .ld_dest(ld_dest), .ld_base(ld_base),
    .ld_accept(ld_accept), .ld_cadr(ld_cadr), .ld_optic_load(ld_optic_load),
    .sto_we(sto_we), .sto_waddr(sto_waddr), .sti_we(sti_we), .sti_waddr(sti_waddr),
    .st_wdata(st_wdata),
    .optic_cs_n(optic_cs_n), .optic_oe_n(optic_oe_n), .optic_cadr(optic_cadr),
    .grid_on(grid_on), .grid_composed(grid_composed),
    .grid_optic_idx(grid_optic_idx), .grid_iris_act(grid_iris_act)
  );

  logic [7:0] ilut_rdata;
  cad_input_lut u_ilut (
    .clk(clk), .host_addr(host_addr[8:0]), .host_wdata(host_wdata),
    .host_we(host_we && sel_ilut), .host_rdata(ilut_rdata),
    .code(lut_code), .base(lut_base)
  );

  // --------------------------------------------- template RAM and loading
  logic [TRAM_AW-1:0]  tram_addr;
  logic [7:0]          tram_rdata, tram_host_rdata;
  logic [CFG_BITS-1:0] cfg_word;

  template_ram u_tram (
    .clk(clk), .host_addr(host_addr[TRAM_AW-1:0]), .host_wdata(host_wdata),
    .host_we(host_we && sel_tram), .host_rdata(tram_host_rdata),
    .ld_addr(tram_addr), .ld_rdata(tram_rdata)
  );

  load_control u_load (
    .clk(clk), .rst(rst),
    .start(ld_start), .dest(ld_dest), .base(ld_base), .busy(load_busy), .done(load_done),
    .tram_addr(tram_addr), .tram_rdata(tram_rdata),
    .cfg_we(host_we && sel_cfg), .cfg_sel(host_addr[1:0]), .cfg_wdata(host_wdata),
    .cfg_word(cfg_word),
    .optic_cin(optic_cin), .optic_cadr(ld_cadr), .optic_wen_n(optic_wen_n),
    .optic_load(ld_optic_load),
    .iris_we(iris_we), .iris_addr(iris_addr), .iris_wdata(iris_wdata)
  );
  assign optic_load = ld_optic_load;

  // ------------------------------------------------ stored template RAMs
  logic [4:0] ol_sto_raddr;
  logic [2:0] ol_sti_raddr;
  tcode_t     ol_sto_rdata, ol_sti_rdata, h_sto_rdata, h_sti_rdata;

  stored_template_ram #(.DEPTH(32)) u_sto (
    .clk(clk), .rst(rst), .we(sto_we), .waddr(sto_waddr), .wdata(st_wdata),
    .raddr_a(ol_sto_raddr), .rdata_a(ol_sto_rdata),
    .raddr_b(host_addr[4:0]), .rdata_b(h_sto_rdata)
  );

  stored_template_ram #(.DEPTH(8)) u_sti (
    .clk(clk), .rst(rst), .we(sti_we), .waddr(sti_waddr), .wdata(st_wdata),
    .raddr_a(ol_sti_raddr), .rdata_a(ol_sti_rdata),
    .raddr_b(host_addr[2:0]), .rdata_b(h_sti_rdata)
  );

  // --------------------------------------------------- first layer input
  logic lb_valid;
  line_buffer #(.LINE_LEN(LINE_LEN), .TAPS(8)) u_lb (
    .clk(clk), .rst(rst), .lie(lie), .din(pix), .din_valid(lie),
    .dout(optic_di), .dout_valid(lb_valid)
  );

  // enables aligned with the OPTIC outputs
  logic [ALIGN-1:0] lie_d, pie_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      lie_d <= '0;
      pie_d <= '0;
    end else begin
      lie_d <= {lie_d[ALIGN-2:0], lie};
      pie_d <= {pie_d[ALIGN-2:0], pie};
    end
  end

  logic [NUM_GRIDS-1:0] lie_g, pie_g;
  grid_offset #(.OFFSET_PIX(GRID_OFFSET), .OFFSET_LINES(GRID_OFFSET)) u_goff (
    .clk(clk), .rst(rst), .lie(lie_d[ALIGN-1]), .pie(pie_d[ALIGN-1]),
    .lie_g(lie_g), .pie_g(pie_g), .grid_en(grid_en)
  );

  // ------------------------------------------------------- per grid path
  logic [NUM_GRIDS-1:0] rec, cell_valid, cell_bit, col_valid;
  logic [CW-1:0]        cell_col [NUM_GRIDS];
  logic [7:0]           cell_row [NUM_GRIDS];
  logic [15:0]          col_bits [NUM_GRIDS];

  for (genvar g = 0; g < NUM_GRIDS; g++) begin : g_grid
    assign rec[g] = (optic_th0[2*g]   && !optic_oe_n[2*g]   && !ld_optic_load[2*g]) ||
                    (optic_th0[2*g+1] && !optic_oe_n[2*g+1] && !ld_optic_load[2*g+1]);

    data_reduction #(.LINE_LEN(LINE_LEN), .CELL(CELL)) u_red (
      .clk(clk), .rst(rst), .lie_g(lie_g[g]), .pie_g(pie_g[g]), .rec(rec[g]),
      .cell_valid(cell_valid[g]), .cell_bit(cell_bit[g]),
      .cell_col(cell_col[g]), .cell_row(cell_row[g])
    );

    bin_line_buffer #(.COLS(COLS), .LINES(16)) u_blb (
      .clk(clk), .rst(rst),
      .in_valid(cell_valid[g]), .in_bit(cell_bit[g]), .in_col(cell_col[g]),
      .out_valid(col_valid[g]), .out_bits(col_bits[g])
    );
  end

  for (genvar i = 0; i < NUM_IRIS; i++) begin : g_iris
    assign iris_din[i]   = {col_bits[2*i+1], col_bits[2*i]};
    assign iris_shift[i] = {col_valid[2*i+1], col_valid[2*i]};
  end

  // second layer results arrive IRIS_LATENCY clocks after the shift
  logic [NUM_GRIDS-1:0] shape_valid;
  logic [1:0]           shape_ocl [NUM_GRIDS];
  logic [NUM_GRIDS-1:0] col_valid_d [IRIS_LATENCY+1];

  assign col_valid_d[0] = col_valid;
  for (genvar k = 1; k <= IRIS_LATENCY; k++) begin : g_idel
    always_ff @(posedge clk) begin
      if (rst) col_valid_d[k] <= '0;
      else     col_valid_d[k] <= col_valid_d[k-1];
    end
  end
  assign shape_valid = col_valid_d[IRIS_LATENCY];

  for (genvar g = 0; g < NUM_GRIDS; g++) begin : g_ocl
    assign shape_ocl[g] = iris_ocl[g/2][2*(g%2) +: 2];
  end

  // ---------------------------------------------------------- output logic
  logic [7:0] olut_rdata;
  output_logic #(.AW(13)) u_out (
    .clk(clk), .rst(rst),
    .feat_valid(cell_valid), .feat_bit(cell_bit),
    .feat_check(grid_on & ~grid_composed), .feat_idx(grid_optic_idx),
    .shape_valid(shape_valid), .shape_ocl(shape_ocl), .shape_act(grid_iris_act),
    .sto_raddr(ol_sto_raddr), .sto_rdata(ol_sto_rdata),
    .sti_raddr(ol_sti_raddr), .sti_rdata(ol_sti_rdata),
    .host_addr(host_addr[12:0]), .host_wdata(host_wdata),
    .host_we(host_we && sel_olut), .host_rdata(olut_rdata),
    .err_valid(err_valid), .err_code(err_code), .err_src(err_src), .err_lost(err_lost)
  );

  // ------------------------------------------------------------ host read
  logic [CAD_BUS_W-1:0] ovr_bits;
  assign ovr_bits = ovr_word;

  always_comb begin
    host_rdata = '0;
    if (sel_tram)         host_rdata = tram_host_rdata;
    else if (sel_olut)    host_rdata = olut_rdata;
    else if (sel_ilut)    host_rdata = ilut_rdata;
    else if (sel_sto)     host_rdata = h_sto_rdata;
    else if (sel_sti)     host_rdata = h_sti_rdata;
    else if (sel_cfg)     host_rdata = 8'(cfg_word >> (8 * host_addr[1:0]));
    else if (sel_ovr)     host_rdata = 8'(ovr_bits >> (8 * host_addr[2:0]));
    else if (sel_ovr_sel) host_rdata = {7'd0, ovr_host};
  end

  // ---------------------------------------------------------------------
  // Dynamic Range Correlator module
  drc_module #(.LINE_LEN(LINE_LEN), .RVF_LATENCY(DRC_RVF_LATENCY)) u_drc (
    .clk(clk), .rst(rst), .pix(drc_pix), .lie(drc_lie),
    .rvf_di(drc_rvf_di), .rvf_white(drc_rvf_white), .rvf_black(drc_rvf_black),
    .range_thr(drc_range_thr), .rec_valid(drc_rec_valid), .rec(drc_rec),
    .range_val(drc_range_val)
  );

endmodule
