// cad_control: CAD control logic, the main controller of the unit.
//
// It registers the 43-bit CAD control bus once per clock and decodes it:
//  * Load field: when the load bit is set and the load controller is idle,
//    the template code is translated by the input LUT (outside, `lut_code` /
//    `lut_base`) into a template RAM base address, and a load of that
//    template into the destination filter section is started. The code is
//    recorded in the stored template RAM of the layer it goes to (first
//    layer: index = destination bits 4..0; second layer: destination bits
//    2..0). A configuration load (destination 110000) records nothing.
//    Destination codes outside the table are ignored. The request is
//    acknowledged with `ld_accept`; while the load controller is busy a
//    request waits.
//  * OPTIC activation, per grid g: bit `on` drives the chip select of both
//    OPTICs of the grid (2g and 2g+1), bit `sel` picks which one has its
//    output enabled, `addr` is the template section (CADR in work mode), and
//    `composed` says whether the first-layer result goes on to the second
//    layer or straight to the output logic.
//  * IRIS activation: bit 4i+s marks section s of IRIS i active.
// While an OPTIC is being loaded its CADR comes from the load controller.
//
// Timing: all decoded outputs follow the bus with one clock of delay.
// The top two bits of grid_optic_idx[g] are the constant grid number g; they
// are kept so the index equals the stored-template address of that section.
// The field layout, the destination codes and the per-grid activation bits
// follow the specification; the registered bus, the accept handshake and
// the stored-template index (destination bits) are this design's choice.
module cad_control
  import sfmu_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  cad_bus_t              cad_bus,
  // input LUT
  output tcode_t                lut_code,
  input  logic [TRAM_AW-1:0]    lut_base,
  // load controller
  input  logic                  ld_busy,
  output logic                  ld_start,
  output dest_t                 ld_dest,
  output logic [TRAM_AW-1:0]    ld_base,
  output logic                  ld_accept,
  input  logic [2:0]            ld_cadr,
  input  logic [NUM_OPTICS-1:0] ld_optic_load,
  // stored template RAMs
  output logic                  sto_we,
  output logic [4:0]            sto_waddr,
  output logic                  sti_we,
  output logic [2:0]            sti_waddr,
  output tcode_t                st_wdata,
  // OPTIC control (work mode)
  output logic [NUM_OPTICS-1:0] optic_cs_n,
  output logic [NUM_OPTICS-1:0] optic_oe_n,
  output logic [2:0]            optic_cadr [NUM_OPTICS],
  // per grid decode for the rest of the board
  output logic [NUM_GRIDS-1:0]  grid_on,
  output logic [NUM_GRIDS-1:0]  grid_composed,
  output logic [4:0]            grid_optic_idx [NUM_GRIDS],   // {g, sel, addr}
  output logic [1:0]            grid_iris_act  [NUM_GRIDS]    // sections 2(g%2), 2(g%2)+1
);

  cad_bus_t bus_q;

  always_ff @(posedge clk) begin
    if (rst) bus_q <= '0;
    else     bus_q <= cad_bus;
  end

  // ------------------------------------------------------------ loading
  ld_kind_t kind;
  logic     req;

  assign kind      = dest_kind(bus_q.ld.dest);
  assign lut_code  = bus_q.ld.code;
  assign req       = bus_q.ld.load && (kind != LD_NONE);
  assign ld_accept = req && !ld_busy && !ld_start;

  always_ff @(posedge clk) begin
    if (rst) begin
      ld_start  <= 1'b0;
      ld_dest   <= '0;
      ld_base   <= '0;
      sto_we    <= 1'b0;
      sti_we    <= 1'b0;
      sto_waddr <= '0;
      sti_waddr <= '0;
      st_wdata  <= '0;
    end else begin
      ld_start <= ld_accept;
      sto_we   <= ld_accept && (kind == LD_OPTIC);
      sti_we   <= ld_accept && (kind == LD_IRIS);
      if (ld_accept) begin
        ld_dest   <= bus_q.ld.dest;
        ld_base   <= lut_base;
        sto_waddr <= bus_q.ld.dest[4:0];
        sti_waddr <= bus_q.ld.dest[2:0];
        st_wdata  <= bus_q.ld.code;
      end
    end
  end

  // --------------------------------------------------------- activation
  always_comb begin
    for (int g = 0; g < NUM_GRIDS; g++) begin
      grid_on[g]        = bus_q.optic[g].on;
      grid_composed[g]  = bus_q.optic[g].composed;
      grid_optic_idx[g] = {2'(g), bus_q.optic[g].sel, bus_q.optic[g].addr};
      grid_iris_act[g]  = bus_q.iris[4*(g/2) + 2*(g%2) +: 2];
      for (int o = 0; o < 2; o++) begin
        optic_cs_n[2*g+o] = !bus_q.optic[g].on;
        optic_oe_n[2*g+o] = !(bus_q.optic[g].on && (bus_q.optic[g].sel == 1'(o)));
        optic_cadr[2*g+o] = ld_optic_load[2*g+o] ? ld_cadr : {1'b0, bus_q.optic[g].addr};
      end
    end
  end

endmodule
